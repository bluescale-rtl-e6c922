// tb_task_param_table: self-checking test of the task parameter table and
// its round-robin loader. A reference model keyed by (client ID, task ID)
// tracks the expected table contents. Checks: all four clients requesting
// at once are served in rotating order, one word per cycle; a known key
// overwrites its row; period or execution time 0 deletes it; a seventeenth
// task is dropped and flagged; `changed` pulses after each alteration; and
// the row contents match the model after random traffic.
module tb_task_param_table;
  import bs_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n;
  logic [NPORT-1:0] tp_valid, tp_ready;
  task_parm_t tp_parm [NPORT];
  task_entry_t rows [DEPTH];
  logic [DEPTH-1:0] row_valid;
  logic changed, dropped;
  int checks = 0, failures = 0;

  task_param_table #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // model: key = {client, task id} -> {period, wcet}
  logic [63:0] model [logic [9:0]];

  task automatic model_apply(int c, task_parm_t p, output logic drop);
    logic [9:0] k;
    k = {2'(c), p.task_id};
    drop = 1'b0;
    if (model.exists(k)) begin
      if (p.period == 0 || p.wcet == 0) model.delete(k);
      else model[k] = {p.period, p.wcet};
    end else if (p.period != 0 && p.wcet != 0) begin
      if (model.num() < DEPTH) model[k] = {p.period, p.wcet};
      else drop = 1'b1;
    end
  endtask

  task automatic compare_table(string what);
    int n = 0;
    logic ok = 1'b1;
    for (int i = 0; i < DEPTH; i++) if (row_valid[i]) begin
      logic [9:0] k;
      n++;
      k = {rows[i].client_id, rows[i].p.task_id};
      if (!model.exists(k) || model[k] != {rows[i].p.period, rows[i].p.wcet}) ok = 1'b0;
    end
    check({what, ": rows match model"}, ok && n == model.num());
  endtask

  // one word from one client, waits for acceptance
  task automatic send(int c, int id, int T, int C);
    logic drop;
    tp_parm[c] = '{task_id: 8'(id), period: 32'(T), wcet: 32'(C)};
    tp_valid = '0; tp_valid[c] = 1'b1;
    #1;
    check("single requester is served at once", tp_ready == (4'b1 << c));
    @(posedge clk);
    model_apply(c, tp_parm[c], drop);
    #1 tp_valid = '0;
  endtask

  initial begin
    logic drop;
    rst_n = 0; tp_valid = 0;
    for (int c = 0; c < NPORT; c++) tp_parm[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("empty after reset", row_valid == 0);
    // all four at once: round robin must serve 0,1,2,3 then rotate
    for (int c = 0; c < NPORT; c++) tp_parm[c] = '{task_id: 8'(10 + c), period: 32'(100 + c), wcet: 32'(1 + c)};
    tp_valid = 4'hF;
    begin
      int order [$];
      for (int k = 0; k < 4; k++) begin
        #1;
        check("one grant per cycle", $onehot(tp_ready));
        for (int c = 0; c < NPORT; c++) if (tp_ready[c]) order.push_back(c);
        @(posedge clk);
        #1;
        model_apply(order[k], tp_parm[order[k]], drop);
        tp_valid[order[k]] = 1'b0;
        check("changed pulses", changed);
      end
      check("round robin order", order.size() == 4 && order[0] == 0 && order[1] == 1 &&
            order[2] == 2 && order[3] == 3);
    end
    tp_valid = '0;
    @(posedge clk); #1;
    check("changed drops", !changed);
    compare_table("after four loads");
    // overwrite and delete
    send(2, 12, 500, 9);
    compare_table("overwrite");
    send(1, 11, 0, 0);
    compare_table("delete");
    // fill the table and overflow
    for (int k = 0; k < 13; k++) send(k % 4, 100 + k, 50 + k, 1);
    compare_table("full");
    check("not dropped yet", !dropped);
    send(3, 200, 70, 2);
    @(posedge clk); #1;
    check("dropped flag", dropped);
    compare_table("after drop");
    // random traffic
    for (int k = 0; k < 300; k++) begin
      int c, id;
      c = $urandom % 4;
      id = $urandom % 12;
      if ($urandom % 3 == 0) send(c, id, 0, 5);
      else send(c, id, 1 + $urandom % 1000, 1 + $urandom % 50);
      compare_table("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
