// tb_interface_selector: self-checking test of the interface selector.
//
// The reference model (isel_ref_pkg) is written independently of the
// hardware algorithm: exact integer arithmetic instead of rounded fixed
// point, a linear scan of Theta instead of a binary search, and a check of
// dbf(t) <= sbf(t) at every integer t below beta rather than only at
// deadlines. The test loads task sets through the four client ports, waits for
// the run, and compares the four (Theta, Pi) pairs written to the local
// scheduler, the four task words sent upwards (under random back-pressure),
// the infeasible bits and the overload flag. Three scenarios: a mixed task
// set with one idle client, an update plus a deletion, and an over-utilised
// set. Periods are taken from divisors of 1200 so the exact model stays small.
module tb_interface_selector;
  import bs_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [NPORT-1:0] tp_valid, tp_ready, infeasible;
  task_parm_t tp_parm [NPORT];
  logic ve_valid, up_valid, up_ready, busy, run_done, overload, table_dropped;
  logic [1:0] ve_id;
  ve_parm_t ve_parm;
  task_parm_t up_parm;
  int checks = 0, failures = 0;

  interface_selector dut (.*);
  always #5 clk = ~clk;

  localparam longint L = 1200;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // task set of the reference model, per client
  typedef isel_ref_pkg::rtask_t rtask_t;
  isel_ref_pkg::tq_t ts [NPORT];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic ref_select(int x, output longint best_th, output longint best_pi);
    longint ntot = 0;
    for (int k = 0; k < NPORT; k++) ntot += isel_ref_pkg::num_of(ts[k], L);
    return isel_ref_pkg::ref_select(ts[x], ntot, L, best_th, best_pi);
  endfunction

  // deliver one task word from client c
  task automatic send(int c, int id, longint T, longint C);
    tp_parm[c] = '{task_id: 8'(id), period: 32'(T), wcet: 32'(C)};
    tp_valid[c] = 1'b1;
    do @(posedge clk); while (!tp_ready[c]);
    #1 tp_valid[c] = 1'b0;
  endtask

  task automatic add_task(int c, int id, longint T, longint C);
    rtask_t r;
    r.id = id; r.T = T; r.C = C;
    ts[c].push_back(r);
    send(c, id, T, C);
  endtask

  task automatic del_task(int c, int id);
    foreach (ts[c][i]) if (ts[c][i].id == id) begin ts[c].delete(i); break; end
    send(c, id, 0, 0);
  endtask

  ve_parm_t   got_ve [NPORT];
  logic [NPORT-1:0] got_ve_seen;
  task_parm_t got_up [NPORT];
  logic [NPORT-1:0] got_up_seen;

  always @(posedge clk) begin
    if (ve_valid) begin got_ve[ve_id] <= ve_parm; got_ve_seen[ve_id] <= 1'b1; end
    if (up_valid && up_ready) begin
      got_up[up_parm.task_id[1:0]] <= up_parm;
      got_up_seen[up_parm.task_id[1:0]] <= 1'b1;
    end
  end
  always @(negedge clk) up_ready <= ($urandom % 3) != 0;

  int runs = 0;
  task automatic run_and_check(string name);
    longint th, pi;
    logic ok;
    real bw_sum = 0.0;
    longint t0;
    got_ve_seen = '0; got_up_seen = '0;
    t0 = $time;
    // wait for a run to start and finish
    do @(posedge clk); while (!busy);
    do begin
      do @(posedge clk); while (!run_done);
      repeat (3) @(posedge clk);
    end while (busy);
    runs++;
    $display("%s: run took %0d cycles", name, ($time - t0) / 10);
    check({name, ": all four VEs written"}, got_ve_seen == 4'hF);
    check({name, ": all four tasks sent up"}, got_up_seen == 4'hF);
    for (int x = 0; x < NPORT; x++) begin
      ok = ref_select(x, th, pi);
      if (!ok) begin th = 0; pi = 0; end
      else bw_sum += real'(th) / real'(pi);
      $display("  VE %0d: expect (Theta=%0d, Pi=%0d) got (%0d, %0d)", x, th, pi,
               got_ve[x].theta, got_ve[x].pi);
      check($sformatf("%s: VE %0d theta", name, x), got_ve[x].theta == 32'(th));
      check($sformatf("%s: VE %0d pi", name, x), got_ve[x].pi == 32'(pi));
      check($sformatf("%s: up %0d", name, x),
            got_up[x].period == 32'(pi) && got_up[x].wcet == 32'(th));
      check($sformatf("%s: infeasible %0d", name, x),
            infeasible[x] == (!ok && ts[x].size() != 0));
    end
    check({name, ": overload"}, overload == (bw_sum > 1.0 + 1e-9));
  endtask

  initial begin
    rst_n = 0; tp_valid = 0; up_ready = 1;
    for (int c = 0; c < NPORT; c++) tp_parm[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // scenario 1
    add_task(0, 1, 10, 1);
    add_task(0, 2, 20, 2);
    add_task(1, 1, 16, 2);
    add_task(2, 7, 25, 3);
    add_task(2, 8, 40, 4);
    run_and_check("mixed");
    // scenario 2: change a task, delete another, add one to client 3
    add_task(3, 5, 12, 1);
    del_task(0, 2);
    ts[1][0].C = 3; send(1, 1, 16, 3);
    run_and_check("update");
    // scenario 3: over-utilised
    add_task(0, 3, 8, 3);
    add_task(1, 2, 10, 3);
    add_task(2, 9, 20, 6);
    add_task(3, 6, 24, 7);
    run_and_check("overload");
    check("table never dropped", !table_dropped);
    check("overload seen once", overload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
