// tb_pb_counter: self-checking test of the P/B countdown counter.
// Checks programming without disturbing the current value, reload while the
// reset port is 0, one decrement per enabled clock edge, no decrement while
// disabled, saturation at 0, and reset priority over enable. Expected values
// come from a simple reference model kept in the testbench.
module tb_pb_counter;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        prog_en, reset_n, en;
  logic [31:0] prog_val, value;
  int checks = 0, failures = 0;
  longint unsigned model_rv, model_cv;

  pb_counter #(.W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic p, input logic [31:0] pv, input logic rn, input logic e);
    prog_en = p; prog_val = pv; reset_n = rn; en = e;
    @(posedge clk);
    // reference model
    if (!rn) model_cv = model_rv;
    else if (e && model_cv != 0) model_cv = model_cv - 1;
    if (p) model_rv = pv;
    #1;
    checks++;
    if (value !== 32'(model_cv)) begin
      failures++;
      $display("FAIL: value=%0d expected=%0d", value, model_cv);
    end
  endtask

  initial begin
    rst_n = 1'b0; prog_en = 0; prog_val = 0; reset_n = 1; en = 0;
    model_rv = 0; model_cv = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    checks++; if (value !== 0) failures++;
    step(1, 32'd5, 1, 1);     // program: current stays 0 (saturated)
    step(0, 0, 0, 0);         // reload -> 5
    step(0, 0, 1, 1);         // 4
    step(0, 0, 1, 0);         // hold 4
    step(0, 0, 1, 1);         // 3
    step(1, 32'd9, 1, 1);     // program 9, current 2
    step(0, 0, 0, 1);         // reset wins -> 9
    for (int k = 0; k < 12; k++) step(0, 0, 1, 1);  // down to 0 and stays
    for (int k = 0; k < 200; k++)
      step(($urandom % 5) == 0, $urandom % 40, ($urandom % 7) != 0, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
