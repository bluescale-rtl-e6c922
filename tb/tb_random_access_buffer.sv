// tb_random_access_buffer: self-checking test of the random access buffer.
// A reference model (a list of stored requests) predicts which request the
// arbiter must present: the one with the earliest deadline (every request
// gets a distinct deadline, so the tie rule is not exercised). Checks: out-of-
// order departure by deadline, full/empty flags, simultaneous load and pop,
// and that the arbiter result is visible one cycle after the load.
module tb_random_access_buffer;
  import bs_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, out_valid, pop;
  mem_req_t in_req, out_req;
  logic [DL_W-1:0] out_deadline;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  int checks = 0, failures = 0;

  random_access_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned model_dl [$];
  longint unsigned model_addr [$];
  int unsigned next_dl = 1000;

  function automatic int model_best();
    int b = -1;
    for (int i = 0; i < model_dl.size(); i++)
      if (b < 0 || model_dl[i] < model_dl[b]) b = i;
    return b;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input logic do_load, input logic do_pop);
    int b;
    logic [31:0] dl;
    // random but unique deadline: random high part, sequence number low part
    dl = 32'(($urandom % 1000) * 1024 + (next_dl % 1024));
    next_dl += 1;
    in_valid = do_load;
    in_req = '0;
    in_req.deadline = dl;
    in_req.addr = $urandom;
    b = model_best();
    pop = do_pop && (b >= 0);
    #1;
    check("in_ready", in_ready == (model_dl.size() < DEPTH));
    check("out_valid", out_valid == (b >= 0));
    if (b >= 0) begin
      check("arbiter deadline", out_deadline == 32'(model_dl[b]));
      check("fetcher addr", out_req.addr == 32'(model_addr[b]));
    end
    @(posedge clk);
    if (pop) begin model_dl.delete(b); model_addr.delete(b); end
    if (do_load && in_ready) begin model_dl.push_back(dl); model_addr.push_back(in_req.addr); end
    #1;
    check("occupancy", occupancy == ($bits(occupancy))'(model_dl.size()));
  endtask

  initial begin
    rst_n = 0; in_valid = 0; pop = 0; in_req = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // directed: three requests, latest deadline first
    in_valid = 1; in_req = '0;
    in_req.deadline = 300; in_req.addr = 3; @(posedge clk); #1;
    in_req.deadline = 100; in_req.addr = 1; @(posedge clk); #1;
    in_req.deadline = 200; in_req.addr = 2; @(posedge clk); #1;
    in_valid = 0;
    check("directed first out = earliest", out_valid && out_req.addr == 1);
    pop = 1; @(posedge clk); #1;
    check("directed second out", out_req.addr == 2);
    @(posedge clk); #1;
    check("directed third out", out_req.addr == 3);
    @(posedge clk); #1;
    pop = 0;
    check("directed empty", !out_valid);
    // fill completely
    for (int k = 0; k < DEPTH + 2; k++) cycle(1, 0);
    check("full", !in_ready);
    // random traffic
    for (int k = 0; k < 600; k++) cycle(($urandom % 3) != 0, ($urandom % 2) == 0);
    // drain
    for (int k = 0; k < DEPTH + 1; k++) cycle(0, 1);
    check("drained", !out_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
