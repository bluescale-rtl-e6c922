// tb_local_scheduler: self-checking test of the local scheduler.
// A cycle-level reference model of the four server tasks (period counter
// programmed with Pi-1, budget counter with Theta, both reloaded when the
// period counter is 0 and one cycle after programming, budget consumed per
// grant) predicts the grant of every
// cycle: the eligible client (budget left and request waiting) whose server
// has the earliest deadline, i.e. the smallest period counter. Phase 1 keeps
// all four queues full with total bandwidth 0.825 and checks that every
// server gets exactly Theta grants in every period (the document's
// guarantee of Theta time units every Pi); phase 2 uses random traffic,
// random back-pressure and a re-programming of the servers, checked against
// the model cycle by cycle.
module tb_local_scheduler;
  import bs_pkg::*;
  logic clk = 1'b0, rst_n;
  logic ve_valid;
  logic [1:0] ve_id;
  ve_parm_t ve_parm;
  logic [NPORT-1:0] q_valid, q_pop, budget_ok;
  mem_req_t q_req [NPORT];
  logic out_valid, out_ready;
  logic [1:0] out_port;
  mem_req_t out_req;
  logic [VAL_W-1:0] p_value [NPORT];
  logic [VAL_W-1:0] b_value [NPORT];
  int checks = 0, failures = 0;

  local_scheduler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  longint m_rp [NPORT], m_rb [NPORT], m_p [NPORT], m_b [NPORT];
  int win_cnt [NPORT];
  logic restart [NPORT];
  int exp_theta [NPORT];
  logic count_windows;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int model_sel();
    int s = -1;
    for (int x = 0; x < NPORT; x++)
      if (m_b[x] != 0 && q_valid[x] && (s < 0 || m_p[x] < m_p[s])) s = x;
    return s;
  endfunction

  task automatic cycle(input logic [NPORT-1:0] qv, input logic rdy,
                       input logic prog, input int pid, input int pi, input int th);
    int s;
    q_valid = qv; out_ready = rdy;
    ve_valid = prog; ve_id = 2'(pid); ve_parm = '{theta: th, pi: pi};
    #1;
    s = model_sel();
    check("out_valid", out_valid == (s >= 0));
    if (s >= 0) begin
      check("out_port", out_port == 2'(s));
      check("out_req mux", out_req.addr == 32'(s));
      check("pop", q_pop == ((rdy) ? (4'b1 << s) : 4'b0));
    end else check("no pop", q_pop == 0);
    for (int x = 0; x < NPORT; x++) begin
      check("p model", p_value[x] == 32'(m_p[x]));
      check("b model", b_value[x] == 32'(m_b[x]));
    end
    @(posedge clk);
    for (int x = 0; x < NPORT; x++) begin
      logic g;
      g = (s == x) && rdy;
      if (g) win_cnt[x]++;
      if (m_p[x] == 0 || restart[x]) begin
        if (count_windows && win_cnt[x] >= 0) check($sformatf("budget per period, server %0d", x), win_cnt[x] == exp_theta[x]);
        win_cnt[x] = 0;
        m_p[x] = m_rp[x];
        m_b[x] = m_rb[x];
      end else begin
        m_p[x] = m_p[x] - 1;
        if (g && m_b[x] != 0) m_b[x] = m_b[x] - 1;
      end
      restart[x] = prog && pid == x;
      if (prog && pid == x) begin
        m_rp[x] = longint'(pi) - 1;
        m_rb[x] = th;
        if (pi == 0) m_rp[x] = 64'hFFFF_FFFF;
      end
    end
    #1;
  endtask

  int pis [NPORT] = '{4, 8, 8, 10};
  int ths [NPORT] = '{1, 2, 1, 2};

  initial begin
    rst_n = 0; ve_valid = 0; q_valid = 0; out_ready = 0; ve_id = 0; ve_parm = '0;
    count_windows = 0;
    for (int x = 0; x < NPORT; x++) begin
      q_req[x] = '0; q_req[x].addr = 32'(x);
      m_rp[x] = 0; m_rb[x] = 0; restart[x] = 0; m_p[x] = 0; m_b[x] = 0; win_cnt[x] = 0;
      exp_theta[x] = ths[x];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // no budget yet: nothing may be granted
    cycle(4'hF, 1, 0, 0, 0, 0);
    check("idle without budget", 1'b1);
    for (int x = 0; x < NPORT; x++) cycle(4'hF, 1, 1, x, pis[x], ths[x]);
    for (int k = 0; k < 40; k++) cycle(4'hF, 1, 0, 0, 0, 0);
    // steady state: from the next period boundary on, count grants per period
    for (int x = 0; x < NPORT; x++) win_cnt[x] = -1000;
    count_windows = 1;
    for (int k = 0; k < 400; k++) begin
      cycle(4'hF, 1, 0, 0, 0, 0);
    end
    count_windows = 0;
    // random traffic, back-pressure and re-programming
    for (int k = 0; k < 1500; k++) begin
      logic pr;
      pr = ($urandom % 97) == 0;
      cycle(4'($urandom), ($urandom % 4) != 0, pr, $urandom % 4, 1 + $urandom % 12, $urandom % 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
