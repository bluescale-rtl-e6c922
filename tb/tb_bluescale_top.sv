// tb_bluescale_top: end-to-end test of the 16-client BlueScale tree (top at
// its default parameters: two levels, five Scale Elements) with a
// behavioural memory.
//
// Phase 1, interfaces: every client announces one or two tasks. The four
// leaf SEs must each send four server tasks to the root, and the root must
// produce the four level-1 server tasks. Both levels are compared with the
// exact reference model (isel_ref_pkg): the leaves against the client tasks,
// the root against the server tasks the leaves actually sent.
// Phase 2, traffic: all 16 clients issue reads and writes with random
// deadlines while the memory stalls at random. Every response must reach the
// client that sent it with its tag and the expected data, and the route bits
// at the memory must name the client.
// Phase 3, task change: one task leaves and one joins; the affected leaf and
// the root must recompute, and the results must again match the reference.
// Phase 4, overload: heavy tasks push the root beyond full bandwidth; the
// root's overload flag must match the reference sum of bandwidths.
// Mechanisms counted (each must occur): memory stalls, requests waiting on
// an exhausted budget, budget replenishments, responses returning out of
// issue order (EDF reordering), interface recomputation after a change, and
// the overload flag.
module tb_bluescale_top;
  import bs_pkg::*;
  localparam int LEVELS = 2;
  localparam int NCLI   = 16;
  localparam int NSE    = 5;

  logic clk = 1'b0, rst_n;
  logic [NCLI-1:0] cli_req_valid, cli_req_ready, cli_rsp_valid, cli_rsp_ready;
  logic [NCLI-1:0] cli_tp_valid, cli_tp_ready;
  mem_req_t   cli_req [NCLI];
  mem_rsp_t   cli_rsp [NCLI];
  task_parm_t cli_tp [NCLI];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic root_tp_valid;
  task_parm_t root_tp;
  logic [NPORT-1:0] se_infeasible [NSE];
  logic [NSE-1:0] se_overload, se_busy, se_dropped;
  logic [NPORT-1:0] se_grant [NSE];
  logic [NPORT-1:0] se_budget_ok [NSE];
  int mem_accepted, mem_stalls;
  int checks = 0, failures = 0;

  bluescale_top dut (.*);

  mem_model #(.LATENCY(6), .STALL_PCT(20)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .accepted(mem_accepted), .stalls(mem_stalls));

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ------------------------------------------------------------- tasks
  typedef isel_ref_pkg::rtask_t rtask_t;
  isel_ref_pkg::tq_t cli_tasks [NCLI];

  task automatic send_task(int c, int id, int T, int C);
    cli_tp[c] = '{task_id: 8'(id), period: 32'(T), wcet: 32'(C)};
    cli_tp_valid[c] = 1'b1;
    do @(posedge clk); while (!cli_tp_ready[c]);
    #1 cli_tp_valid[c] = 1'b0;
  endtask

  task automatic add_task(int c, int id, int T, int C);
    rtask_t r;
    r.id = id; r.T = T; r.C = C;
    cli_tasks[c].push_back(r);
    send_task(c, id, T, C);
  endtask

  task automatic del_task(int c, int id);
    foreach (cli_tasks[c][i]) if (cli_tasks[c][i].id == id) begin cli_tasks[c].delete(i); break; end
    send_task(c, id, 0, 0);
  endtask

  // server-task words seen on every provider port: [se][ve] = {Pi, Theta}
  longint up_pi [NSE][NPORT], up_th [NSE][NPORT];
  int up_words = 0, root_words = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 1; s < NSE; s++)
      if (dut.up_tp_valid[s] && dut.up_tp_ready[s]) begin
        up_pi[s][dut.up_tp[s].task_id[1:0]] = dut.up_tp[s].period;
        up_th[s][dut.up_tp[s].task_id[1:0]] = dut.up_tp[s].wcet;
        up_words++;
      end
    if (root_tp_valid) begin
      up_pi[0][root_tp.task_id[1:0]] = root_tp.period;
      up_th[0][root_tp.task_id[1:0]] = root_tp.wcet;
      root_words++;
    end
  end

  task automatic wait_quiet();
    int quiet = 0;
    while (quiet < 100) begin
      @(posedge clk);
      if (se_busy != 0 || cli_tp_valid != 0) quiet = 0; else quiet++;
    end
    #1;
  endtask

  function automatic longint gcd(longint a, longint b);
    while (b != 0) begin longint t = a % b; a = b; b = t; end
    return a;
  endfunction

  // compare one SE's four results with the reference
  task automatic check_se(int s, isel_ref_pkg::tq_t ts [NPORT], string what, output real bw);
    longint lcm = 1, ntot = 0, th, pi;
    logic ok;
    bw = 0.0;
    for (int x = 0; x < NPORT; x++) foreach (ts[x][i]) lcm = lcm / gcd(lcm, ts[x][i].T) * ts[x][i].T;
    for (int x = 0; x < NPORT; x++) ntot += isel_ref_pkg::num_of(ts[x], lcm);
    for (int x = 0; x < NPORT; x++) begin
      ok = isel_ref_pkg::ref_select(ts[x], ntot, lcm, th, pi);
      if (!ok) begin th = 0; pi = 0; end
      else bw += real'(th) / real'(pi);
      check($sformatf("%s: SE %0d VE %0d = (%0d,%0d), got (%0d,%0d)", what, s, x, th, pi,
                      up_th[s][x], up_pi[s][x]), up_th[s][x] == th && up_pi[s][x] == pi);
      check($sformatf("%s: SE %0d VE %0d infeasible bit", what, s, x),
            se_infeasible[s][x] == (!ok && ts[x].size() != 0));
    end
  endtask

  real root_bw;
  task automatic check_all(string what);
    isel_ref_pkg::tq_t ts [NPORT];
    real bw;
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < NPORT; x++) ts[x] = cli_tasks[4 * y + x];
      check_se(1 + y, ts, what, bw);
    end
    for (int y = 0; y < 4; y++) begin
      ts[y] = {};
      for (int x = 0; x < NPORT; x++) if (up_th[1 + y][x] != 0) begin
        rtask_t r;
        r.id = x; r.T = up_pi[1 + y][x]; r.C = up_th[1 + y][x];
        ts[y].push_back(r);
      end
    end
    check_se(0, ts, what, root_bw);
    check({what, ": root overload flag"}, se_overload[0] == (root_bw > 1.0 + 1e-9));
    $display("%s: root bandwidth %f, root VEs (%0d/%0d) (%0d/%0d) (%0d/%0d) (%0d/%0d)", what, root_bw,
             up_th[0][0], up_pi[0][0], up_th[0][1], up_pi[0][1], up_th[0][2], up_pi[0][2],
             up_th[0][3], up_pi[0][3]);
  endtask

  // ---------------------------------------------------------- traffic
  logic [31:0] exp_data [NCLI][int];
  int last_tag [NCLI];
  int outstanding = 0, rsp_err = 0, rsp_cnt = 0, route_err = 0, reorders = 0;
  int budget_blocks = 0, replenish = 0;
  logic [NPORT-1:0] bok_q [NSE];

  always @(negedge clk) cli_rsp_ready <= 16'($urandom) | 16'($urandom);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCLI; c++)
      if (cli_rsp_valid[c] && cli_rsp_ready[c]) begin
        int tg;
        tg = int'(cli_rsp[c].tag);
        rsp_cnt++;
        outstanding--;
        if (!exp_data[c].exists(tg) || exp_data[c][tg] != cli_rsp[c].rdata || cli_rsp[c].route != '0)
          rsp_err++;
        else exp_data[c].delete(tg);
        if (tg < last_tag[c]) reorders++;
        last_tag[c] = tg;
      end
    if (mem_req_valid && mem_req_ready)
      if (4 * int'(mem_req.route[1:0]) + int'(mem_req.route[3:2]) != int'(mem_req.addr[27:24]))
        route_err++;
    for (int s = 0; s < NSE; s++) begin
      for (int x = 0; x < NPORT; x++) begin
        if (!bok_q[s][x] && se_budget_ok[s][x]) replenish++;
      end
      bok_q[s] = se_budget_ok[s];
    end
    for (int c = 0; c < NCLI; c++)
      if (cli_req_valid[c] && !se_budget_ok[1 + c / 4][c % 4]) budget_blocks++;
  end

  int seq [NCLI];
  int threads_done;
  task automatic issue(int c);
    mem_req_t r;
    r = '0;
    r.addr = {4'h0, 4'(c), 24'($urandom)};
    r.we = $urandom % 2;
    r.wdata = $urandom;
    r.deadline = 32'($time / 10) + 32'($urandom % 400);
    r.tag = 8'(seq[c]);
    seq[c] = (seq[c] + 1) % 256;
    cli_req[c] = r;
    cli_req_valid[c] = 1'b1;
    do @(posedge clk); while (!cli_req_ready[c]);
    exp_data[c][int'(r.tag)] = r.we ? r.wdata : (r.addr ^ 32'h5A5A_5A5A);
    outstanding++;
    #1 cli_req_valid[c] = 1'b0;
  endtask

  task automatic traffic(int per_client);
    threads_done = 0;
    for (int c = 0; c < NCLI; c++) last_tag[c] = -1;
    for (int c = 0; c < NCLI; c++) begin
      fork
        automatic int cc = c;
        begin
          // a client without tasks has no server budget and is not served
          for (int k = 0; k < per_client && cli_tasks[cc].size() != 0; k++) begin
            issue(cc);
            repeat ($urandom % 3) @(posedge clk);
            #1;
          end
          threads_done++;
        end
      join_none
    end
    wait (threads_done == NCLI);
    repeat (400) @(posedge clk);
    #1;
  endtask

  int words_before;
  initial begin
    rst_n = 0; cli_req_valid = 0; cli_tp_valid = 0;
    for (int c = 0; c < NCLI; c++) begin
      cli_req[c] = '0; cli_tp[c] = '0; seq[c] = 0;
    end
    for (int s = 0; s < NSE; s++) begin
      bok_q[s] = '0;
      for (int x = 0; x < NPORT; x++) begin up_pi[s][x] = 0; up_th[s][x] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // phase 1: task sets (utilisation about 0.35 in total)
    for (int c = 0; c < NCLI; c++) begin
      int periods [4] = '{40, 48, 60, 80};
      add_task(c, 1, periods[c % 4], 1);
      if (c % 3 == 0) add_task(c, 2, 120, 1);
    end
    wait_quiet();
    check("leaves sent server tasks", up_words >= 16);
    check("root produced level-1 server tasks", root_words >= 4);
    check_all("phase 1");
    check("no table overflow", se_dropped == 0);

    // phase 2: traffic
    traffic(60);
    check("all responses returned", outstanding == 0);
    check("responses reach the right client with the right data", rsp_err == 0);
    check("response count", rsp_cnt == 60 * NCLI);
    check("all memory requests answered", mem_accepted == 60 * NCLI);
    check("route bits name the client", route_err == 0);

    // phase 3: a task leaves, another joins
    words_before = root_words;
    del_task(5, 1);
    add_task(9, 3, 12, 1);
    wait_quiet();
    check("root recomputed after the change", root_words > words_before);
    check_all("phase 3");
    traffic(20);
    check("phase 3 responses correct", rsp_err == 0 && outstanding == 0);

    // phase 4: overload
    for (int c = 0; c < NCLI; c += 2) add_task(c, 4, 20, 1);
    wait_quiet();
    check_all("phase 4");
    check("root overload raised", se_overload[0]);

    $display("mechanisms: stalls=%0d budget_blocks=%0d replenish=%0d reorders=%0d root_words=%0d",
             mem_stalls, budget_blocks, replenish, reorders, root_words);
    check("memory stall happened", mem_stalls > 0);
    check("request waited on exhausted budget", budget_blocks > 0);
    check("budget replenishment happened", replenish > 0);
    check("EDF reordering happened", reorders > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
