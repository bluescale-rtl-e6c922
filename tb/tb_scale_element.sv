// tb_scale_element: self-checking test of one Scale Element with a
// behavioural memory on its provider port.
//
// The four clients first announce their tasks; the interface selector must
// then program all four server tasks and send four server-task words
// upwards. Then:
//  * EDF reordering: with the memory stalled, client 0 queues six requests
//    with decreasing deadlines; they may not leave in arrival order, and a
//    monitor checks at every grant that the granted request has the earliest
//    deadline of those waiting in its random access buffer.
//  * Random traffic from all four clients with random memory stalls: every
//    response must come back to the client that sent it, with its tag and
//    the data the memory model produces for its address; the route bits seen
//    at the memory must name the sending port; and no server may receive more
//    grants in one period than its budget Theta.
//  * Latency: with the SE idle and budget available, a request accepted at
//    one clock edge is on the provider port right after the next edge (the
//    single-cycle scheduling decision, then the output buffer).
// Every grant, every request at the memory, every response and every
// finished server period is a check of its own.
module tb_scale_element;
  import bs_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [NPORT-1:0] cl_req_valid, cl_req_ready, cl_rsp_valid, cl_rsp_ready;
  logic [NPORT-1:0] cl_tp_valid, cl_tp_ready, infeasible, grant, budget_ok;
  mem_req_t cl_req [NPORT];
  mem_rsp_t cl_rsp [NPORT];
  task_parm_t cl_tp [NPORT];
  logic pv_req_valid, pv_req_ready, pv_rsp_valid, pv_rsp_ready, pv_tp_valid, pv_tp_ready;
  mem_req_t pv_req;
  mem_rsp_t pv_rsp;
  task_parm_t pv_tp;
  logic overload, selector_busy, table_dropped;
  int checks = 0, failures = 0;
  int mem_accepted, mem_stalls;
  logic mem_hold;
  logic mem_ready_raw;

  scale_element dut (.*, .pv_req_ready(pv_req_ready));

  mem_model #(.LATENCY(3), .STALL_PCT(25)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .req_valid(pv_req_valid && !mem_hold), .req_ready(mem_ready_raw), .req(pv_req),
    .rsp_valid(pv_rsp_valid), .rsp_ready(pv_rsp_ready), .rsp(pv_rsp),
    .accepted(mem_accepted), .stalls(mem_stalls));
  assign pv_req_ready = mem_ready_raw && !mem_hold;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // --- parameter path
  int up_words = 0;
  assign pv_tp_ready = 1'b1;
  always @(posedge clk) if (pv_tp_valid) up_words++;

  task automatic send_task(int c, int id, int T, int C);
    cl_tp[c] = '{task_id: 8'(id), period: 32'(T), wcet: 32'(C)};
    cl_tp_valid[c] = 1'b1;
    do @(posedge clk); while (!cl_tp_ready[c]);
    #1 cl_tp_valid[c] = 1'b0;
  endtask

  // --- budget monitor: grants per period of every server
  int win [NPORT];
  int theta_cap [NPORT];
  always @(posedge clk) if (rst_n && dut.ve_valid) theta_cap[dut.ve_id] = int'(dut.ve_parm.theta);
  int win_viol = 0, budget_blocks = 0;
  always @(posedge clk) if (rst_n) begin
    for (int x = 0; x < NPORT; x++) begin
      if (grant[x]) win[x]++;
      if (dut.u_sched.p_value[x] == 0) begin
        if (win[x] > theta_cap[x]) win_viol++;
        if (win[x] != 0) check($sformatf("server %0d: %0d grants within budget %0d", x, win[x], theta_cap[x]),
                               win[x] <= theta_cap[x]);
        win[x] = 0;
      end
      if (cl_req_valid[x] && !budget_ok[x]) budget_blocks++;
    end
  end

  // --- EDF monitor: every granted request has the earliest deadline of the
  // requests that were waiting in its random access buffer
  logic [31:0] waiting [NPORT][$];
  int edf_err = 0, edf_grants = 0, reorders = 0;
  always @(posedge clk) if (rst_n) begin
    for (int x = 0; x < NPORT; x++) begin
      if (grant[x]) begin
        int m;
        m = -1;
        foreach (waiting[x][i]) if (m < 0 || waiting[x][i] < waiting[x][m]) m = i;
        edf_grants++;
        check($sformatf("port %0d grant has the earliest waiting deadline", x),
              m >= 0 && waiting[x][m] == dut.q_req[x].deadline);
        if (m < 0 || waiting[x][m] != dut.q_req[x].deadline) edf_err++;
        else begin
          if (m != 0) reorders++;
          waiting[x].delete(m);
        end
      end
      if (cl_req_valid[x] && cl_req_ready[x]) waiting[x].push_back(cl_req[x].deadline);
    end
  end

  // --- memory side: route check and EDF-order capture
  int route_err = 0;
  logic [31:0] mem_order [$];
  always @(posedge clk) if (pv_req_valid && pv_req_ready) begin
    if (pv_req.route[1:0] != pv_req.addr[29:28]) route_err++;
    check("route bits name the port", pv_req.route[1:0] == pv_req.addr[29:28]);
    mem_order.push_back(pv_req.deadline);
  end

  // --- response checking
  logic [31:0] exp_data [NPORT][int];
  int outstanding = 0, rsp_err = 0, rsp_cnt = 0;
  always @(negedge clk) cl_rsp_ready <= 4'($urandom);
  always @(posedge clk) if (rst_n) for (int c = 0; c < NPORT; c++)
    if (cl_rsp_valid[c] && cl_rsp_ready[c]) begin
      rsp_cnt++;
      check($sformatf("response to client %0d matches its request", c),
            exp_data[c].exists(int'(cl_rsp[c].tag)) && exp_data[c][int'(cl_rsp[c].tag)] == cl_rsp[c].rdata &&
            cl_rsp[c].route == '0);
      if (!exp_data[c].exists(int'(cl_rsp[c].tag)) || exp_data[c][int'(cl_rsp[c].tag)] != cl_rsp[c].rdata ||
          cl_rsp[c].route != '0) begin
        rsp_err++;
        $display("bad rsp @%0t c=%0d tag=%0d data=%h route=%h exists=%0d", $time, c, cl_rsp[c].tag,
                 cl_rsp[c].rdata, cl_rsp[c].route, exp_data[c].exists(int'(cl_rsp[c].tag)));
      end
      else exp_data[c].delete(int'(cl_rsp[c].tag));
      outstanding--;
    end

  int seq [NPORT];
  int threads_done = 0;
  task automatic issue(int c, logic [31:0] dl);
    mem_req_t r;
    r = '0;
    r.addr = {2'b00, 2'(c), 28'($urandom)};
    r.we = $urandom % 2;
    r.wdata = $urandom;
    r.deadline = dl;
    r.tag = 8'(seq[c]);
    seq[c]++;
    cl_req[c] = r;
    cl_req_valid[c] = 1'b1;
    do @(posedge clk); while (!cl_req_ready[c]);
    exp_data[c][int'(r.tag)] = r.we ? r.wdata : (r.addr ^ 32'h5A5A_5A5A);
    outstanding++;
    #1 cl_req_valid[c] = 1'b0;
  endtask

  initial begin
    rst_n = 0; cl_req_valid = 0; cl_tp_valid = 0; mem_hold = 0;
    for (int c = 0; c < NPORT; c++) begin cl_req[c] = '0; cl_tp[c] = '0; seq[c] = 0; win[c] = 0; theta_cap[c] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send_task(0, 1, 10, 2);
    send_task(1, 1, 20, 2);
    send_task(2, 1, 16, 2);
    send_task(3, 1, 40, 4);
    do @(posedge clk); while (!selector_busy);
    do @(posedge clk); while (selector_busy);
    repeat (2) @(posedge clk); #1;
    check("four server tasks sent up", up_words == 4);
    check("no infeasible VE", infeasible == 0);
    check("no overload", !overload);
    for (int x = 0; x < NPORT; x++)
      check($sformatf("server %0d programmed", x),
            theta_cap[x] != 0);

    // EDF reordering inside the random access buffer
    mem_hold = 1;
    repeat (20) @(posedge clk);   // let the budget replenish
    #1;
    mem_order.delete();
    for (int k = 0; k < 6; k++) issue(0, 32'(600 - 100 * k));
    repeat (40) @(posedge clk);
    #1 mem_hold = 0;
    wait (mem_order.size() == 6);
    $display("memory order: %0d %0d %0d %0d %0d %0d", mem_order[0], mem_order[1], mem_order[2],
             mem_order[3], mem_order[4], mem_order[5]);
    check("requests left out of arrival order", mem_order[5] != 100);
    check("EDF choice at every grant so far", edf_err == 0);

    // latency: one cycle of scheduling decision, then the output buffer
    while (outstanding != 0 || !budget_ok[1]) @(posedge clk);
    #1;
    issue(1, 32'd5);
    check("request not at the provider port in its acceptance cycle", !pv_req_valid);
    @(posedge clk); #1;
    check("request at the provider port one cycle after acceptance", pv_req_valid);
    while (outstanding != 0) @(posedge clk);
    #1;

    // random traffic from all four clients
    for (int c = 0; c < NPORT; c++) begin
      fork
        automatic int cc = c;
        begin
          for (int k = 0; k < 150; k++) begin
            issue(cc, 32'($urandom % 5000));
            repeat ($urandom % 4) @(posedge clk);
            #1;
          end
          threads_done++;
        end
      join_none
    end
    wait (threads_done == NPORT);
    repeat (300) @(posedge clk);
    check("all responses returned", outstanding == 0);
    check("responses correct (client, tag, data)", rsp_err == 0);
    check("responses counted", rsp_cnt == 7 + 600);
    check("route bits name the port", route_err == 0);
    check("grants never exceed budget per period", win_viol == 0);
    check("budget exhaustion happened", budget_blocks > 0);
    check("EDF choice at every grant", edf_err == 0 && edf_grants == 607);
    check("out-of-order departures happened", reorders > 0);
    check("memory stalls happened", mem_stalls > 0);
    $display("mem_accepted=%0d", mem_accepted);
    $display("edf_err=%0d edf_grants=%0d rsp_err=%0d reorders=%0d", edf_err, edf_grants, rsp_err, reorders);
    $display("responses=%0d budget_blocks=%0d stalls=%0d", rsp_cnt, budget_blocks, mem_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
