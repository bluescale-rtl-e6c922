// local_scheduler: the upper-level priority queue of a Scale Element.
//
// Four server tasks tau^A..tau^D, one per local client, each made of a
// P-counter (period Pi) and a B-counter (budget Theta), both pb_counter.
// The P-counter counts every clock cycle (one cycle is one transaction time
// unit); its value drives its own reset port and that of its B-counter, so
// when it reaches 0 both reload: the server's budget is replenished to Theta
// once every Pi cycles. To make that interval exactly Pi cycles the
// P-counter's reset value is programmed as Pi-1. The B-counter counts down
// once for every request granted to its client.
//
// Budget check: B-counter value compared with 0 gives one "has budget" bit per
// server task (4 bits). A client is eligible if it has budget and its random
// access buffer holds a request. Among eligible clients the one whose server
// task has the earliest deadline wins, the deadline of a server task being the
// end of its current period, i.e. the smallest P-counter value (ties go to the
// lower client index). The winner's request goes through the multiplexer; the
// whole decision is combinational, one grant per cycle at most.
//
// Programming: ve_valid with ve_id selects a server task; ve_parm = {Theta,
// Pi} ([63:32] Theta, [31:0] Pi) is written into the reset values. One cycle
// later the server is restarted (both counters reload), so a new interface
// starts a fresh period at once; this restart is this design's choice (the
// document does not say when new values take effect) and it also revives a
// server that was disabled. Theta = 0 disables the server.
//
// Timing: grant is combinational from q_valid/out_ready in the same cycle;
// the B-counter drops at the following edge.
module local_scheduler
  import bs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // interface from the interface selector (parameter path)
  input  logic                  ve_valid,
  input  logic [1:0]            ve_id,
  input  ve_parm_t              ve_parm,
  // heads of the four random access buffers
  input  logic [NPORT-1:0]      q_valid,
  input  mem_req_t              q_req [NPORT],
  output logic [NPORT-1:0]      q_pop,
  // towards the local provider (through the SE's output buffer)
  output logic                  out_valid,
  output logic [1:0]            out_port,
  output mem_req_t              out_req,
  input  logic                  out_ready,
  // observation
  output logic [NPORT-1:0]      budget_ok,
  output logic [VAL_W-1:0]      p_value [NPORT],
  output logic [VAL_W-1:0]      b_value [NPORT]
);
  logic [NPORT-1:0] prog;
  logic [NPORT-1:0] restart_q;   // programmed in the previous cycle
  logic [NPORT-1:0] b_en;

  always_ff @(posedge clk) begin
    if (!rst_n) restart_q <= '0;
    else        restart_q <= prog;
  end

  for (genvar x = 0; x < NPORT; x++) begin : g_server
    assign prog[x] = ve_valid && (ve_id == 2'(x));

    pb_counter #(.W(VAL_W)) u_p_counter (
      .clk     (clk),
      .rst_n   (rst_n),
      .prog_en (prog[x]),
      .prog_val(ve_parm.pi - 1'b1),
      .reset_n (p_value[x] != '0 && !restart_q[x]),
      .en      (1'b1),
      .value   (p_value[x])
    );

    pb_counter #(.W(VAL_W)) u_b_counter (
      .clk     (clk),
      .rst_n   (rst_n),
      .prog_en (prog[x]),
      .prog_val(ve_parm.theta),
      .reset_n (p_value[x] != '0 && !restart_q[x]),
      .en      (b_en[x]),
      .value   (b_value[x])
    );

    assign budget_ok[x] = (b_value[x] != '0);
    assign b_en[x]      = q_pop[x];
  end

  // Scheduling circuit: earliest server deadline among eligible clients.
  logic [NPORT-1:0] eligible;
  logic [1:0]       sel;
  logic             any;
  logic [VAL_W-1:0] best_p;
  always_comb begin
    eligible = budget_ok & q_valid;
    sel      = '0;
    any      = 1'b0;
    best_p   = '1;
    for (int x = 0; x < NPORT; x++) begin
      if (eligible[x] && (!any || p_value[x] < best_p)) begin
        sel    = 2'(x);
        any    = 1'b1;
        best_p = p_value[x];
      end
    end
  end

  assign out_valid = any;
  assign out_port  = sel;
  assign out_req   = q_req[sel];

  always_comb begin
    q_pop = '0;
    if (any && out_ready) q_pop[sel] = 1'b1;
  end

  a_grant_has_budget: assert property (@(posedge clk) disable iff (!rst_n)
                                       (q_pop & ~budget_ok) == '0)
    else $error("local_scheduler: grant without budget");
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(q_pop))
    else $error("local_scheduler: more than one grant");

endmodule
