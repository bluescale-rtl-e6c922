// scale_element: one 4-to-1 Scale Element (SE) of the BlueScale quadtree.
//
// Four local client ports (a system client or a child SE) and one local
// provider port (the memory, or the parent SE). Three paths:
//   request path:  every client port feeds its own random_access_buffer
//                  (low-level priority queue, earliest request deadline first);
//                  the local_scheduler (upper-level priority queue, server
//                  tasks with period/budget counters) picks one buffer per
//                  cycle; the chosen request gets the 2-bit port number pushed
//                  into its route field and waits in a small output buffer
//                  for the provider port.
//   parameter path: task parameters from the four client ports go to the
//                  interface_selector, which programs the server tasks of the
//                  local scheduler and forwards the four resulting server
//                  tasks (Pi, Theta) to the provider port as task parameters
//                  for the parent SE.
//   response path:  a demultiplexer pops the low 2 route bits of a response
//                  and steers it into a 2-entry buffer of that client port.
// All ports are valid/ready. Latency of the request path: a request accepted
// at edge n can be granted in cycle n+1 and leave the output buffer in cycle
// n+2. The response path adds one cycle.
// Structure after the document; the buffer depths, the route encoding and
// the handshakes are this design's choices.
// The counter values (p_value, b_value) of the local scheduler and the
// run_done pulse of the interface selector are observation outputs used by
// those blocks' own tests; the SE leaves them unconnected or unread, which
// lint reports and which is intended.
module scale_element
  import bs_pkg::*;
#(
  parameter int unsigned RAB_DEPTH   = 8,
  parameter int unsigned TABLE_DEPTH = 16,
  parameter int unsigned OBUF_DEPTH  = 2,
  parameter int unsigned RBUF_DEPTH  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // local client ports
  input  logic [NPORT-1:0]  cl_req_valid,
  output logic [NPORT-1:0]  cl_req_ready,
  input  mem_req_t          cl_req [NPORT],
  output logic [NPORT-1:0]  cl_rsp_valid,
  input  logic [NPORT-1:0]  cl_rsp_ready,
  output mem_rsp_t          cl_rsp [NPORT],
  input  logic [NPORT-1:0]  cl_tp_valid,
  output logic [NPORT-1:0]  cl_tp_ready,
  input  task_parm_t        cl_tp [NPORT],
  // local provider port
  output logic              pv_req_valid,
  input  logic              pv_req_ready,
  output mem_req_t          pv_req,
  input  logic              pv_rsp_valid,
  output logic              pv_rsp_ready,
  input  mem_rsp_t          pv_rsp,
  output logic              pv_tp_valid,
  input  logic              pv_tp_ready,
  output task_parm_t        pv_tp,
  // status
  output logic [NPORT-1:0]  infeasible,
  output logic              overload,
  output logic              selector_busy,
  output logic              table_dropped,
  output logic [NPORT-1:0]  grant,
  output logic [NPORT-1:0]  budget_ok
);
  // ------------------------------------------------------- request path
  logic [NPORT-1:0] q_valid, q_pop;
  mem_req_t         q_req [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_rab
    logic [DL_W-1:0]                      unused_dl;
    logic [$clog2(RAB_DEPTH+1)-1:0]       unused_occ;
    random_access_buffer #(.DEPTH(RAB_DEPTH)) u_rab (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (cl_req_valid[p]),
      .in_ready    (cl_req_ready[p]),
      .in_req      (cl_req[p]),
      .out_valid   (q_valid[p]),
      .out_req     (q_req[p]),
      .out_deadline(unused_dl),
      .pop         (q_pop[p]),
      .occupancy   (unused_occ)
    );
  end

  logic       ve_valid;
  logic [1:0] ve_id;
  ve_parm_t   ve_parm;
  logic       sch_valid, sch_ready;
  logic [1:0] sch_port;
  mem_req_t   sch_req, obuf_in;
  logic [VAL_W-1:0] p_value [NPORT];
  logic [VAL_W-1:0] b_value [NPORT];

  local_scheduler u_sched (
    .clk      (clk),
    .rst_n    (rst_n),
    .ve_valid (ve_valid),
    .ve_id    (ve_id),
    .ve_parm  (ve_parm),
    .q_valid  (q_valid),
    .q_req    (q_req),
    .q_pop    (q_pop),
    .out_valid(sch_valid),
    .out_port (sch_port),
    .out_req  (sch_req),
    .out_ready(sch_ready),
    .budget_ok(budget_ok),
    .p_value  (p_value),
    .b_value  (b_value)
  );
  assign grant = q_pop;

  always_comb begin
    obuf_in       = sch_req;
    obuf_in.route = {sch_req.route[ROUTE_W-3:0], sch_port};
  end

  sync_fifo #(.T(mem_req_t), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sch_valid),
    .in_ready (sch_ready),
    .in_data  (obuf_in),
    .out_valid(pv_req_valid),
    .out_ready(pv_req_ready),
    .out_data (pv_req)
  );

  // ----------------------------------------------------- parameter path
  interface_selector #(.TABLE_DEPTH(TABLE_DEPTH)) u_isel (
    .clk          (clk),
    .rst_n        (rst_n),
    .tp_valid     (cl_tp_valid),
    .tp_ready     (cl_tp_ready),
    .tp_parm      (cl_tp),
    .ve_valid     (ve_valid),
    .ve_id        (ve_id),
    .ve_parm      (ve_parm),
    .up_valid     (pv_tp_valid),
    .up_ready     (pv_tp_ready),
    .up_parm      (pv_tp),
    .busy         (selector_busy),
    .run_done     (),
    .infeasible   (infeasible),
    .overload     (overload),
    .table_dropped(table_dropped)
  );

  // ------------------------------------------------------ response path
  logic [1:0]       rsp_port;
  mem_rsp_t         rsp_down;
  logic [NPORT-1:0] rbuf_ready;

  assign rsp_port       = pv_rsp.route[1:0];
  always_comb begin
    rsp_down       = pv_rsp;
    rsp_down.route = {2'b00, pv_rsp.route[ROUTE_W-1:2]};
  end
  assign pv_rsp_ready = rbuf_ready[rsp_port];

  for (genvar p = 0; p < NPORT; p++) begin : g_rbuf
    sync_fifo #(.T(mem_rsp_t), .DEPTH(RBUF_DEPTH)) u_rbuf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (pv_rsp_valid && rsp_port == 2'(p)),
      .in_ready (rbuf_ready[p]),
      .in_data  (rsp_down),
      .out_valid(cl_rsp_valid[p]),
      .out_ready(cl_rsp_ready[p]),
      .out_data (cl_rsp[p])
    );
  end

endmodule
