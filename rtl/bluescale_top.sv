// bluescale_top: the BlueScale memory interconnect, a quadtree of identical
// Scale Elements (SEs) between 4^LEVELS clients and one memory port.
//
// SE(x, y) is the y-th SE at depth x; SE(0,0) is the root and drives the
// memory port; the local client ports of SE(x, y) are SE(x+1, 4y) ..
// SE(x+1, 4y+3), and those of the deepest SEs are the system clients
// 4y .. 4y+3. The default LEVELS = 2 gives the 16-client system of 5 SEs;
// LEVELS = 3 gives 64 clients and 21 SEs.
//
// Each client has three ports: requests (with an absolute deadline used as
// priority), responses, and task parameters {task ID, period, execution
// time} of the tasks it runs. Task parameters propagate upwards: every SE
// turns the tasks of its clients into four server tasks and hands them to
// its parent as its own task set, so the root ends up with the four level-1
// server tasks, which are brought out on root_tp_*. The root's `overload`
// bit is the check that the memory is not over-utilised by them.
//
// Responses are routed back by the route field that the SEs filled on the
// way up (2 bits per level, client number = route[2*LEVELS-1:0] with the
// deepest SE's port in the top bits). The memory controller and DRAM are
// not part of this design: the mem_* port connects to them, and the memory
// must return the request's route and tag in its response.
// Per-SE status is brought out in flat arrays indexed by (4^x - 1)/3 + y.
module bluescale_top
  import bs_pkg::*;
#(
  parameter int unsigned LEVELS      = 2,
  parameter int unsigned RAB_DEPTH   = 8,
  parameter int unsigned TABLE_DEPTH = 16,
  localparam int unsigned NCLI = 4 ** LEVELS,
  localparam int unsigned NSE  = (4 ** LEVELS - 1) / 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // clients
  input  logic [NCLI-1:0]   cli_req_valid,
  output logic [NCLI-1:0]   cli_req_ready,
  input  mem_req_t          cli_req [NCLI],
  output logic [NCLI-1:0]   cli_rsp_valid,
  input  logic [NCLI-1:0]   cli_rsp_ready,
  output mem_rsp_t          cli_rsp [NCLI],
  input  logic [NCLI-1:0]   cli_tp_valid,
  output logic [NCLI-1:0]   cli_tp_ready,
  input  task_parm_t        cli_tp [NCLI],
  // memory sub-system
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_rsp_valid,
  output logic              mem_rsp_ready,
  input  mem_rsp_t          mem_rsp,
  // level-1 server tasks computed by the root SE
  output logic              root_tp_valid,
  output task_parm_t        root_tp,
  // per-SE status
  output logic [NPORT-1:0]  se_infeasible [NSE],
  output logic [NSE-1:0]    se_overload,
  output logic [NSE-1:0]    se_busy,
  output logic [NSE-1:0]    se_dropped,
  output logic [NPORT-1:0]  se_grant [NSE],
  output logic [NPORT-1:0]  se_budget_ok [NSE]
);
  // provider-side signals of every SE, flat index
  logic [NSE-1:0] up_req_valid, up_req_ready;
  mem_req_t       up_req [NSE];
  logic [NSE-1:0] up_rsp_valid, up_rsp_ready;
  mem_rsp_t       up_rsp [NSE];
  logic [NSE-1:0] up_tp_valid, up_tp_ready;
  task_parm_t     up_tp [NSE];

  if (2 * LEVELS > ROUTE_W) begin : g_bad_levels
    $error("bluescale_top: LEVELS too large for ROUTE_W");
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned BASE  = (4 ** l - 1) / 3;
    localparam int unsigned CBASE = (4 ** (l + 1) - 1) / 3;  // first child SE
    for (genvar y = 0; y < 4 ** l; y++) begin : g_se
      logic [NPORT-1:0] cl_req_valid, cl_req_ready;
      mem_req_t         cl_req [NPORT];
      logic [NPORT-1:0] cl_rsp_valid, cl_rsp_ready;
      mem_rsp_t         cl_rsp [NPORT];
      logic [NPORT-1:0] cl_tp_valid, cl_tp_ready;
      task_parm_t       cl_tp [NPORT];

      for (genvar p = 0; p < NPORT; p++) begin : g_port
        if (l == LEVELS - 1) begin : g_leaf
          localparam int unsigned C = 4 * y + p;
          assign cl_req_valid[p]  = cli_req_valid[C];
          assign cli_req_ready[C] = cl_req_ready[p];
          assign cl_req[p]        = cli_req[C];
          assign cli_rsp_valid[C] = cl_rsp_valid[p];
          assign cl_rsp_ready[p]  = cli_rsp_ready[C];
          assign cli_rsp[C]       = cl_rsp[p];
          assign cl_tp_valid[p]   = cli_tp_valid[C];
          assign cli_tp_ready[C]  = cl_tp_ready[p];
          assign cl_tp[p]         = cli_tp[C];
        end else begin : g_inner
          localparam int unsigned S = CBASE + 4 * y + p;
          assign cl_req_valid[p]  = up_req_valid[S];
          assign up_req_ready[S]  = cl_req_ready[p];
          assign cl_req[p]        = up_req[S];
          assign up_rsp_valid[S]  = cl_rsp_valid[p];
          assign cl_rsp_ready[p]  = up_rsp_ready[S];
          assign up_rsp[S]        = cl_rsp[p];
          assign cl_tp_valid[p]   = up_tp_valid[S];
          assign up_tp_ready[S]   = cl_tp_ready[p];
          assign cl_tp[p]         = up_tp[S];
        end
      end

      scale_element #(
        .RAB_DEPTH  (RAB_DEPTH),
        .TABLE_DEPTH(TABLE_DEPTH)
      ) u_se (
        .clk          (clk),
        .rst_n        (rst_n),
        .cl_req_valid (cl_req_valid),
        .cl_req_ready (cl_req_ready),
        .cl_req       (cl_req),
        .cl_rsp_valid (cl_rsp_valid),
        .cl_rsp_ready (cl_rsp_ready),
        .cl_rsp       (cl_rsp),
        .cl_tp_valid  (cl_tp_valid),
        .cl_tp_ready  (cl_tp_ready),
        .cl_tp        (cl_tp),
        .pv_req_valid (up_req_valid[BASE + y]),
        .pv_req_ready (up_req_ready[BASE + y]),
        .pv_req       (up_req[BASE + y]),
        .pv_rsp_valid (up_rsp_valid[BASE + y]),
        .pv_rsp_ready (up_rsp_ready[BASE + y]),
        .pv_rsp       (up_rsp[BASE + y]),
        .pv_tp_valid  (up_tp_valid[BASE + y]),
        .pv_tp_ready  (up_tp_ready[BASE + y]),
        .pv_tp        (up_tp[BASE + y]),
        .infeasible   (se_infeasible[BASE + y]),
        .overload     (se_overload[BASE + y]),
        .selector_busy(se_busy[BASE + y]),
        .table_dropped(se_dropped[BASE + y]),
        .grant        (se_grant[BASE + y]),
        .budget_ok    (se_budget_ok[BASE + y])
      );
    end
  end

  // root SE (flat index 0) to the memory port
  assign mem_req_valid   = up_req_valid[0];
  assign up_req_ready[0] = mem_req_ready;
  assign mem_req         = up_req[0];
  assign up_rsp_valid[0] = mem_rsp_valid;
  assign mem_rsp_ready   = up_rsp_ready[0];
  assign up_rsp[0]       = mem_rsp;
  assign root_tp_valid   = up_tp_valid[0];
  assign up_tp_ready[0]  = 1'b1;
  assign root_tp         = up_tp[0];

endmodule
