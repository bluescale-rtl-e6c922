// mem_model: behavioural model of the memory sub-system (memory controller
// and DRAM) for simulation only; it is not part of the interconnect.
// Accepts one request per cycle when not stalled (random stalls of
// STALL_PCT percent), answers after LATENCY cycles in order of arrival, and
// returns the request's tag and route. Read data is a fixed function of the
// address (addr ^ 32'h5A5A_5A5A), so a checker can predict it; a write is
// acknowledged with its own write data.
module mem_model
  import bs_pkg::*;
#(
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output mem_rsp_t rsp,
  output int       accepted,
  output int       stalls
);
  typedef struct { mem_rsp_t r; longint due; } pend_t;
  pend_t q [$];
  longint cyc;
  logic stall = 1'b1;

  assign req_ready = !stall && rst_n;
  // response outputs are registers, updated together with the queue
  logic     rsp_valid_q = 1'b0;
  mem_rsp_t rsp_q;
  assign rsp_valid = rsp_valid_q;
  assign rsp       = rsp_q;

  always @(negedge clk) stall <= ($urandom % 100) < STALL_PCT;

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      rsp_valid_q <= 1'b0;
      rsp_q    <= '0;
      cyc      <= 0;
      accepted <= 0;
      stalls   <= 0;
    end else begin
      cyc <= cyc + 1;
      if (rsp_valid && rsp_ready) q.pop_front();
      if (req_valid && !req_ready) stalls <= stalls + 1;
      if (req_valid && req_ready) begin
        pend_t p;
        p.r.rdata = req.we ? req.wdata : (req.addr ^ 32'h5A5A_5A5A);
        p.r.tag   = req.tag;
        p.r.route = req.route;
        p.due     = cyc + LATENCY;
        q.push_back(p);
        accepted <= accepted + 1;
      end
      rsp_valid_q <= (q.size() != 0) && (q[0].due <= cyc + 1);
      rsp_q       <= (q.size() != 0) ? q[0].r : '0;
    end
  end
endmodule
