// random_access_buffer: the low-level priority queue of a Scale Element.
//
// Unlike a FIFO, any stored request can leave first. DEPTH slots form the
// register bank; each holds one request, its parameter (the absolute deadline,
// "T" in the queue bank) and a valid bit; the slot number is the request's
// identifier ("#"). The loader writes an incoming request into the lowest
// free slot. The arbiter is a tree of comparators and multiplexers that keeps
// looking at every valid slot and forwards the identifier of the one with the
// earliest deadline (ties go to the lower slot number) to the fetcher, which
// presents that request to the local scheduler. A pop frees the slot.
//
// Interface: in_valid/in_ready/in_req from the local client; out_valid,
// out_req (with out_deadline) and pop towards the local scheduler.
// Timing: the arbiter is combinational, so a request loaded at edge n is a
// candidate from cycle n on (visible after that edge) and can be popped in
// the same cycle it is visible. Load and pop may happen in the same cycle.
// The document gives the structure; the depth, the use of the deadline as
// the parameter and the tie rule are this design's choices.
module random_access_buffer
  import bs_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // loader side
  input  logic            in_valid,
  output logic            in_ready,
  input  mem_req_t        in_req,
  // fetcher side
  output logic            out_valid,
  output mem_req_t        out_req,
  output logic [DL_W-1:0] out_deadline,
  input  logic            pop,
  // status
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  mem_req_t          bank  [DEPTH];
  logic [DEPTH-1:0]  valid_q;

  // Loader: lowest free slot.
  logic [IW-1:0] free_idx;
  logic          has_free;
  always_comb begin
    free_idx = '0;
    has_free = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free_idx = IW'(i);
        has_free = 1'b1;
      end
    end
  end
  assign in_ready = has_free;

  // Arbiter: linear comparator chain over the register bank, earliest
  // deadline wins, strict "<" keeps the lower slot on a tie.
  logic [IW-1:0]   best_idx;
  logic            best_valid;
  logic [DL_W-1:0] best_dl;
  always_comb begin
    best_idx   = '0;
    best_valid = 1'b0;
    best_dl    = '1;
    for (int i = 0; i < DEPTH; i++) begin
      if (valid_q[i] && (!best_valid || bank[i].deadline < best_dl)) begin
        best_idx   = IW'(i);
        best_valid = 1'b1;
        best_dl    = bank[i].deadline;
      end
    end
  end

  // Fetcher
  assign out_valid    = best_valid;
  assign out_req      = bank[best_idx];
  assign out_deadline = best_dl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (pop && best_valid) valid_q[best_idx] <= 1'b0;
      if (in_valid && has_free) valid_q[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && has_free) bank[free_idx] <= in_req;
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) occupancy = occupancy + ($bits(occupancy))'(valid_q[i]);
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> best_valid)
    else $error("random_access_buffer: pop while empty");

endmodule
