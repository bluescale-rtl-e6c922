// sync_fifo: small synchronous FIFO with a valid/ready interface on both
// sides, used as the SE's output buffer and the response buffers behind the
// demultiplexer. DEPTH entries held in a register array; the head is read
// combinationally, so data written in cycle n can leave in cycle n+1.
// A push into a full FIFO is refused (in_ready low); a pop and a push in the
// same cycle are allowed when the FIFO is full. These buffers, their
// depth and their handshake are this design's choices, not the document's.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                  mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [AW:0]       count;
  logic              do_push, do_pop;

  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign do_pop    = out_valid && out_ready;
  assign in_ready  = (count < (AW+1)'(DEPTH)) || do_pop;
  assign do_push   = in_valid && in_ready;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

endmodule
