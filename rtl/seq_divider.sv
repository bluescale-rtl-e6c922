// seq_divider: unsigned restoring divider, one quotient bit per cycle.
// Used by the interface selector's ALU. A start pulse loads dividend and
// divisor; W cycles later done pulses for one cycle with quotient and
// remainder, which then stay stable until the next start. A zero divisor
// gives an all-ones quotient and the dividend as remainder.
// The document gives the selector only an ALU; a sequential divider, rather
// than a combinational one, is this design's choice. The partial remainder
// register is W+1 bits wide for the trial subtraction; its top bit is never
// read after the subtraction, which lint reports as unused.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0]         d_q;
  logic [W:0]           rem_q;
  logic [W-1:0]         quo_q;
  logic [$clog2(W+1)-1:0] cnt_q;

  logic [W:0] shifted;
  logic [W:0] diff;
  assign shifted = {rem_q[W-1:0], quo_q[W-1]};
  assign diff    = shifted - {1'b0, d_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      rem_q <= '0;
      quo_q <= '0;
      d_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        cnt_q <= ($bits(cnt_q))'(W);
        rem_q <= '0;
        quo_q <= dividend;
        d_q   <= divisor;
      end else if (busy) begin
        if (!diff[W]) begin
          rem_q <= diff;
          quo_q <= {quo_q[W-2:0], 1'b1};
        end else begin
          rem_q <= shifted;
          quo_q <= {quo_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q[W-1:0];

endmodule
