// pb_counter: the countdown counter that implements both the Period counter
// (P-counter) and the Budget counter (B-counter) of a server task.
//
// Two registers, as in the document: Reset_Value and Current_Value.
// Ports follow the document's four counter ports:
//   program port  (prog_en/prog_val): loads a new Reset_Value; the current
//                 value is left alone until the next reset.
//   reset port    (reset_n): while it is 0 at a rising clock edge the
//                 current value is reloaded from Reset_Value.
//   enable port   (en): at a rising clock edge the current value drops by one.
//   value port    (value): the current value.
// Choices of this design: reset has priority over enable; the counter stops
// at 0 instead of wrapping; a program and a reset in the same cycle reload the
// old Reset_Value. rst_n is the chip reset that clears both registers.
module pb_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         prog_en,
  input  logic [W-1:0] prog_val,
  input  logic         reset_n,
  input  logic         en,
  output logic [W-1:0] value
);
  logic [W-1:0] reset_value_q;
  logic [W-1:0] current_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reset_value_q <= '0;
      current_q     <= '0;
    end else begin
      if (prog_en) reset_value_q <= prog_val;
      if (!reset_n)
        current_q <= reset_value_q;
      else if (en && current_q != '0)
        current_q <= current_q - 1'b1;
    end
  end

  assign value = current_q;

endmodule
