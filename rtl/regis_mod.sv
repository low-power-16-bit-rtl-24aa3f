// Output register of the Vedic MAC: a W-bit register with synchronous,
// active-high reset to zero, loading its input on every clock edge where
// en is high. The 33-bit width is the one shown for the MAC's register; the
// enable (so a product can be held while the operands change) and the reset
// style are this design's choices.
module regis_mod #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] inp,
  output logic [W-1:0] oup
);
  always_ff @(posedge clk) begin
    if (rst)     oup <= '0;
    else if (en) oup <= inp;
  end
endmodule
