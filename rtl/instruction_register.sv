// Instruction register (IR): holds the IW-bit instruction fetched from
// memory while it is decoded and executed. Captures din on a clock edge
// where load is high; rst (synchronous, active high) clears it to 0. The
// 8-bit width matches the eight flip-flops of the original IR.
module instruction_register #(
  parameter int unsigned IW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [IW-1:0] din,
  output logic [IW-1:0] ir
);
  always_ff @(posedge clk) begin
    if (rst)       ir <= '0;
    else if (load) ir <= din;
  end
endmodule
