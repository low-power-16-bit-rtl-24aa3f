// Memory address register (MAR): holds the AW-bit address used for data
// accesses (loads and stores). It captures din on a clock edge where load is
// high and holds otherwise; rst (synchronous, active high) clears it. In the
// processor din is the address field of the current instruction.
module memory_address_register #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [AW-1:0] din,
  output logic [AW-1:0] mar
);
  always_ff @(posedge clk) begin
    if (rst)       mar <= '0;
    else if (load) mar <= din;
  end
endmodule
