// Unified program and data memory: 2^AW words of DW bits on one address bus
// and one data bus (Von Neumann organisation). Instructions sit in the low
// 8 bits of a word. Read is combinational (rdata = mem[addr]); a write
// happens on the clock edge where we is high. A separate load port (ld_en,
// ld_addr, ld_data) writes the program while the processor is held in reset
// and has priority over we. Contents are not reset. Size and load port are
// this design's choices: 16 words follow from the 4-bit address registers.
module memory #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic [DW-1:0] ld_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_en)   mem[ld_addr] <= ld_data;
    else if (we) mem[addr]    <= wdata;
  end

  assign rdata = mem[addr];
endmodule
