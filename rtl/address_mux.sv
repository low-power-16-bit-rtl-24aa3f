// Address multiplexer: drives the address bus from the program counter
// (instruction fetch, sel_mar = 0) or from the memory address register
// (data load or store, sel_mar = 1). Purely combinational; not registering
// the address is this design's choice.
module address_mux #(
  parameter int unsigned AW = 4
) (
  input  logic          sel_mar,
  input  logic [AW-1:0] pc,
  input  logic [AW-1:0] mar,
  output logic [AW-1:0] addr
);
  always_comb addr = sel_mar ? mar : pc;
endmodule
