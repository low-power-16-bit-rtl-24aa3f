// Register bank: NREGS registers of W bits with two combinational read ports
// (A and B) and two synchronous write ports (A and B). Write port B carries
// the upper half of 32-bit ALU results (multiply, divide); if both ports
// write the same register on one edge, port B wins. rst (synchronous,
// active high) clears every register. The bank's size (four 16-bit
// registers) and the second write port are this design's choices.
module register_file #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra_addr,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  ra_data,
  output logic [W-1:0]  rb_data,
  input  logic          wa_en,
  input  logic [AW-1:0] wa_addr,
  input  logic [W-1:0]  wa_data,
  input  logic          wb_en,
  input  logic [AW-1:0] wb_addr,
  input  logic [W-1:0]  wb_data
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (wa_en) regs[wa_addr] <= wa_data;
      if (wb_en) regs[wb_addr] <= wb_data;
    end
  end

  assign ra_data = regs[ra_addr];
  assign rb_data = regs[rb_addr];
endmodule
