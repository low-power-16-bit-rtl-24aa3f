// Top level: the 16-bit Vedic RISC processor on its address and data buses
// with a unified 16 x 16-bit program/data memory.
//
// To run a program, hold rst high, write the program and its data through
// the load port (ld_en, ld_addr, ld_data; one word per clock), then release
// rst: the processor starts fetching at address 0. dbg shows PC, IR, the Z
// flag, the ALU result and the control state. A program stops by jumping to
// itself (JMP to its own address). All ports are synchronous to clk; rst is
// active high.
module vedic_risc_system
  import risc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ld_en,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_data,
  output dbg_t              dbg
);
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_rdata, mem_wdata;
  logic              mem_we;

  processor u_cpu (
    .clk(clk), .rst(rst), .mem_addr(mem_addr), .mem_rdata(mem_rdata),
    .mem_we(mem_we), .mem_wdata(mem_wdata), .dbg(dbg));

  memory #(.AW(ADDR_W), .DW(DATA_W)) u_mem (
    .clk(clk), .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));
endmodule
