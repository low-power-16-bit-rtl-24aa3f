// Program counter: an AW-bit register holding the address of the next
// instruction. On a clock edge it loads din when load is high, otherwise
// steps by one when inc is high (wrapping at 2^AW). rst (synchronous,
// active high) sets it to 0. The 4-bit width matches the four flip-flops of
// the original program counter; load-over-increment priority is this
// design's choice.
module program_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          inc,
  input  logic          load,
  input  logic [AW-1:0] din,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= din;
    else if (inc)  pc <= pc + 1'b1;
  end
endmodule
