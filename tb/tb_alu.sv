// Self-checking testbench for the ALU: for every operation code, random and
// corner operands are applied with en high for one clock; the registered
// result and Z flag are then compared with a reference model written with
// SystemVerilog operators. Also checks that the result holds while en is low
// (one-cycle latency, hold behaviour).
module tb_alu;
  import risc_pkg::*;
  logic        clk = 1'b0, rst, en, zero;
  logic [3:0]  op;
  logic [15:0] a, b;
  logic [31:0] result;
  int checks = 0, failures = 0;

  alu dut (.clk(clk), .rst(rst), .en(en), .op(op), .a(a), .b(b), .result(result), .zero(zero));

  always #5 clk = ~clk;

  function automatic logic [31:0] model(logic [3:0] o, logic [15:0] x, logic [15:0] y);
    logic [16:0] s;
    case (o)
      OP_ADD: begin s = {1'b0, x} + {1'b0, y}; return 32'(s); end
      OP_SUB: return 32'(16'(x - y));
      OP_MUL: return 32'(x) * 32'(y);
      OP_DIV: return (y == 0) ? {x, 16'hFFFF} : {16'(x % y), 16'(x / y)};
      OP_AND: return 32'(x & y);
      OP_OR:  return 32'(x | y);
      OP_XOR: return 32'(x ^ y);
      OP_NOT: return 32'(16'(~y));
      OP_SHL: return 32'(16'(x << y[3:0]));
      OP_SHR: return 32'(16'(x >> y[3:0]));
      default: return 32'd0;
    endcase
  endfunction

  task automatic run(logic [3:0] o, logic [15:0] x, logic [15:0] y);
    logic [31:0] e;
    op = o; a = x; b = y; en = 1'b1;
    e = model(o, x, y);
    @(posedge clk); #1;
    en = 1'b0;
    checks += 2;
    if (result !== e) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d got %h exp %h", o, x, y, result, e);
    end
    if (zero !== (e == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL Z op=%0d a=%0d b=%0d", o, x, y);
    end
    // result must hold while en is low and the operands change
    a = 16'($urandom); b = 16'($urandom);
    @(posedge clk); #1;
    checks++;
    if (result !== e) begin
      failures++;
      if (failures < 10) $display("FAIL hold op=%0d", o);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; op = '0; a = '0; b = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    // corner cases: carry out, borrow, zero results, divide by zero
    run(OP_ADD, 16'hFFFF, 16'h0001);
    run(OP_SUB, 16'd5, 16'd5);
    run(OP_SUB, 16'd3, 16'd5);
    run(OP_MUL, 16'd252, 16'd846);
    run(OP_MUL, 16'd0, 16'd846);
    run(OP_MUL, 16'hFFFF, 16'hFFFF);
    run(OP_DIV, 16'd1212, 16'd4);
    run(OP_DIV, 16'd7, 16'd0);
    run(OP_AND, 16'hF0F0, 16'h0F0F);
    run(OP_NOT, 16'd0, 16'hFFFF);
    run(OP_SHL, 16'h8001, 16'd1);
    run(OP_SHR, 16'h8001, 16'd15);
    for (int i = 0; i < 2000; i++) begin
      for (int o = 0; o < 10; o++) begin
        logic [15:0] x, y;
        x = 16'($urandom);
        y = (i % 4 == 0) ? 16'($urandom_range(0, 15)) : 16'($urandom);
        run(4'(o), x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
