// Self-checking testbench for the control unit. For every opcode, with the
// Z flag clear and set, it holds the instruction steady, lets the state
// machine run one whole instruction from FETCH back to FETCH, and compares
// the control signals of every state with an independently written table.
// It also checks the instruction's cycle count: 4 for ALU operations, 3 for
// LDA/STA, 2 for JMP, JZ and the unused codes.
module tb_control_unit;
  import risc_pkg::*;
  logic       clk = 1'b0, rst, zero;
  logic [7:0] ir;
  ctrl_t      ctrl, exp;
  cpu_state_t state;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst(rst), .ir(ir), .zero(zero), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  function automatic ctrl_t expected(int st, int opc, logic z, logic [7:0] instr);
    ctrl_t c = '0;
    c.alu_op = instr[7:4];
    case (st)
      0: begin c.ir_load = 1; c.pc_inc = 1; end
      1: begin c.mar_load = 1; c.pc_load = (opc == 12) || (opc == 13 && z); end
      2: begin
        if (opc <= 9) c.alu_en = 1;
        if (opc == 10) begin c.addr_sel = 1; c.rf_wa_en = 1; c.rf_wa_mem = 1; end
        if (opc == 11) begin c.addr_sel = 1; c.mem_we = 1; end
      end
      default: begin c.rf_wa_en = 1; c.rf_wb_en = (opc == 2) || (opc == 3); end
    endcase
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ir = '0; zero = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int opc = 0; opc < 16; opc++) begin
      for (int z = 0; z < 2; z++) begin
        int cycles, exp_cycles;
        ir = {4'(opc), 4'($urandom)}; zero = z[0];
        exp_cycles = (opc <= 9) ? 4 : (opc <= 11) ? 3 : 2;
        cycles = 0;
        checks++;
        if (state !== S_FETCH) begin failures++; $display("FAIL not in FETCH at start, opc %0d", opc); end
        do begin
          #1;
          exp = expected(cycles, opc, z[0], ir);
          checks++;
          if (ctrl !== exp) begin
            failures++;
            $display("FAIL opc=%0d z=%0d step=%0d ctrl=%b exp=%b", opc, z, cycles, ctrl, exp);
          end
          @(posedge clk); #1;
          cycles++;
        end while (state != S_FETCH && cycles < 10);
        checks++;
        if (cycles != exp_cycles) begin
          failures++;
          $display("FAIL opc=%0d took %0d cycles, expected %0d", opc, cycles, exp_cycles);
        end
      end
    end
    // reset in the middle of an instruction returns to FETCH
    ir = {OP_ADD, 4'h0};
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (state !== S_FETCH) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
