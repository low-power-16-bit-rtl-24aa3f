// Self-checking testbench for the address multiplexer: every combination of
// select, PC and MAR values is applied and the address bus compared.
module tb_address_mux;
  logic       sel_mar;
  logic [3:0] pc, mar, addr;
  int checks = 0, failures = 0;

  address_mux dut (.sel_mar(sel_mar), .pc(pc), .mar(mar), .addr(addr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < 16; p++)
        for (int m = 0; m < 16; m++) begin
          sel_mar = s[0]; pc = 4'(p); mar = 4'(m);
          #1;
          checks++;
          if (addr !== (s[0] ? mar : pc)) begin
            failures++;
            $display("FAIL sel=%0d pc=%0d mar=%0d addr=%0d", s, p, m, addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
