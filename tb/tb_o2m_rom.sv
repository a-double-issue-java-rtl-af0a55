// tb_o2m_rom: walks the three one-to-many sequences (newarray, iinc,
// iastore) two words at a time and checks microcodes and 'last' bits.
module tb_o2m_rom;
  import jp_pkg::*;
  logic [7:0] addr; mcode_t mc0, mc1; logic l0, l1;
  int checks = 0, failures = 0;
  o2m_rom dut (.addr(addr), .mc0(mc0), .last0(l0), .mc1(mc1), .last1(l1));
  task automatic chk(int a, mcode_t e0, logic el0, mcode_t e1, logic el1);
    addr = 8'(a); #1; checks++;
    if ({mc0, l0, mc1, l1} !== {e0, el0, e1, el1}) begin
      failures++; $display("FAIL addr %0d: %h %b %h %b", a, mc0, l0, mc1, l1);
    end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    chk(0, LDOPD, 0, NEWARRAY, 1);
    chk(2, IINC1, 0, IINC2, 1);
    chk(4, IASTORE, 0, POP, 0);
    chk(6, POP, 1, NOP, 1);
    chk(5, POP, 0, POP, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
