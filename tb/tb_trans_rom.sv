// tb_trans_rom: checks the translation of representative bytecodes: kind
// (one-to-one or one-to-many), microcode or ROM address, and the number
// of operand bytes that follow, against the JVM definitions.
module tb_trans_rom;
  import jp_pkg::*;
  logic [7:0] bc, data; tkind_t kind; logic [1:0] nopd;
  int checks = 0, failures = 0;
  trans_rom dut (.bc(bc), .kind(kind), .data(data), .nopd(nopd));
  task automatic chk(int b, tkind_t k, int d, int n);
    bc = 8'(b); #1; checks++;
    if (kind !== k || data !== 8'(d) || nopd !== 2'(n)) begin
      failures++; $display("FAIL bc %h: %0d %h %0d", b, kind, data, nopd);
    end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    chk(8'h00, K_O2O, NOP, 0);
    chk(8'h02, K_O2O, LDIMM8 | 4, 0);
    chk(8'h05, K_O2O, LDIMM0 | 2, 0);
    chk(8'h10, K_O2O, LDOPD, 1);
    chk(8'h11, K_O2O, LDOPD2, 2);
    chk(8'h15, K_O2O, LDVAL_OPD, 1);
    chk(8'h1c, K_O2O, LDVAL0 | 2, 0);
    chk(8'h3e, K_O2O, STVAL0 | 3, 0);
    chk(8'h36, K_O2O, STVAL_OPD, 1);
    chk(8'h60, K_O2O, AADD, 0);
    chk(8'h64, K_O2O, ASUB, 0);
    chk(8'h68, K_O2O, AMUL, 0);
    chk(8'h7c, K_O2O, AUSHR, 0);
    chk(8'h84, K_O2M, 2, 2);
    chk(8'h4f, K_O2M, 4, 0);
    chk(8'hbc, K_O2M, 0, 1);
    chk(8'h9c, K_O2O, IFEQ | 3, 2);
    chk(8'ha2, K_O2O, IF_CMPEQ | 3, 2);
    chk(8'ha7, K_O2O, GOTO, 2);
    chk(8'h6c, K_O2O, IDIV, 0);
    chk(8'hb1, K_O2O, RETURN, 0);
    chk(8'hb8, K_O2O, INVOKE, 2);
    chk(8'h5f, K_O2O, SWAP, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
