// tb_decode_stage: presents microcode pairs to the decode stage and checks
// the pairing decision (fetch_one) for each structure-hazard rule, the
// registered control (slots, immediates, load sources, store addresses),
// the RAM read addresses of local loads and of fills, SP tracking, the
// branch destination of a goto at 0x35 with offset 9 (0x3E), the values
// pushed by ldjpc, ldbc and ldvp, the hold and pointer write of stvp, the
// bubble after stsp, the iinc1/iinc2 address hand-over, stall and flush.
module tb_decode_stage;
  import jp_pkg::*;
  logic clk = 0, rst_n = 1; always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  logic start = 0, stall = 0, flush = 0, wr_sp = 0, wr_vp = 0, fetch_one, hold;
  addr_t init_sp = 0, init_vp = 0, wr_val = 0, sp, vp;
  instr_t instr1 = INSTR_NOP, instr2 = INSTR_NOP;
  logic [2:0] opd_cnt_o; logic [5:0] raddr [2]; ctl_t ctl;
  int checks = 0, failures = 0;
  decode_stage #(.BW(6)) dut (.*);

  task automatic chk(string s, logic c);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic instr_t I(mcode_t m, int opd = 0, int pc = 0);
    instr_t t; t.mc = m; t.opd = 16'(opd); t.bc = 8'h00; t.pc = addr_t'(pc); return t;
  endfunction
  // drive a pair, check the pairing decision, clock it in
  task automatic issue(instr_t a, instr_t b, logic exp_one);
    instr1 = a; instr2 = b; #1;
    chk($sformatf("fetch_one %h/%h", a.mc, b.mc), fetch_one == exp_one);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    init_sp = 20; init_vp = 4; start = 1; @(posedge clk); #1 start = 0;
    chk("init", sp == 20 && vp == 4);
    // load + load from different banks: paired, local read at vp+1 = 5
    instr1 = I(LDIMM0 | 3); instr2 = I(LDVAL0 | 1); #1;
    chk("raddr local", raddr[1] == 6'd2);
    issue(I(LDIMM0 | 3), I(LDVAL0 | 1), 0);
    chk("ctl ld/ld", ctl.mc1 == (LDIMM0 | 3) && ctl.val1 == 3 && ctl.src1 == SRC_IMM && ctl.src2 == SRC_BANK1);
    chk("sp +2", sp == 22);
    issue(I(AADD), I(AMUL), 1);
    chk("alu/alu split", ctl.mc1 == AADD && ctl.mc2 == NOP && sp == 21);
    issue(I(LDIMM8 | 4), I(AADD), 1);
    chk("immROM -1", ctl.val1 == 32'hFFFFFFFF && ctl.mc2 == NOP);
    issue(I(AADD), I(LDIMM0 | 1), 0);
    chk("alu/load paired", ctl.mc2 == (LDIMM0 | 1) && sp == 22);
    issue(I(LDVAL0 | 0), I(LDVAL0 | 2), 1);           // vp+0, vp+2 same bank
    issue(I(STVAL0 | 0), I(STVAL0 | 2), 1);
    chk("store addr", ctl.wa1 == 4);
    issue(I(GOTO), I(LDIMM0), 1);
    issue(I(NOP), I(GOTO, 16'h0009, 16'h35), 0);
    issue(I(LDOPD, 5), I(LDOPD2, 16'h8001), 1);
    chk("ldopd sext", ctl.val1 == 5);
    issue(I(LDOPD2, 16'h8001), I(NOP), 0);
    chk("ldopd2 sext", ctl.val1 == 32'hFFFF8001);
    // branch destination: goto at 0x35 with offset 9
    issue(I(GOTO, 16'h0009, 16'h35), I(NOP), 0);
    chk("target 3E", ctl.target == 16'h3E);
    // store + store: stack shrinks by two, fills at sp-3 and sp-4
    begin
      addr_t s0; s0 = sp;
      instr1 = I(STVAL0 | 0); instr2 = I(STVAL0 | 1); #1;
      chk("fill addrs", raddr[(s0 - 3) & 1] == 6'((s0 - 3) >> 1) && raddr[(s0 - 4) & 1] == 6'((s0 - 4) >> 1));
      issue(I(STVAL0 | 0), I(STVAL0 | 1), 0);
      chk("sp -2", sp == s0 - 2 && ctl.f1_bank == 1'((s0 - 3) & 1));
    end
    // ldsp in slot 2 sees the pointer after slot 1
    begin
      addr_t s0; s0 = sp;
      issue(I(LDIMM0), I(LDSP), 0);
      chk("ldsp", ctl.val2 == 32'(s0 + 1));
    end
    // ldjpc / ldbc / ldvp push the bytecode's address, the bytecode itself
    // and the variable pointer
    begin
      instr_t a, b;
      a = I(LDJPC, 0, 16'h77); b = I(LDBC, 0, 16'h78); b.bc = 8'hB6;
      issue(a, b, 0);
      chk("ldjpc/ldbc", ctl.val1 == 32'h77 && ctl.val2 == 32'hB6 && ctl.src1 == SRC_IMM);
      issue(I(LDVP), I(NOP), 0);
      chk("ldvp", ctl.val1 == 32'd4);
    end
    // stvp splits and holds like stsp; the new pointer arrives from execute
    issue(I(STVP), I(LDIMM0), 1);
    chk("hold after stvp", hold == 1);
    wr_vp = 1; wr_val = 9; instr1 = I(NOP); instr2 = I(NOP);
    @(posedge clk); #1 wr_vp = 0;
    chk("vp written", vp == 9 && hold == 0);
    wr_vp = 1; wr_val = 4; @(posedge clk); #1 wr_vp = 0;  // back to 4 for iinc
    // stsp in slot 1 splits, then one bubble
    issue(I(STSP), I(LDIMM0), 1);
    chk("hold after stsp", hold == 1);
    wr_sp = 1; wr_val = 40; instr1 = I(LDIMM0); instr2 = I(NOP);
    @(posedge clk); #1 wr_sp = 0;
    chk("bubble", ctl.mc1 == NOP && hold == 0 && sp == 40);
    // iinc1 / iinc2
    issue(I(IINC1, 16'h0305), I(IINC2), 1);
    chk("iinc1", ctl.val1 == 5 && ctl.src1 == SRC_BANK1 && sp == 42);
    issue(I(IINC2), I(NOP), 0);
    chk("iinc2 addr", ctl.wa1 == 7 && sp == 40);
    // stall keeps everything, flush drops the pair
    stall = 1; issue(I(LDIMM0), I(LDIMM0), 0);
    chk("stall", ctl.mc1 == IINC2 && sp == 40);
    stall = 0; flush = 1; issue(I(LDIMM0), I(LDIMM0), 0);
    chk("flush", ctl.mc1 == NOP && ctl.mc2 == NOP && sp == 40);
    flush = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
