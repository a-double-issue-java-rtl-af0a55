// tb_execute_stage: applies hand-built pairs to the execute stage and
// checks the top-of-stack registers, spill and store writes to the two RAM
// banks, fills from the read data, the ALU pairing with a store, the
// one-cycle multiply stall, branch resolution, the host service handshake
// (irq, ack, result in A), swap, dup, stjpc and the iinc1/iinc2 pair.
// Expected values are worked out by hand from the stack semantics.
module tb_execute_stage;
  import jp_pkg::*;
  logic clk = 0, rst_n = 1; always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  logic start = 0, host_ack = 0;
  ctl_t ctl;
  word_t rdata [2], host_result = 0, a_q, b_q, c_q, wdata [2];
  logic stall, branch, we [2], wr_sp, wr_vp, irq, halt;
  logic [5:0] waddr [2];
  addr_t target, wr_val;
  mcode_t irq_code;
  int checks = 0, failures = 0;
  execute_stage #(.BW(6)) dut (.*);

  task automatic chk(string s, logic c);
    checks++; if (!c) begin failures++; $display("FAIL %s (A=%0h B=%0h C=%0h)", s, a_q, b_q, c_q); end
  endtask
  function automatic ctl_t P(mcode_t m1, mcode_t m2, int v1 = 0, int v2 = 0, int spv = 10);
    ctl_t c; c = '0; c.mc1 = m1; c.mc2 = m2; c.val1 = v1; c.val2 = v2; c.sp = addr_t'(spv);
    c.src1 = SRC_IMM; c.src2 = SRC_IMM; c.f1_bank = 1'((spv - 3) & 1); c.f2_bank = !c.f1_bank;
    return c;
  endfunction
  logic seen_we [2]; logic [5:0] seen_a [2]; word_t seen_d [2]; logic seen_br; addr_t seen_t;
  int stall_cycles;
  // apply one pair until it commits; remember writes and branch of the commit cycle
  task automatic run(ctl_t c);
    ctl = c; stall_cycles = 0;
    @(negedge clk);
    while (stall) begin @(negedge clk); stall_cycles++; end
    seen_we = we; seen_a = waddr; seen_d = wdata; seen_br = branch; seen_t = target;
    @(posedge clk); #1;
    ctl = P(NOP, NOP);
  endtask

  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // host: answers service requests after two cycles
  initial forever begin
    @(posedge clk);
    if (irq && !host_ack) begin
      repeat (2) @(posedge clk);
      #1 host_result = (irq_code == IDIV) ? $signed(b_q) / $signed(a_q) : 32'h0;
      host_ack = 1; @(posedge clk); #1 host_ack = 0;
    end
  end

  initial begin
    ctl = P(NOP, NOP); rdata = '{0, 0};
    repeat (2) @(posedge clk); #1 rst_n = 1;
    start = 1; @(posedge clk); #1 start = 0;
    run(P(LDIMM0, LDIMM0, 5, 7, 10));                     // push 5, push 7
    chk("ld/ld", a_q == 7 && b_q == 5 && c_q == 0);
    chk("spill 2", seen_we[0] && seen_we[1] && seen_a[1] == 6'd4 && seen_a[0] == 6'd4);
    run(P(LDIMM0, NOP, 9, 0, 12));                        // push 9, spill old C to 10
    chk("ld", a_q == 9 && b_q == 7 && c_q == 5 && seen_we[0] && seen_a[0] == 6'd5 && !seen_we[1]);
    rdata = '{32'h111, 32'h222};
    run(P(AADD, NOP, 0, 0, 13));                          // 7+9, fill C from stack[10] (bank 0)
    chk("alu fill", a_q == 16 && b_q == 5 && c_q == 32'h111);
    begin
      ctl_t c; c = P(STVAL0 | 3, ASUB, 0, 0, 12); c.wa1 = 3;
      run(c);                                             // stval: 16 -> [3]; sub: C - B
      chk("store+sub", a_q == 32'h111 - 5 && b_q == 32'h222 && c_q == 32'h111);
      chk("store write", seen_we[1] && seen_a[1] == 6'd1 && seen_d[1] == 16);
    end
    rdata = '{0, 0};
    run(P(LDIMM0, NOP, 3, 0, 10));
    run(P(AMUL, NOP, 0, 0, 11));
    chk("mul", a_q == 3 * (32'h111 - 5) && stall_cycles == 1);
    run(P(LDIMM0, LDIMM0, 100, 7, 10));                   // A=7 B=100
    run(P(IDIV, NOP, 0, 0, 12));
    chk("idiv via host", a_q == 100 / 7 && b_q == 3 * (32'h111 - 5) && stall_cycles >= 2);
    run(P(LDIMM0, LDIMM0, 1, 2, 11));                     // A=2 B=1
    begin
      ctl_t c; c = P(IF_CMPEQ | 2, NOP, 0, 0, 13); c.target = 16'h3E;   // if_cmplt: 1 < 2
      run(c);
      chk("if_cmplt taken", seen_br && seen_t == 16'h3E);
      c = P(IFEQ, NOP, 0, 0, 11); c.target = 16'h50;                  // A = 14 != 0
      run(c);
      chk("ifeq not taken", !seen_br);
    end
    run(P(LDIMM0, LDIMM0, 4, 6, 10));
    run(P(SWAP, NOP));
    chk("swap", a_q == 4 && b_q == 6);
    run(P(DUP, NOP, 0, 0, 12));
    chk("dup", a_q == 4 && b_q == 4 && c_q == 6);
    run(P(STJPC, NOP));
    chk("stjpc", seen_br && seen_t == 16'd4);
    begin
      ctl_t c; c = P(IINC1, NOP, 2, 0, 13); c.src1 = SRC_BANK1; rdata = '{0, 32'd40};
      run(c);
      chk("iinc1", a_q == 2 && b_q == 40 && c_q == 4);
      c = P(IINC2, NOP, 0, 0, 15); c.wa1 = 7;
      run(c);
      chk("iinc2 write", seen_we[1] && seen_a[1] == 6'd3 && seen_d[1] == 42);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
