// tb_pi_demo: runs the pi spigot program (32 decimal digits of pi, in
// eight groups of four) on the full processor at its default parameters.
//
// The program is the classic integer spigot: an array f of 113 ints is
// filled with a/5 (a = 10000), then for c = 112, 98, ..., 14 an inner loop
// over idx = c..1 does d += f[idx]*a; f[idx] = d % --g; d /= g--; and
// d *= idx-1, after which the group e + d/a is produced. The bytecode is
// written here by hand, the way javac compiles that source, with two
// changes that keep it inside what this processor runs by itself: the
// initialisation method is inlined (no invoke) and each printed group is
// stored into a second array instead of being printed. The static field a
// (10000) is read with getstatic through a small runtime image, as in the
// original. Array creation, array access, division and remainder go to
// the host, which this bench models; for getstatic the host only
// acknowledges once the processor has resolved the field.
//
// Checks: the eight groups (3141 5926 5358 9793 2384 6264 3383 2795, also
// recomputed here with the same integer arithmetic), the final locals, and
// the number of host services of each kind, getstatic included. The
// service counts of the array, divide and remainder bytecodes are those of
// the original program plus the eight extra array stores and the second
// newarray. The run length in cycles, with and without the host waits
// (which include the resolver's walk for getstatic), is printed with the
// cycles per bytecode, which must stay below 1.1 outside the host waits.
module tb_pi_demo;
  import jp_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic start = 0, code_we = 0, stk_we = 0, host_ack = 0;
  addr_t init_jpc = 0, init_vp = 0, init_sp = 0;
  logic [9:0] code_waddr = 0;
  logic [7:0] code_wdata = 0;
  logic [6:0] stk_addr = 0;
  word_t stk_wdata = 0, stk_rdata, host_result = 0, tos_a, tos_b, tos_c;
  logic irq, running;
  mcode_t irq_code;

  addr_t cp_base = 0;
  logic res_done;
  logic [7:0] res_tag;
  addr_t res_direct, res_code_addr;
  logic [15:0] res_arg_cnt, res_max_stack, res_max_locals;
  word_t res_field;

  java_cpu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- program -----------------------------------------------
  // locals: 0 idx, 1 c, 2 e, 3 f, 4 d, 5 g, 6 output index, 7 output array
  byte unsigned prog [$];
  task automatic e(input int b); prog.push_back(8'(b)); endtask
  task automatic ga(); e(8'hb2); e(8'h00); e(8'h02); endtask   // getstatic a
  task automatic br(input int op, input int tgt);
    int off;
    off = tgt - prog.size();
    e(op); e(off >> 8); e(off & 255);
  endtask

  int l1, l2, l3, l4, l5, l6, lend;

  task automatic build();
    prog.delete();
    e(8'h03); e(8'h3b);                                   // idx = 0
    e(8'h10); e(112); e(8'h3c);                           // c = 112
    e(8'h03); e(8'h3d);                                   // e = 0
    e(8'h11); e(0); e(113); e(8'hbc); e(10); e(8'h4e);    // f = new int[113]
    e(8'h10); e(8); e(8'hbc); e(10); e(8'h3a); e(7);      // out = new int[8]
    e(8'h03); e(8'h36); e(6);                             // k = 0
    l1 = prog.size();                                     // while (idx - c != 0)
    e(8'h1a); e(8'h1b); e(8'h64); br(8'h99, l2);
    e(8'h2d); e(8'h1a); e(8'h84); e(0); e(1);             //   f[idx++] = a / 5
    ga(); e(8'h08); e(8'h6c); e(8'h4f);
    br(8'ha7, l1);
    l2 = prog.size();
    e(8'h03); e(8'h3b);                                   // idx = 0
    l3 = prog.size();                                     // while ((g = c*2) != 0)
    e(8'h1b); e(8'h05); e(8'h68); e(8'h59); e(8'h36); e(5); br(8'h99, lend);
    e(8'h03); e(8'h36); e(4);                             //   d = 0
    e(8'h1b); e(8'h3b);                                   //   idx = c
    l4 = prog.size();                                     //   for (; idx > 0; )
    e(8'h1a); br(8'h9e, l5);
    e(8'h15); e(4); e(8'h2d); e(8'h1a); e(8'h2e);         //     d += f[idx] * a
    ga(); e(8'h68); e(8'h60); e(8'h36); e(4);
    e(8'h2d); e(8'h1a); e(8'h15); e(4);                   //     f[idx] = d % --g
    e(8'h84); e(5); e(8'hff); e(8'h15); e(5); e(8'h70); e(8'h4f);
    e(8'h15); e(4); e(8'h15); e(5);                       //     d /= g--
    e(8'h84); e(5); e(8'hff); e(8'h6c); e(8'h36); e(4);
    e(8'h1a); e(8'h04); br(8'ha4, l6);                    //     if (idx > 1)
    e(8'h15); e(4); e(8'h1a); e(8'h04); e(8'h64); e(8'h68); e(8'h36); e(4); // d *= idx-1
    l6 = prog.size();
    e(8'h84); e(0); e(8'hff); br(8'ha7, l4);              //     idx--
    l5 = prog.size();
    e(8'h1b); e(8'h10); e(14); e(8'h64); e(8'h3c);        //   c -= 14
    e(8'h19); e(7); e(8'h15); e(6); e(8'h84); e(6); e(1); //   out[k++] = e + d / a
    e(8'h1c); e(8'h15); e(4); ga(); e(8'h6c); e(8'h60); e(8'h4f);
    e(8'h15); e(4); ga(); e(8'h70); e(8'h3d); // e = d % a
    br(8'ha7, l3);
    lend = prog.size();
    e(8'hb1);                                             // return
  endtask

  // runtime image: constant-pool entry 2 -> item 0x0180 (Fieldref, class 3,
  // name-and-type 0x0010) -> field entry 0x01C0, whose data space holds
  // the static field a = 10000
  localparam int CP_BASE = 'h100;
  byte unsigned img [int];
  task automatic put16(int a, int v); img[a] = 8'(v >> 8); img[a + 1] = 8'(v); endtask
  task automatic build_image();
    put16(CP_BASE + 8 + 2 * 2, 'h0180);
    img[CP_BASE + 'h180] = 8'h09; put16(CP_BASE + 'h181, 'h0003); put16(CP_BASE + 'h183, 'h0010);
    put16(CP_BASE + 'h185, 'h01c0);
    put16(CP_BASE + 'h1c0, 'h0008); put16(CP_BASE + 'h1c2, 'h0005);
    put16(CP_BASE + 'h1c4, 'h0006); put16(CP_BASE + 'h1c6, 'h0000);
    put16(CP_BASE + 'h1c8, 'h0000); put16(CP_BASE + 'h1ca, 10000);
  endtask

  // ---------------- host model ---------------------------------------------
  word_t heap [0:1023];
  int heap_top = 16;
  int n_newarray = 0, n_iastore = 0, n_iaload = 0, n_idiv = 0, n_irem = 0, n_getstatic = 0,
      n_other = 0;
  int wait_cycles = 0;
  int arrays [$];

  initial begin
    forever begin
      @(posedge clk);
      if (irq && !host_ack && running) begin
        unique case (irq_code)
          IDIV: begin n_idiv++; host_result = $signed(tos_b) / $signed(tos_a); end
          IREM: begin n_irem++; host_result = $signed(tos_b) % $signed(tos_a); end
          NEWARRAY: begin
            n_newarray++;
            for (int k = 0; k < int'(tos_b); k++) heap[heap_top + k] = 0;
            host_result = heap_top;
            arrays.push_back(heap_top);
            heap_top += int'(tos_b);
          end
          IASTORE: begin
            n_iastore++; heap[tos_c + tos_b] = tos_a; host_result = 0;
            if (trace) $display("iastore [%0d+%0d] = %0d", tos_c, tos_b, $signed(tos_a));
          end
          IALOAD:  begin n_iaload++; host_result = heap[tos_b + tos_a]; end
          GETSTATIC: begin                // the processor pushes the value itself
            while (!res_done) @(posedge clk);
            n_getstatic++; host_result = 0;
          end
          RETURN:  host_result = 0;
          default: begin n_other++; host_result = 0; end
        endcase
        #1 host_ack = 1;
        @(posedge clk);
        #1 host_ack = 0;
      end
    end
  end

  int cycles = 0;
  always @(posedge clk) if (running) begin
    cycles++;
    if (irq) wait_cycles++;
  end

  bit trace;
  initial trace = $test$plusargs("trace");
  always @(posedge clk) if (trace && running)
    $display("%0t jpc=%h i1=%h i2=%h ctl=%h,%h sp=%0d A=%0d B=%0d C=%0d br=%b irq=%b",
      $time, dut.jpc, dut.i1.mc, dut.i2.mc, dut.ctl.mc1, dut.ctl.mc2, dut.ctl.sp,
      $signed(tos_a), $signed(tos_b), $signed(tos_c), dut.branch, irq);

  // ---------------- watchdog ------------------------------------------------
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ----------------------------------------------
  int ref_out [8];
  int ref_c, ref_e, ref_d, ref_g, ref_idx;
  task automatic reference();
    int f [113];
    int k = 0;
    ref_c = 112; ref_e = 0; ref_idx = 0;
    for (int i = 0; i < 112; i++) f[i] = 10000 / 5;
    f[112] = 0;
    ref_idx = 0;
    while ((ref_g = ref_c * 2) != 0) begin
      ref_d = 0;
      for (ref_idx = ref_c; ref_idx > 0; ref_idx--) begin
        ref_d += f[ref_idx] * 10000;
        ref_g--; f[ref_idx] = ref_d % ref_g;
        ref_d /= ref_g; ref_g--;
        if (ref_idx > 1) ref_d *= (ref_idx - 1);
      end
      ref_c -= 14;
      ref_out[k++] = ref_e + ref_d / 10000;
      ref_e = ref_d % 10000;
    end
  endtask

  // ---------------- run -----------------------------------------------------
  initial begin
    int bytecodes;
    int pi_groups [8] = '{3141, 5926, 5358, 9793, 2384, 6264, 3383, 2795};
    build();
    build();                            // second pass with the real labels
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (prog[k]) begin
      #1 code_we = 1; code_waddr = 10'(k); code_wdata = prog[k];
      @(posedge clk);
    end
    build_image();
    foreach (img[a]) begin
      #1 code_we = 1; code_waddr = 10'(a); code_wdata = img[a];
      @(posedge clk);
    end
    #1 code_we = 0;
    cp_base = addr_t'(CP_BASE);
    init_jpc = 16'd0; init_vp = 16'd0; init_sp = 16'd10;  // 8 locals + 2 guard words
    start = 1;
    @(posedge clk);
    #1 start = 0;
    wait (running == 0);
    @(posedge clk);
    check("arrays created", arrays.size(), 2);
    for (int k = 0; k < 8; k++) begin
      check($sformatf("group %0d vs reference", k), heap[arrays[1] + k], ref_out[k]);
      check($sformatf("group %0d vs pi", k), heap[arrays[1] + k], pi_groups[k]);
    end
    begin
      int exp_l [7];
      exp_l = '{ref_idx, ref_c, ref_e, arrays[0], ref_d, 0, 8};
      for (int k = 0; k < 7; k++) begin
        #1 stk_addr = 7'(k);
        @(posedge clk); #1;
        check($sformatf("local %0d", k), $signed(stk_rdata), exp_l[k]);
      end
    end
    // 14*(8+7+...+1) = 504 inner iterations
    check("newarray services", n_newarray, 2);
    check("iaload services", n_iaload, 504);
    check("iastore services", n_iastore, 112 + 504 + 8);
    check("idiv services", n_idiv, 112 + 504 + 8);
    check("irem services", n_irem, 504 + 8);
    check("getstatic services", n_getstatic, 112 + 504 + 8 + 8);
    check("other services", n_other, 0);
    // Bytecodes the program executes, counted from its loop structure:
    // 14 before the loops, 112*12+4 in the fill loop, 2 to reset idx, per
    // outer pass 6+4+2+18, per inner pass 28 plus 6 when idx > 1 (496 of
    // the 504 passes), and the last loop test (6) and return.
    bytecodes = 14 + 112 * 12 + 4 + 2 + 8 * 30 + 504 * 28 + 496 * 6 + 6 + 1;
    $display("cycles=%0d host_wait=%0d own=%0d services=%0d bytecodes=%0d cycles_per_bytecode=%0.4f",
             cycles, wait_cycles, cycles - wait_cycles,
             n_newarray + n_iaload + n_iastore + n_idiv + n_irem + n_getstatic, bytecodes,
             real'(cycles - wait_cycles) / real'(bytecodes));
    // close to one bytecode per cycle outside the host waits
    check("cycles per bytecode below 1.1", (cycles - wait_cycles) * 10 < bytecodes * 11, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
