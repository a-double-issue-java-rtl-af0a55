// tb_java_cpu: end-to-end test of the double-issue Java processor.
//
// The bench plays the host: it writes a small Java method (integer loop
// with an array, multiply, divide, remainder, shifts and iinc) into the
// method area, sets VP and SP, starts the processor and serves its
// interrupt requests with a behavioural model of the host (heap, idiv,
// irem, newarray, iastore, iaload, getstatic, invoke, return). Before the
// return the program adds a static field to a local and invokes a method,
// both through a small runtime image; the bench checks what the
// constant-pool resolver found, and that the static value on the stack is
// the one the resolver read, not the host's answer. When the processor halts it
// reads the local variables back from the stack RAM and the array from the
// heap model and compares them with values computed here. It also counts
// how often each mechanism of the pipeline happened (dual issue, fetch_one,
// one-to-many mode, spill, fill, multiply stall, host service, taken
// branch, branch to an odd address, same-bank split, RAM bypass) and fails
// for any that never did. Parameters are the top's defaults.
module tb_java_cpu;
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
  byte unsigned prog [$];
  task automatic e(input int b); prog.push_back(8'(b)); endtask
  // 16-bit branch offset patched later: position of the branch opcode
  task automatic br(input int op, input int tgt);
    int here; int off;
    here = prog.size(); off = tgt - here;
    e(op); e(off >> 8); e(off & 255);
  endtask

  int loop_pc, end_pc, pc_fix1, pc_fix2;

  task automatic build(input int loop_at, input int end_at);
    prog.delete();
    e(8'h03); e(8'h3b);                 // i = 0
    e(8'h03); e(8'h3c);                 // sum = 0
    e(8'h04); e(8'h3d);                 // prod = 1
    e(8'h10); e(10); e(8'hbc); e(10); e(8'h4e); // arr = new int[10]; loop head lands on an odd address
    loop_pc = prog.size();
    e(8'h1a); e(8'h10); e(10);          // iload_0, bipush 10
    pc_fix1 = prog.size(); br(8'ha2, end_at);     // if_icmpge end
    e(8'h1b); e(8'h1a); e(8'h60); e(8'h3c);       // sum += i
    e(8'h1a); e(8'h04); e(8'h60); e(8'h1c); e(8'h68); e(8'h3d); // prod *= (i+1)
    e(8'h2d); e(8'h1a); e(8'h1a); e(8'h1a); e(8'h68); e(8'h4f); // arr[i] = i*i
    e(8'h84); e(0); e(1);               // iinc 0 1
    pc_fix2 = prog.size(); br(8'ha7, loop_at);    // goto loop
    end_pc = prog.size();
    e(8'h2d); e(8'h08); e(8'h2e); e(8'h36); e(4);  // local4 = arr[5]
    e(8'h1b); e(8'h06); e(8'h6c); e(8'h36); e(5);  // local5 = sum / 3
    e(8'h1b); e(8'h10); e(7); e(8'h70); e(8'h36); e(6); // local6 = sum % 7
    e(8'h1b); e(8'h05); e(8'h78); e(8'h11); e(8'h01); e(8'h00); e(8'h64);
    e(8'h36); e(7);                     // local7 = (sum << 2) - 256
    e(8'h1b); e(8'h1c); e(8'h3c); e(8'h3d); // swap sum and prod (store-store pair)
    e(8'hb2); e(8'h00); e(8'h03); e(8'h15); e(4); e(8'h60); e(8'h36); e(4); // local4 += static field #3
    e(8'hb8); e(8'h00); e(8'h1d);       // invokestatic #0x1D (resolved, then passed to the host)
    e(8'hb1);                           // return
  endtask

  // runtime image for the invoke: constant-pool entry 0x1D -> item 0x0156
  // (Methodref, class 2, name-and-type 0x1C, direct address 0x0100) ->
  // method header (access 0x000A, 2 args, max stack 4, max locals 3)
  localparam int CP_BASE = 'h100;
  byte unsigned img [int];
  task automatic put16(int a, int v); img[a] = 8'(v >> 8); img[a + 1] = 8'(v); endtask
  task automatic build_image();
    put16(CP_BASE + 8 + 2 * 'h1d, 'h0156);
    img[CP_BASE + 'h156] = 8'h0a; put16(CP_BASE + 'h157, 'h0002); put16(CP_BASE + 'h159, 'h001c);
    put16(CP_BASE + 'h15b, 'h0100);
    put16(CP_BASE + 'h100, 'h000a); put16(CP_BASE + 'h102, 'h0002);
    put16(CP_BASE + 'h104, 'h0004); put16(CP_BASE + 'h106, 'h0003);
    // field reference #3 -> item 0x0180 (Fieldref) -> field entry 0x01C0,
    // whose data space holds the static value 10000
    put16(CP_BASE + 8 + 2 * 3, 'h0180);
    img[CP_BASE + 'h180] = 8'h09; put16(CP_BASE + 'h181, 'h0002); put16(CP_BASE + 'h183, 'h0007);
    put16(CP_BASE + 'h185, 'h01c0);
    put16(CP_BASE + 'h1c0, 'h0008); put16(CP_BASE + 'h1c2, 'h0007);
    put16(CP_BASE + 'h1c4, 'h0008); put16(CP_BASE + 'h1c6, 'h0000);
    put16(CP_BASE + 'h1c8, 'h0000); put16(CP_BASE + 'h1ca, 'h2710);
  endtask

  // ---------------- host model ---------------------------------------------
  word_t heap [0:255];
  int heap_top = 16;
  int services = 0, resolved = 0, fields = 0;

  initial begin
    forever begin
      @(posedge clk);
      if (irq && !host_ack && running) begin
        repeat (3) @(posedge clk);
        services++;
        unique case (irq_code)
          IDIV: host_result = $signed(tos_b) / $signed(tos_a);
          IREM: host_result = $signed(tos_b) % $signed(tos_a);
          NEWARRAY: begin
            if (tos_a == 10) begin
              for (int k = 0; k < int'(tos_b); k++) heap[heap_top + k] = 0;
              host_result = heap_top;
              heap_top += int'(tos_b);
            end
          end
          IASTORE: begin heap[tos_c + tos_b] = tos_a; host_result = 0; end
          IALOAD:  host_result = heap[tos_b + tos_a];
          INVOKE: begin
            while (!res_done) @(posedge clk);
            resolved++;
            check("resolved tag", res_tag, 'h0a);
            check("resolved code address", res_code_addr, 'h108);
            check("resolved arg_cnt", res_arg_cnt, 2);
            check("resolved max stack", res_max_stack, 4);
            check("resolved max locals", res_max_locals, 3);
            host_result = 0;
          end
          GETSTATIC: begin                // the value comes from the resolver
            while (!res_done) @(posedge clk);
            fields++;
            check("field tag", res_tag, 'h09);
            check("static value read", res_field, 10000);
            host_result = 32'hDEAD;       // must not reach the stack
          end
          default: host_result = 0;
        endcase
        #1 host_ack = 1;
        @(posedge clk);
        #1 host_ack = 0;
      end
    end
  end

  // ---------------- mechanism counters -------------------------------------
  int cycles = 0, dual = 0, f_one = 0, o2m = 0, spill = 0, fill = 0, mstall = 0,
      taken = 0, odd = 0, split = 0, bypass = 0, hold = 0;
  always @(posedge clk) if (running) begin
    cycles++;
    if (!dut.ex_stall && !dut.dec_hold && !dut.branch) begin
      if (!is_nop(dut.u_de.m1) && !is_nop(dut.u_de.m2)) dual++;
      if (dut.fetch_one) f_one++;
      if (dut.fetch_one && reads_local(dut.i1.mc) && reads_local(dut.i2.mc)) split++;
    end
    if (dut.o2m_mode || (dut.u_fe.ob_load && !dut.ex_stall && !dut.dec_hold)) o2m++;
    if (!dut.ex_stall && dut.u_ex.d > 0 && !is_nop(dut.ctl.mc1)) spill++;
    if (!dut.ex_stall && dut.u_ex.d < 0) fill++;
    if (dut.ex_stall && dut.u_ex.has_mul) mstall++;
    if (dut.branch) begin taken++; if (dut.target[0]) odd++; end
    if (dut.dec_hold) hold++;
    for (int b = 0; b < 2; b++)
      if (dut.ram_we[b] && dut.ram_waddr[b] == dut.ram_raddr[b]) bypass++;
  end

  bit trace;
  initial trace = $test$plusargs("trace");
  always @(posedge clk) if (trace && running)
    $display("%0t jpc=%h i1=%h i2=%h f1=%b st=%b ctl=%h,%h sp=%0d A=%0d B=%0d C=%0d br=%b irq=%b mode=%b cnt=%0d",
      $time, dut.jpc, dut.i1.mc, dut.i2.mc, dut.fetch_one, dut.ex_stall, dut.ctl.mc1, dut.ctl.mc2, dut.ctl.sp,
      $signed(tos_a), $signed(tos_b), $signed(tos_c), dut.branch, irq, dut.o2m_mode, dut.u_fe.cnt);

  // ---------------- watchdog ------------------------------------------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- run -----------------------------------------------------
  initial begin
    int s, p;
    build(0, 0);
    build(loop_pc, end_pc);             // second pass with the real labels
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
    // expected values
    s = 0; p = 1;
    for (int k = 0; k < 10; k++) begin s += k; p *= (k + 1); end
    begin
      int exp_l [8];
      exp_l = '{10, p, s, 16, 25 + 10000, s / 3, s % 7, (s << 2) - 256};
      for (int k = 0; k < 8; k++) begin
        #1 stk_addr = 7'(k);
        @(posedge clk); #1;
        check($sformatf("local %0d", k), $signed(stk_rdata), exp_l[k]);
      end
    end
    for (int k = 0; k < 10; k++) check($sformatf("arr[%0d]", k), heap[16 + k], k * k);
    check("services", services, 1 + 10 + 3 + 1 + 1 + 1);
    check("invoke resolved", resolved, 1);
    check("getstatic resolved", fields, 1);
    $display("cycles=%0d dual=%0d fetch_one=%0d o2m=%0d spill=%0d fill=%0d mulstall=%0d taken=%0d odd=%0d split=%0d bypass=%0d hold=%0d",
             cycles, dual, f_one, o2m, spill, fill, mstall, taken, odd, split, bypass, hold);
    check("dual issue seen", dual > 0, 1);
    check("fetch_one seen", f_one > 0, 1);
    check("one-to-many seen", o2m > 0, 1);
    check("spill seen", spill > 0, 1);
    check("fill seen", fill > 0, 1);
    check("mul stall seen", mstall > 0, 1);
    check("taken branch seen", taken > 0, 1);
    check("odd target seen", odd > 0, 1);
    check("same-bank split seen", split > 0, 1);
    check("RAM bypass seen", bypass > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
