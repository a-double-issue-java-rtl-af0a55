// tb_translate_stage: runs the translate stage over a bytecode image held
// in the bench (the bench plays the method area) and checks every tagged
// item against a reference classification computed here from the JVM
// operand counts: kind, translated data, operand count and byte address.
// It also checks that JPC advances by two only when the fetch stage is
// ready, and that a load to an odd address replaces the even byte by nop.
module tb_translate_stage;
  import jp_pkg::*;
  logic clk = 0, rst_n = 1; always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  logic run = 0, load = 0, ready = 0, push;
  addr_t load_pc = 0, jpc;
  logic [9:0] code_raddr; logic [15:0] code_rdata;
  titem_t item0, item1;
  int checks = 0, failures = 0;
  byte unsigned mem [1024];
  assign code_rdata = {mem[{code_raddr[9:1], 1'b0}], mem[{code_raddr[9:1], 1'b1}]};
  translate_stage #(.AW(10)) dut (.*);

  // reference
  byte unsigned prog [$] = '{8'h04, 8'h10, 8'h07, 8'h1a, 8'h11, 8'h01, 8'h02, 8'h84,
                              8'h03, 8'hfe, 8'h60, 8'ha7, 8'hff, 8'hf0, 8'h3c, 8'h00};
  tkind_t rk [$]; logic [7:0] rd [$]; logic [1:0] rn [$];
  task automatic ref_item(int b, inout int rem);
    tkind_t k; logic [7:0] d; logic [1:0] n;
    if (rem > 0) begin k = K_OPD; d = 8'(b); n = 0; rem--; end
    else begin
      unique case (b)
        8'h04: begin k = K_O2O; d = LDIMM0 | 1; n = 0; end
        8'h10: begin k = K_O2O; d = LDOPD; n = 1; end
        8'h1a: begin k = K_O2O; d = LDVAL0; n = 0; end
        8'h11: begin k = K_O2O; d = LDOPD2; n = 2; end
        8'h84: begin k = K_O2M; d = 8'd2; n = 2; end
        8'h60: begin k = K_O2O; d = AADD; n = 0; end
        8'ha7: begin k = K_O2O; d = GOTO; n = 2; end
        8'h3c: begin k = K_O2O; d = STVAL0 | 1; n = 0; end
        default: begin k = K_O2O; d = NOP; n = 0; end
      endcase
      rem = n;
    end
    rk.push_back(k); rd.push_back(d); rn.push_back(n);
  endtask

  task automatic chk_item(titem_t it, int idx, addr_t pc);
    checks++;
    if (it.kind !== rk[idx] || it.data !== rd[idx] || it.nopd !== rn[idx] || it.pc !== pc || it.raw !== prog[idx]) begin
      failures++; $display("FAIL item %0d: %p", idx, it);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int rem = 0, got = 0, stalls = 0;
    foreach (mem[k]) mem[k] = 0;
    foreach (prog[k]) begin mem[k + 16] = prog[k]; ref_item(prog[k], rem); end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    load = 1; load_pc = 16; @(posedge clk); #1 load = 0; run = 1;
    while (got < prog.size()) begin
      ready = ($urandom % 3) != 0; #1;
      if (push) begin
        chk_item(item0, got, addr_t'(16 + got));
        chk_item(item1, got + 1, addr_t'(16 + got + 1));
        got += 2;
      end else stalls++;
      @(posedge clk); #1;
      checks++;
      if (jpc !== addr_t'(16 + got)) begin failures++; $display("FAIL jpc %h", jpc); end
    end
    // redirect to the odd address 16+7 (iinc): even byte becomes nop
    ready = 0; load = 1; load_pc = 16 + 7; @(posedge clk); #1 load = 0; ready = 1; #1;
    checks++;
    if (!(push && item0.kind == K_O2O && item0.data == NOP && item1.kind == K_O2M && item1.data == 8'd2 && item1.pc == 16 + 7)) begin
      failures++; $display("FAIL odd redirect %p %p", item0, item1);
    end
    @(posedge clk); #1;
    checks++;
    if (!(item0.kind == K_OPD && item0.data == 8'h03 && item1.kind == K_OPD && item1.data == 8'hfe)) begin
      failures++; $display("FAIL operands after redirect");
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
