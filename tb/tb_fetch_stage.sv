// tb_fetch_stage: feeds a stream of translated items (simple bytecodes,
// bytecodes with one and two operand bytes, and one-to-many bytecodes) into
// the fetch stage while a bench model of the decode stage takes Instr1 and
// Instr2, randomly asserting fetch_one (take only Instr1) and hold. The
// sequence of instructions taken, nops removed, must equal the expected
// microcode stream with the right operands; one-to-many bytecodes must
// expand into their ROM sequences carrying the bytecode's operands. A flush
// must empty both slots.
module tb_fetch_stage;
  import jp_pkg::*;
  logic clk = 0, rst_n = 1; always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  logic flush = 0, hold = 0, fetch_one = 0, push = 0, ready, o2m_mode;
  titem_t item0, item1;
  instr_t instr1, instr2;
  int checks = 0, failures = 0;
  fetch_stage dut (.*);

  titem_t items [$];
  mcode_t emc [$]; logic [15:0] eopd [$];
  int pcn = 0;
  function automatic titem_t mki(tkind_t k, int d, int n);
    titem_t t; t.kind = k; t.data = 8'(d); t.raw = 8'(d); t.nopd = 2'(n); t.pc = addr_t'(pcn); pcn++;
    return t;
  endfunction
  task automatic o2o(mcode_t m, int n, int o1 = 0, int o2 = 0);
    items.push_back(mki(K_O2O, m, n));
    if (n >= 1) items.push_back(mki(K_OPD, o1, 0));
    if (n == 2) items.push_back(mki(K_OPD, o2, 0));
    emc.push_back(m);
    eopd.push_back(n == 2 ? {8'(o1), 8'(o2)} : n == 1 ? {8'h00, 8'(o1)} : 16'h0);
  endtask
  task automatic o2m(int addr, int n, int o1, int o2, mcode_t seq [$]);
    items.push_back(mki(K_O2M, addr, n));
    if (n >= 1) items.push_back(mki(K_OPD, o1, 0));
    if (n == 2) items.push_back(mki(K_OPD, o2, 0));
    foreach (seq[k]) begin
      emc.push_back(seq[k]);
      eopd.push_back(n == 2 ? {8'(o1), 8'(o2)} : {8'h00, 8'(o1)});
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (ready && items.size() >= 2) begin
        push = 1; item0 = items.pop_front(); item1 = items.pop_front();
      end else push = 0;
    end
  end

  // consumer (decode model)
  int taken = 0, ones = 0, modes = 0;
  initial begin
    for (int r = 0; r < 30; r++) begin
      o2o(LDIMM0 | 8'(r % 8), 0);
      o2o(LDOPD, 1, r + 1);
      o2m(2, 2, 5, r, '{IINC1, IINC2});
      o2o(AADD, 0);
      o2o(LDOPD2, 2, 8'h12, r);
      o2m(0, 1, 10, 0, '{LDOPD, NEWARRAY});
      o2o(STVAL0 | 8'd1, 0);
      o2m(4, 0, 0, 0, '{IASTORE, POP, POP});
    end
    if (items.size() % 2) o2o(NOP, 0);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (taken < emc.size()) begin
      @(negedge clk);
      hold = ($urandom % 5) == 0;
      fetch_one = ($urandom % 3) == 0;
      if (o2m_mode) modes++;
      if (!hold) begin
        instr_t t [2]; int nt;
        t = '{instr1, instr2}; nt = fetch_one ? 1 : 2;
        if (fetch_one) ones++;
        for (int k = 0; k < nt; k++)
          if (t[k].mc != NOP) begin
            checks++;
            if (taken >= emc.size() || t[k].mc !== emc[taken] || t[k].opd !== eopd[taken]) begin
              failures++;
              $display("FAIL #%0d got %h/%h exp %h/%h", taken, t[k].mc, t[k].opd, emc[taken], eopd[taken]);
            end
            taken++;
          end
      end
    end
    @(negedge clk); hold = 0; fetch_one = 0; flush = 1;
    @(negedge clk); flush = 0;
    checks++;
    if (instr1.mc !== NOP || instr2.mc !== NOP) begin failures++; $display("FAIL flush"); end
    checks++;
    if (modes == 0 || ones == 0) begin failures++; $display("FAIL one-to-many mode or fetch_one not exercised"); end
    $display("taken=%0d fetch_one=%0d o2m_cycles=%0d", taken, ones, modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
