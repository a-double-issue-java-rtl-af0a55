// decode_stage: ID stage, pairs the two fetched microcodes and prepares
// the execute stage.
//
// Pairing. Instr1 and Instr2 are issued together unless the pair breaks a
// structure rule, in which case Instr1 is issued with a nop in slot 2 and
// fetch_one tells the fetch stage that Instr2 was not taken. A nop in
// Instr1 is dropped and Instr2 moves up to slot 1. The rules are
// those of the instruction set: a special instruction pairs only with nop;
// ALU+ALU and load+ALU are not paired; two local-variable loads, or two
// local-variable stores, that fall into the same RAM bank are not paired;
// only one instruction of a pair may use operand bytes. Two rules are this
// design's own: stvp/stsp are not followed by a second instruction in the
// same pair, and after a pair with stvp/stsp the stage inserts one bubble
// (hold) so that the next pair sees the new VP/SP.
//
// Addresses. The stage keeps the stack pointer SP (address of the top
// element, held in register A) and the variable pointer VP, and computes
// for the issued pair the RAM read addresses right away, without a
// register, so that the data is out of the RAM at the start of the
// execute cycle: local variable reads (VP + n), or the fill words
// stack[SP-3] and stack[SP-4] when the pair shrinks the stack. While
// execute stalls the addresses of the stalled pair are presented again. It also
// computes immediate values (two immediate ROMs, one per slot), store
// addresses and the branch destination PC + offset of a branch bytecode
// (tmp2). An iinc1 saves its local-variable address for the iinc2 after it.
//
// Everything else goes to the execute stage through the registered ctl.
// stall (from execute) freezes the stage; flush (taken branch) replaces
// the issued pair by nops and leaves SP as it was. start loads SP and VP.
module decode_stage
  import jp_pkg::*;
#(
  parameter int unsigned BW = 6                  // bank word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  addr_t         init_sp,
  input  addr_t         init_vp,
  input  logic          stall,
  input  logic          flush,
  input  instr_t        instr1,
  input  instr_t        instr2,
  input  logic          wr_sp,
  input  logic          wr_vp,
  input  addr_t         wr_val,
  output logic          fetch_one,
  output logic          hold,
  output logic [2:0]    opd_cnt_o,
  output logic [BW-1:0] raddr [2],
  output ctl_t          ctl,
  output addr_t         sp,
  output addr_t         vp
);
  addr_t iinc_addr;   // tmp2 kept from iinc1 for iinc2

  // A nop in Instr1 with an instruction in Instr2 is issued as that
  // instruction alone in slot 1, so specials, branches and iinc always
  // execute from slot 1.
  instr_t j1, j2;
  assign j1 = (instr1.mc == NOP) ? instr2 : instr1;
  assign j2 = (instr1.mc == NOP) ? INSTR_NOP : instr2;

  // immediate ROMs, one per slot
  word_t imm1, imm2;
  imm_rom u_imm1 (.idx(j1.mc[2:0]), .value(imm1));
  imm_rom u_imm2 (.idx(j2.mc[2:0]), .value(imm2));

  function automatic addr_t local_addr(instr_t i, addr_t vpv);
    if (i.mc == LDVAL_OPD || i.mc == STVAL_OPD) return vpv + addr_t'(i.opd[7:0]);
    if (i.mc == IINC1)                          return vpv + addr_t'(i.opd[15:8]);
    return vpv + addr_t'(i.mc[2:0]);
  endfunction

  function automatic word_t imm_val(instr_t i, word_t romv, addr_t spv, addr_t vpv);
    unique casez (i.mc)
      8'b00_00_0???: return word_t'(i.mc[2:0]);
      8'b00_00_1???: return romv;
      LDOPD:         return {{24{i.opd[7]}}, i.opd[7:0]};
      LDOPD2:        return {{16{i.opd[15]}}, i.opd};
      LDJPC:         return word_t'(i.pc);
      LDVP:          return word_t'(vpv);
      LDSP:          return word_t'(spv);
      LDBC:          return word_t'(i.bc);
      IINC1:         return {{24{i.opd[7]}}, i.opd[7:0]};
      INVOKE, GETSTATIC: return word_t'(i.opd);    // constant-pool index
      default:       return '0;
    endcase
  endfunction

  logic   pair;
  mcode_t m1, m2;
  addr_t  la1, la2;
  logic signed [3:0] d;
  addr_t  sp3;
  assign sp3 = sp - 16'd3;
  ctl_t   c;
  logic [BW-1:0] rd_c [2];   // read addresses of the pair in decode
  logic [BW-1:0] rd_q [2];   // read addresses of the pair in execute

  always_comb begin
    m1  = j1.mc;
    m2  = j2.mc;
    la1 = local_addr(j1, vp);
    la2 = local_addr(j2, vp);
    pair = 1'b1;
    if (is_special(m1) && !is_nop(m2)) pair = 1'b0;
    if (is_special(m2) && !is_nop(m1)) pair = 1'b0;
    if (mclass(m2) == CL_ALU && (mclass(m1) == CL_ALU || mclass(m1) == CL_LOAD)) pair = 1'b0;
    if (reads_local(m1) && reads_local(m2) && la1[0] == la2[0]) pair = 1'b0;
    if (writes_local(m1) && writes_local(m2) && la1[0] == la2[0]) pair = 1'b0;
    if (opd_cnt(m1) != 2'd0 && opd_cnt(m2) != 2'd0) pair = 1'b0;
    if (m1 == STSP || m1 == STVP) pair = 1'b0;
    if (m2 == NOP) pair = 1'b1;            // nothing to hold back
    fetch_one = !pair;
    if (!pair) m2 = NOP;

    d = 4'(sp_delta(m1)) + 4'(sp_delta(m2));
    opd_cnt_o = 3'(opd_cnt(m1)) + (pair ? 3'(opd_cnt(m2)) : 3'd0);

    c.mc1     = m1;
    c.mc2     = m2;
    c.val1    = imm_val(j1, imm1, sp, vp);
    c.val2    = imm_val(j2, imm2, sp + addr_t'(sp_delta(m1)), vp);
    c.src1    = reads_local(m1) ? (la1[0] ? SRC_BANK1 : SRC_BANK0) : SRC_IMM;
    c.src2    = reads_local(m2) ? (la2[0] ? SRC_BANK1 : SRC_BANK0) : SRC_IMM;
    c.wa1     = (m1 == IINC2) ? iinc_addr : la1;
    c.wa2     = la2;
    c.f1_bank = sp3[0];
    c.f2_bank = !c.f1_bank;
    c.sp      = sp;
    c.target  = j1.pc + {j1.opd};
    // RAM read addresses: fills when the pair shrinks the stack, otherwise
    // local variable reads; the two never occur in the same pair.
    rd_c[0] = '0;
    rd_c[1] = '0;
    if (d < 0) begin
      rd_c[c.f1_bank]  = BW'((sp - 16'd3) >> 1);
      rd_c[!c.f1_bank] = BW'((sp - 16'd4) >> 1);
    end else begin
      if (reads_local(m1)) rd_c[la1[0]] = BW'(la1 >> 1);
      if (reads_local(m2)) rd_c[la2[0]] = BW'(la2 >> 1);
    end
  end

  // While execute stalls, the RAM keeps reading the addresses of the pair
  // that is stalled, so its data is still there when the pair completes.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      rd_q <= '{default: '0};
    else if (!stall) rd_q <= rd_c;
  assign raddr = stall ? rd_q : rd_c;

  logic issue;
  assign issue = !stall && !flush && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp        <= '0;
      vp        <= '0;
      hold      <= 1'b0;
      iinc_addr <= '0;
      ctl       <= '0;
      ctl.mc1   <= NOP;
      ctl.mc2   <= NOP;
    end else if (start) begin
      sp      <= init_sp;
      vp      <= init_vp;
      hold    <= 1'b0;
      ctl.mc1 <= NOP;
      ctl.mc2 <= NOP;
    end else if (!stall) begin
      if (wr_sp) sp <= wr_val;
      if (wr_vp) vp <= wr_val;
      if (issue) begin
        ctl  <= c;
        if (!(wr_sp || wr_vp)) sp <= sp + addr_t'(d);
        hold <= (m1 == STSP || m1 == STVP || m2 == STSP || m2 == STVP);
        if (m1 == IINC1) iinc_addr <= la1;
      end else begin
        ctl.mc1 <= NOP;
        ctl.mc2 <= NOP;
        hold    <= 1'b0;
      end
    end
  end
endmodule
