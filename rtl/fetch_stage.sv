// fetch_stage: IF stage, assembles two complete microcode instructions per
// cycle for the decode stage.
//
// Translated items from the translate stage enter an 8-entry buffer (the
// pipeline registers between TR and IF, widened to a small queue so that
// the variable length of bytecodes does not starve the fetch). The
// controller looks at the head of the buffer: an instruction is complete
// once all of its operand bytes are present. The operand manager attaches
// those bytes to the instruction (opd[15:8] first byte, opd[7:0] second;
// a single operand sits in opd[7:0]).
//
// The mode register selects between simple-bytecode mode, where up to two
// instructions are taken from the buffer, and one-to-many mode, where
// microcodes are read from the one-to-many ROM two at a time at the address
// register, which advances by the number taken, until a word marked last
// is taken. On entry to one-to-many mode the operands of the complex
// bytecode are latched in the operand buffer and every microcode of the
// sequence carries them.
//
// Instr1/Instr2 are the output registers. When the decode stage raises
// fetch_one, it has issued only Instr1: Instr2 moves to Instr1 and one new
// instruction is fetched. A slot with nothing ready is filled with nop. A
// one-to-many bytecode is only started in the first free slot of a cycle.
// hold freezes Instr1/Instr2 and the mode; flush (a taken branch or the
// host start) empties the buffer and fills both slots with nop.
module fetch_stage
  import jp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   hold,
  input  logic   fetch_one,
  input  logic   push,
  input  titem_t item0,
  input  titem_t item1,
  output logic   ready,
  output instr_t instr1,
  output instr_t instr2,
  output logic   o2m_mode
);
  localparam int unsigned DEPTH = 8;

  titem_t     q [DEPTH];
  logic [3:0] cnt;
  logic [7:0] ptr;                 // address register of the one-to-many ROM
  logic [15:0] ob_opd;             // operand buffer
  logic [7:0]  ob_bc;
  addr_t       ob_pc;

  assign ready = (cnt <= 4'd6);

  // ---------------- complete instructions at the head --------------------
  function automatic instr_t mk(titem_t a, titem_t b, titem_t c);
    instr_t r;
    r.mc  = a.data;
    r.bc  = a.raw;
    r.pc  = a.pc;
    unique case (a.nopd)
      2'd1:    r.opd = {8'h00, b.data};
      2'd2:    r.opd = {b.data, c.data};
      default: r.opd = 16'h0000;
    endcase
    return r;
  endfunction

  logic       s0_ok, s1_ok;
  logic [2:0] len0, len1;
  instr_t     s0, s1;

  always_comb begin
    len0  = 3'd1 + 3'(q[0].nopd);
    s0_ok = (cnt != 0) && (q[0].kind != K_OPD) && ({1'b0, cnt} > {2'b0, len0} - 5'd1);
    s0    = mk(q[0], q[1], q[2]);
    len1  = 3'd1 + 3'(q[len0].nopd);
    s1_ok = s0_ok && (q[len0].kind == K_O2O) &&
            ({1'b0, cnt} > {2'b0, len0} + {2'b0, len1} - 5'd1);
    s1    = mk(q[len0], q[len0+1], q[len0+2]);
  end

  // ---------------- one-to-many ROM ---------------------------------------
  logic [7:0] rom_addr;
  mcode_t     rmc0, rmc1;
  logic       rlast0, rlast1;
  assign rom_addr = o2m_mode ? ptr : q[0].data;
  o2m_rom u_rom (.addr(rom_addr), .mc0(rmc0), .last0(rlast0), .mc1(rmc1), .last1(rlast1));

  // ---------------- controller ---------------------------------------------
  instr_t     g0, g1;
  logic [2:0] consumed;
  logic       mode_n;
  logic [7:0] ptr_n;
  logic       ob_load;

  always_comb begin
    logic   two;
    instr_t ob;
    two      = !fetch_one;
    g0       = INSTR_NOP;
    g1       = INSTR_NOP;
    consumed = 3'd0;
    mode_n   = o2m_mode;
    ptr_n    = ptr;
    ob_load  = 1'b0;
    ob       = '{mc: NOP, opd: ob_opd, bc: ob_bc, pc: ob_pc};
    if (o2m_mode) begin
      g0 = ob; g0.mc = rmc0;
      if (two && !rlast0) begin
        g1 = ob; g1.mc = rmc1;
        ptr_n  = ptr + 8'd2;
        mode_n = !rlast1;
      end else begin
        ptr_n  = ptr + 8'd1;
        mode_n = !rlast0;
      end
    end else if (s0_ok) begin
      consumed = len0;
      if (q[0].kind == K_O2M) begin
        ob_load = 1'b1;
        ob      = '{mc: NOP, opd: s0.opd, bc: s0.bc, pc: s0.pc};
        g0 = ob; g0.mc = rmc0;
        if (two && !rlast0) begin
          g1 = ob; g1.mc = rmc1;
          ptr_n  = q[0].data + 8'd2;
          mode_n = !rlast1;
        end else begin
          ptr_n  = q[0].data + 8'd1;
          mode_n = !rlast0;
        end
      end else begin
        g0 = s0;
        if (two && s1_ok) begin
          g1 = s1;
          consumed = len0 + len1;
        end
      end
    end
  end

  // ---------------- buffer update ------------------------------------------
  logic [2:0] pop_n;
  assign pop_n = (flush || hold) ? 3'd0 : consumed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      cnt <= '0;
    end else begin
      logic [3:0] left;
      left = cnt - 4'(pop_n);
      for (int i = 0; i < DEPTH; i++) begin
        if (i + int'(pop_n) < DEPTH) q[i] <= q[i + int'(pop_n)];
        if (push && i == int'(left))     q[i] <= item0;
        if (push && i == int'(left) + 1) q[i] <= item1;
      end
      cnt <= left + (push ? 4'd2 : 4'd0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr1   <= INSTR_NOP;
      instr2   <= INSTR_NOP;
      o2m_mode <= 1'b0;
      ptr      <= '0;
      ob_opd   <= '0;
      ob_bc    <= '0;
      ob_pc    <= '0;
    end else if (flush) begin
      instr1   <= INSTR_NOP;
      instr2   <= INSTR_NOP;
      o2m_mode <= 1'b0;
    end else if (!hold) begin
      if (fetch_one) begin
        instr1 <= instr2;
        instr2 <= g0;
      end else begin
        instr1 <= g0;
        instr2 <= g1;
      end
      o2m_mode <= mode_n;
      ptr      <= ptr_n;
      if (ob_load) begin
        ob_opd <= s0.opd;
        ob_bc  <= s0.bc;
        ob_pc  <= s0.pc;
      end
    end
  end
endmodule
