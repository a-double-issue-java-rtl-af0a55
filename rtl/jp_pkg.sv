// jp_pkg: types and constants shared by the double-issue Java processor.
//
// Microcodes are 8 bits wide. Bits [7:6] give the class: 00 load, 01 store,
// 10 ALU, 11 nop or special. The encodings below are the instruction set
// of the processor. Three pieces of it are this design's own reading:
//  * the three shift codes carry contradicting operator symbols in the
//    source listing; here 1100 is the logical right shift (ushr), 1101 the
//    arithmetic right shift and 1110 the left shift (shl);
//  * goto (11 011 110) branches unconditionally;
//  * operand counts follow the microcode bit fields of the instruction set
//    (opd_cnt), while the number of operand bytes that follow a *bytecode*
//    comes from the translation ROM.
// The stack delta of each special group follows the special-type table
// (000 and 100: -2, 001 and 101: -1, 010: +2, 011, 110 and 111: 0),
// except getstatic (+1), which this design has push the static value.
package jp_pkg;

  typedef logic [7:0]  mcode_t;
  typedef logic [31:0] word_t;
  typedef logic [15:0] addr_t;

  // ---- load type (00) -------------------------------------------------
  localparam mcode_t LDIMM0    = 8'b00_00_0000; // ldimm_<n>   : n
  localparam mcode_t LDIMM8    = 8'b00_00_1000; // ldimm_<n+8> : immROM[n]
  localparam mcode_t LDVAL0    = 8'b00_01_1000; // ldval_<n>   : stack[vp+n]
  localparam mcode_t LDVAL_OPD = 8'b00_10_0100;
  localparam mcode_t LDOPD     = 8'b00_10_0000;
  localparam mcode_t LDOPD2    = 8'b00_10_1000;
  localparam mcode_t LDJPC     = 8'b00_11_0000;
  localparam mcode_t LDVP      = 8'b00_11_0001;
  localparam mcode_t LDSP      = 8'b00_11_0010;
  localparam mcode_t LDBC      = 8'b00_11_0011;
  localparam mcode_t DUP       = 8'b00_11_1000;
  // ---- store type (01) ------------------------------------------------
  localparam mcode_t STVAL0    = 8'b01_01_1000; // stval_<n>
  localparam mcode_t STVAL_OPD = 8'b01_10_0001;
  localparam mcode_t STVP      = 8'b01_11_0001;
  localparam mcode_t STSP      = 8'b01_11_0010;
  localparam mcode_t POP       = 8'b01_11_1000;
  // ---- ALU type (10) --------------------------------------------------
  localparam mcode_t AOR       = 8'b10_00_0001;
  localparam mcode_t AXOR      = 8'b10_00_0010;
  localparam mcode_t AAND      = 8'b10_00_0011;
  localparam mcode_t AADD      = 8'b10_00_0100;
  localparam mcode_t ASUB      = 8'b10_00_0101;
  localparam mcode_t AMUL      = 8'b10_00_1001;
  localparam mcode_t AUSHR     = 8'b10_00_1100;
  localparam mcode_t ASHR      = 8'b10_00_1101;
  localparam mcode_t ASHL      = 8'b10_00_1110;
  // ---- nop / special (11) ---------------------------------------------
  localparam mcode_t IF_CMPEQ  = 8'b11_000_000; // +0..+5: eq ne lt ge gt le
  localparam mcode_t IFEQ      = 8'b11_001_000; // +0..+5: eq ne lt ge gt le
  localparam mcode_t IINC1     = 8'b11_010_000;
  localparam mcode_t GOTO      = 8'b11_011_110;
  localparam mcode_t IINC2     = 8'b11_100_000;
  localparam mcode_t IDIV      = 8'b11_101_000;
  localparam mcode_t NEWARRAY  = 8'b11_101_001;
  localparam mcode_t IASTORE   = 8'b11_101_010;
  localparam mcode_t IALOAD    = 8'b11_101_011;
  localparam mcode_t IREM      = 8'b11_101_100;
  localparam mcode_t SWAP      = 8'b11_110_000;
  localparam mcode_t RETURN    = 8'b11_110_001;
  localparam mcode_t INVOKE    = 8'b11_111_000;
  localparam mcode_t GETSTATIC = 8'b11_111_001;
  localparam mcode_t STJPC     = 8'b11_111_010;
  localparam mcode_t NOP       = 8'b11_111_111;

  typedef enum logic [1:0] {CL_LOAD = 2'b00, CL_STORE = 2'b01, CL_ALU = 2'b10, CL_SPEC = 2'b11} mclass_t;

  // Kind of a translated byte, produced by the type manager.
  typedef enum logic [1:0] {K_O2O = 2'd0, K_O2M = 2'd1, K_OPD = 2'd2} tkind_t;

  // One translated byte as it leaves the translate stage.
  typedef struct packed {
    tkind_t       kind;  // one-to-one, one-to-many or operand
    logic [7:0]   data;  // microcode, one-to-many ROM address or operand byte
    logic [7:0]   raw;   // the untranslated byte
    logic [1:0]   nopd;  // operand bytes that follow this bytecode
    addr_t        pc;    // byte address of this byte
  } titem_t;

  // One microcode instruction with its operands, as held in Instr1/Instr2.
  typedef struct packed {
    mcode_t       mc;
    logic [15:0]  opd;   // opd[15:8] first operand byte, opd[7:0] second (one byte: opd[7:0])
    logic [7:0]   bc;    // bytecode it came from
    addr_t        pc;    // address of that bytecode (branch trigger address)
  } instr_t;


  // Source of the value a load-type slot pushes.
  typedef enum logic [1:0] {SRC_IMM = 2'd0, SRC_BANK0 = 2'd1, SRC_BANK1 = 2'd2} vsrc_t;

  // Control of one issued pair, registered between decode and execute.
  typedef struct packed {
    mcode_t      mc1, mc2;      // slot 1 and slot 2 microcodes
    word_t       val1, val2;    // immediate value of each slot (D_tmp1/D_tmp2)
    vsrc_t       src1, src2;    // where each slot's load value comes from
    addr_t       wa1, wa2;      // local-variable store address of each slot
    logic        f1_bank;       // bank of the fill word stack[sp-3]
    logic        f2_bank;       // bank of the fill word stack[sp-4]
    addr_t       sp;            // stack pointer before the pair
    addr_t       target;        // branch destination (tmp2)
  } ctl_t;

  localparam instr_t INSTR_NOP = '{mc: NOP, opd: '0, bc: '0, pc: '0};

  function automatic mclass_t mclass(mcode_t m);
    return mclass_t'(m[7:6]);
  endfunction

  function automatic logic is_nop(mcode_t m);
    return m == NOP;
  endfunction

  function automatic logic is_special(mcode_t m);
    return m[7:6] == 2'b11 && m != NOP;
  endfunction

  // Operand bytes a microcode needs, from its bit fields.
  function automatic logic [1:0] opd_cnt(mcode_t m);
    if (m[7] == 1'b0 && m[5:3] == 3'b100) return 2'd1;
    if (m[7] == 1'b0 && m[5:3] == 3'b101) return 2'd2;
    if (m[7:6] == 2'b10 && m[5:4] == 2'b10) return 2'd2;
    if (m[7:6] == 2'b11 && m[5] == 1'b0) return 2'd2;
    if (m[7:6] == 2'b11 && m[5:2] == 4'b1100) return 2'd1;
    return 2'd0;
  endfunction

  // Microcodes that read a local variable from the stack RAM.
  function automatic logic reads_local(mcode_t m);
    return (m[7:3] == 5'b00011) || m == LDVAL_OPD || m == IINC1;
  endfunction

  // Microcodes that write a local variable in the stack RAM.
  function automatic logic writes_local(mcode_t m);
    return (m[7:3] == 5'b01011) || m == STVAL_OPD || m == IINC2;
  endfunction

  function automatic logic is_branch(mcode_t m);
    return (m[7:3] == 5'b11000 && m[2:0] <= 3'd5) ||
           (m[7:3] == 5'b11001 && m[2:0] <= 3'd5) || m == GOTO;
  endfunction

  function automatic logic is_service(mcode_t m);
    return (m[7:3] == 5'b11101 && m[2:0] <= 3'd4) || m == INVOKE || m == GETSTATIC;
  endfunction

  // Stack pointer change of one microcode.
  function automatic logic signed [2:0] sp_delta(mcode_t m);
    unique case (m[7:6])
      2'b00: return 3'sd1;
      2'b01: return -3'sd1;
      2'b10: return -3'sd1;
      default: begin
        if (m == NOP) return 3'sd0;
        if (m == GETSTATIC) return 3'sd1;         // pushes the static value
        unique case (m[5:3])
          3'b000, 3'b100: return -3'sd2;
          3'b001, 3'b101: return -3'sd1;
          3'b010:         return 3'sd2;
          default:        return 3'sd0;
        endcase
      end
    endcase
  endfunction

endpackage
