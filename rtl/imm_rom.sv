// imm_rom: the immediate value ROM of the decode stage.
//
// Eight 32-bit constants, read combinationally by the 3-bit index of the
// ldimm_<n+8> microcode (00 00 1nnn). The decode stage holds two copies so
// that both instructions of a pair can load an immediate in the same cycle.
// Entries 0-4 are the constants of the instruction set table: 1.0f, 2.0f,
// the upper word of 1.0 (double), 0x00007FFF and -1. Entry 5 is the shift
// mask 0x0000001F; the printed bit string of that entry is longer than 32
// bits and is read here as 31. Entries 6 and 7 are reserved and read as 0.
module imm_rom (
  input  logic [2:0]  idx,
  output logic [31:0] value
);
  always_comb begin
    unique case (idx)
      3'd0: value = 32'h3F80_0000;
      3'd1: value = 32'h4000_0000;
      3'd2: value = 32'h3FF0_0000;
      3'd3: value = 32'h0000_7FFF;
      3'd4: value = 32'hFFFF_FFFF;
      3'd5: value = 32'h0000_001F;
      default: value = 32'h0000_0000;
    endcase
  end
endmodule
