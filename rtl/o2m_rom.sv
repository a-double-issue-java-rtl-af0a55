// o2m_rom: one-to-many microcode ROM of the fetch stage.
//
// A complex bytecode is translated into an address of this ROM; the fetch
// stage then reads the microcode sequence from it, two words per cycle
// (addr and addr+1), until a word with the 'last' bit set ends the
// sequence. Reads are combinational. Each word is {last, microcode}.
// The sequences are this design's own, since the contents of the ROM are
// not listed:
//   0: ldopd, newarray         newarray: push atype operand, then service
//   2: iinc1, iinc2            iinc: the two-step scheme of the ISA
//   4: iastore, pop, pop       iastore: service pops one, two more pops
module o2m_rom
  import jp_pkg::*;
(
  input  logic [7:0] addr,
  output mcode_t     mc0,
  output logic       last0,
  output mcode_t     mc1,
  output logic       last1
);
  function automatic logic [8:0] word(logic [7:0] a);
    unique case (a)
      8'd0: return {1'b0, LDOPD};
      8'd1: return {1'b1, NEWARRAY};
      8'd2: return {1'b0, IINC1};
      8'd3: return {1'b1, IINC2};
      8'd4: return {1'b0, IASTORE};
      8'd5: return {1'b0, POP};
      8'd6: return {1'b1, POP};
      default: return {1'b1, NOP};
    endcase
  endfunction

  always_comb begin
    {last0, mc0} = word(addr);
    {last1, mc1} = word(addr + 8'd1);
  end
endmodule
