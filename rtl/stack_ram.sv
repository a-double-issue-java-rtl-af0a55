// stack_ram: the two-bank stack memory of the execute stage.
//
// The Java stack (local variables and the part of the operand stack below
// the three top-of-stack registers) is split over two dual-port RAMs: bank 0
// holds the even word addresses, bank 1 the odd ones, so that two accesses
// with different address LSBs proceed in the same cycle. Each bank has one
// synchronous read port, addressed one cycle early by the decode stage, and
// one write port used by the execute stage. A read of the word being
// written in the same cycle returns the new data (write-first bypass), so a
// spill followed at once by a fill of the same word reads correctly; that
// bypass is this design's choice. Addresses here are word indexes within a
// bank (stack address >> 1).
module stack_ram #(
  parameter int unsigned WORDS = 128,
  localparam int unsigned BW  = $clog2(WORDS) - 1   // bank address width
) (
  input  logic          clk,
  input  logic [BW-1:0] raddr [2],
  output logic [31:0]   rdata [2],
  input  logic          we    [2],
  input  logic [BW-1:0] waddr [2],
  input  logic [31:0]   wdata [2]
);
  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [31:0] mem [WORDS/2];
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
      if (we[b] && waddr[b] == raddr[b]) rdata[b] <= wdata[b];
      else                               rdata[b] <= mem[raddr[b]];
    end
  end
endmodule
