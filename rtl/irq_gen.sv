// irq_gen: interrupt generator towards the host processor.
//
// When the execute stage meets an instruction the host must serve (idiv,
// newarray, iastore, iaload, irem, invoke, getstatic, and return), it holds
// req high with the microcode on code. The generator latches the code and
// raises irq one cycle later; irq stays high until the host answers with
// ack. done is high in the cycle of ack (while irq is high), and the
// execute stage completes the instruction in that cycle, so a request seen
// in the following cycle belongs to the next instruction.
module irq_gen
  import jp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  mcode_t code,
  input  logic   ack,
  output logic   irq,
  output mcode_t irq_code,
  output logic   done
);
  assign done = irq && ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq       <= 1'b0;
      irq_code  <= NOP;
    end else begin
      if (done) irq <= 1'b0;
      else if (req && !irq) begin
        irq      <= 1'b1;
        irq_code <= code;
      end
    end
  end
endmodule
