// translate_stage: TR stage, bytecode fetch and on-the-fly translation.
//
// Every cycle in which the fetch stage can take two items, the stage reads
// the aligned byte pair at the Java program counter (JPC), classifies each
// byte and advances JPC by two. The type manager keeps the number of operand
// bytes still owed by the last bytecode: while it is non-zero a byte is
// tagged as an operand and passed through untranslated; otherwise the byte
// is a bytecode and the translation ROM gives its microcode (one-to-one) or
// one-to-many ROM address, and how many operand bytes follow it.
//
// A taken branch (redirect) reloads JPC with the target rounded down to an
// even address and clears the operand count. When the target is odd the
// byte at the even address is replaced by a nop, so that the pair stays
// aligned. The host's start pulse loads JPC the same way.
//
// Interface: code_raddr/code_rdata read the method area combinationally;
// the two items leave on item0/item1 with push, when ready is high.
// Timing: one pair per cycle, the pair is registered by the fetch stage.
// JPC counts bytes here (+2 per pair) where the overview figure shows a +1
// adder; this is the same step expressed in byte addresses.
module translate_stage
  import jp_pkg::*;
#(
  parameter int unsigned AW = 10            // code address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,                // processor is executing
  input  logic          load,               // load JPC (host start or redirect)
  input  addr_t         load_pc,
  output logic [AW-1:0] code_raddr,
  input  logic [15:0]   code_rdata,
  input  logic          ready,              // fetch buffer has room for two
  output logic          push,
  output titem_t        item0,
  output titem_t        item1,
  output addr_t         jpc
);
  logic [1:0] rem;        // operand bytes still expected
  logic       align_nop;  // replace the even byte of the next pair by nop

  assign code_raddr = AW'({jpc[15:1], 1'b0});

  // type manager + translation ROM, one lane per byte
  tkind_t     k0, k1;
  logic [7:0] d0, d1;
  logic [1:0] n0, n1;
  trans_rom u_tr0 (.bc(code_rdata[15:8]), .kind(k0), .data(d0), .nopd(n0));
  trans_rom u_tr1 (.bc(code_rdata[7:0]),  .kind(k1), .data(d1), .nopd(n1));

  logic [1:0] rem_mid, rem_next;

  always_comb begin
    addr_t pc0;
    pc0 = {jpc[15:1], 1'b0};
    // lane 0
    item0.raw = code_rdata[15:8];
    item0.pc  = pc0;
    if (align_nop) begin
      item0.kind = K_O2O; item0.data = NOP; item0.nopd = 2'd0; rem_mid = 2'd0;
    end else if (rem != 2'd0) begin
      item0.kind = K_OPD; item0.data = code_rdata[15:8]; item0.nopd = 2'd0; rem_mid = rem - 2'd1;
    end else begin
      item0.kind = k0; item0.data = d0; item0.nopd = n0; rem_mid = n0;
    end
    // lane 1
    item1.raw = code_rdata[7:0];
    item1.pc  = pc0 | 16'd1;
    if (rem_mid != 2'd0) begin
      item1.kind = K_OPD; item1.data = code_rdata[7:0]; item1.nopd = 2'd0; rem_next = rem_mid - 2'd1;
    end else begin
      item1.kind = k1; item1.data = d1; item1.nopd = n1; rem_next = n1;
    end
  end

  assign push = run && ready && !load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jpc       <= '0;
      rem       <= '0;
      align_nop <= 1'b0;
    end else if (load) begin
      jpc       <= {load_pc[15:1], 1'b0};
      rem       <= '0;
      align_nop <= load_pc[0];
    end else if (push) begin
      jpc       <= jpc + 16'd2;
      rem       <= rem_next;
      align_nop <= 1'b0;
    end
  end
endmodule
