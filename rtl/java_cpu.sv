// java_cpu: double-issue Java processor, top level.
//
// A stack machine that executes Java bytecodes two microcodes per cycle in
// a four-stage pipeline:
//   TR  translate_stage  reads two bytecode bytes per cycle at JPC from the
//                        method area (code_mem), tags each as bytecode or
//                        operand and translates bytecodes to microcodes or
//                        one-to-many ROM addresses;
//   IF  fetch_stage      assembles two complete microcodes with their
//                        operands into Instr1/Instr2, expanding complex
//                        bytecodes from the one-to-many ROM;
//   ID  decode_stage     pairs them under the structure-hazard rules (or
//                        raises fetch_one), keeps SP/VP, and addresses the
//                        stack RAM one cycle ahead;
//   EX  execute_stage    updates the top-of-stack registers A, B, C with
//                        spill/fill to the two-bank stack_ram, resolves
//                        branches and asks the host for complex services.
// A taken branch reloads JPC and flushes TR, IF and ID.
//
// Host interface: while idle the host writes the bytecode image
// (code_we/code_waddr/code_wdata) and reads or writes the stack RAM
// (stk_*; read data one cycle after the address). A start pulse loads JPC,
// VP and SP and runs the processor. Service requests appear on irq with
// the microcode in irq_code and the stack top on tos_a/b/c; the host
// answers with host_ack and host_result. After return is served, running
// drops. For invoke and getstatic the constant-pool resolver walks the
// runtime image at cp_base while the request is pending and presents the
// target (tag, direct address and, for methods, code address, argument
// count, max stack, max locals; for fields the static value) on res_*;
// the host waits for res_done.
// The memory sizes are this design's choice; the stack RAM follows
// the 128 x 32-bit data memory used in the cost comparison.
module java_cpu
  import jp_pkg::*;
#(
  parameter int unsigned CODE_BYTES  = 1024,
  parameter int unsigned STACK_WORDS = 128,
  localparam int unsigned CAW = $clog2(CODE_BYTES),
  localparam int unsigned SAW = $clog2(STACK_WORDS),
  localparam int unsigned BW  = SAW - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  addr_t          init_jpc,
  input  addr_t          init_vp,
  input  addr_t          init_sp,
  input  logic           code_we,
  input  logic [CAW-1:0] code_waddr,
  input  logic [7:0]     code_wdata,
  input  logic           stk_we,
  input  logic [SAW-1:0] stk_addr,
  input  word_t          stk_wdata,
  output word_t          stk_rdata,
  output logic           irq,
  output mcode_t         irq_code,
  output word_t          tos_a,
  output word_t          tos_b,
  output word_t          tos_c,
  input  logic           host_ack,
  input  word_t          host_result,
  output logic           running,
  input  addr_t          cp_base,
  output logic           res_done,
  output logic [7:0]     res_tag,
  output addr_t          res_direct,
  output addr_t          res_code_addr,
  output logic [15:0]    res_arg_cnt,
  output logic [15:0]    res_max_stack,
  output logic [15:0]    res_max_locals,
  output word_t          res_field
);
  // ---------------- control -----------------------------------------------
  logic   branch, ex_stall, dec_hold, fetch_one, halt;
  addr_t  target, jpc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     running <= 1'b0;
    else if (start) running <= 1'b1;
    else if (halt)  running <= 1'b0;
  end

  // ---------------- TR ----------------------------------------------------
  logic [CAW-1:0] code_raddr, res_raddr;
  logic [7:0]     res_rdata;
  // getstatic pushes the static value read by the resolver; the host
  // only acknowledges it
  word_t ex_result;
  logic [15:0]    code_rdata;
  logic           tr_push, fe_ready;
  titem_t         it0, it1;

  code_mem #(.BYTES(CODE_BYTES)) u_code (
    .clk(clk), .we(code_we && !running), .waddr(code_waddr), .wdata(code_wdata),
    .raddr(code_raddr), .rdata(code_rdata), .raddr2(res_raddr), .rdata2(res_rdata));

  translate_stage #(.AW(CAW)) u_tr (
    .clk(clk), .rst_n(rst_n), .run(running), .load(start || branch),
    .load_pc(start ? init_jpc : target), .code_raddr(code_raddr), .code_rdata(code_rdata),
    .ready(fe_ready), .push(tr_push), .item0(it0), .item1(it1), .jpc(jpc));

  // ---------------- IF ----------------------------------------------------
  instr_t i1, i2;
  logic   o2m_mode;
  fetch_stage u_fe (
    .clk(clk), .rst_n(rst_n), .flush(start || branch), .hold(ex_stall || dec_hold),
    .fetch_one(fetch_one), .push(tr_push), .item0(it0), .item1(it1), .ready(fe_ready),
    .instr1(i1), .instr2(i2), .o2m_mode(o2m_mode));

  // ---------------- ID ----------------------------------------------------
  logic          wr_sp, wr_vp;
  addr_t         wr_val, sp, vp;
  logic [2:0]    dec_opd_cnt;
  logic [BW-1:0] dec_raddr [2];
  ctl_t          ctl;
  assign ex_result = (ctl.mc1 == GETSTATIC) ? res_field : host_result;
  decode_stage #(.BW(BW)) u_de (
    .clk(clk), .rst_n(rst_n), .start(start), .init_sp(init_sp), .init_vp(init_vp),
    .stall(ex_stall), .flush(branch), .instr1(i1), .instr2(i2),
    .wr_sp(wr_sp), .wr_vp(wr_vp), .wr_val(wr_val), .fetch_one(fetch_one), .hold(dec_hold),
    .opd_cnt_o(dec_opd_cnt), .raddr(dec_raddr), .ctl(ctl), .sp(sp), .vp(vp));

  // ---------------- EX and stack RAM ---------------------------------------
  word_t         rdata [2];
  logic          ex_we [2];
  logic [BW-1:0] ex_waddr [2];
  word_t         ex_wdata [2];
  logic [BW-1:0] ram_raddr [2];
  logic          ram_we [2];
  logic [BW-1:0] ram_waddr [2];
  word_t         ram_wdata [2];
  logic          host_bank_q;

  execute_stage #(.BW(BW)) u_ex (
    .clk(clk), .rst_n(rst_n), .start(start), .ctl(ctl), .rdata(rdata),
    .host_ack(host_ack), .host_result(ex_result), .stall(ex_stall), .branch(branch),
    .target(target), .we(ex_we), .waddr(ex_waddr), .wdata(ex_wdata),
    .wr_sp(wr_sp), .wr_vp(wr_vp), .wr_val(wr_val), .a_q(tos_a), .b_q(tos_b), .c_q(tos_c),
    .irq(irq), .irq_code(irq_code), .halt(halt));

  // host owns the RAM ports while the processor is idle
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (running) begin
        ram_raddr[b] = dec_raddr[b];
        ram_we[b]    = ex_we[b];
        ram_waddr[b] = ex_waddr[b];
        ram_wdata[b] = ex_wdata[b];
      end else begin
        ram_raddr[b] = stk_addr[SAW-1:1];
        ram_we[b]    = stk_we && (stk_addr[0] == b[0]);
        ram_waddr[b] = stk_addr[SAW-1:1];
        ram_wdata[b] = stk_wdata;
      end
    end
  end

  // ---------------- constant-pool resolution for invoke / getstatic ----------
  logic res_busy;
  cp_resolver #(.AW(CAW)) u_res (
    .clk(clk), .rst_n(rst_n),
    .req(running && (ctl.mc1 == INVOKE || ctl.mc1 == GETSTATIC)),
    .clear(host_ack || start), .cp_index(ctl.val1[15:0]), .base(cp_base),
    .mem_addr(res_raddr), .mem_data(res_rdata), .busy(res_busy), .done(res_done),
    .tag(res_tag), .direct(res_direct), .code_addr(res_code_addr), .arg_cnt(res_arg_cnt),
    .max_stack(res_max_stack), .max_locals(res_max_locals),
    .field_value(res_field));

  stack_ram #(.WORDS(STACK_WORDS)) u_stk (
    .clk(clk), .raddr(ram_raddr), .rdata(rdata), .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata));

  always_ff @(posedge clk) host_bank_q <= stk_addr[0];
  assign stk_rdata = host_bank_q ? rdata[1] : rdata[0];
endmodule
