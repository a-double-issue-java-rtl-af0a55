// execute_stage: EX stage with the three top-of-stack registers.
//
// A is the top of the stack, B the element below it and C the third. The
// rest of the stack lives in the two-bank stack RAM; the word at stack
// address SP-3 and below is always valid there, the words at SP-2..SP are
// held in C, B, A. A pair of microcodes is applied to the window
// {A, B, C, F1, F2}, where F1 = stack[SP-3] and F2 = stack[SP-4] are the
// fill words the decode stage has read from the RAM: slot 1 first, then
// slot 2, each pushing or popping as its class says. The first three
// entries of the result are the new A, B, C. When the pair grows the stack
// by one, the old C is spilled to stack[SP-2]; by two, B and C are spilled
// to stack[SP-1] and stack[SP-2]. When it shrinks the stack, C (and B) are
// filled from F1 (and F2).
//
// Store-type instructions write the popped value (SD_val) to a local
// variable, to VP or SP, or nowhere (pop). ALU instructions pop two and push
// the result; only one ALU instruction is in a pair, so its operands are
// A,B or, after a store in slot 1, B,C. mul uses a two-cycle multiplier:
// the pair stalls one cycle while the product is registered.
//
// Special instructions run alone: branches compare A (and B) and, when
// taken, assert branch with the destination computed in the decode stage
// (stjpc jumps to A); the fetch and decode stages are then flushed. iinc1
// pushes a local variable and the increment, iinc2 writes their sum back.
// idiv, newarray, iastore, iaload, irem, invoke, getstatic and return are
// served by the host: the stage holds the pair, the interrupt generator
// raises irq, and when the host acknowledges, host_result replaces B and
// (for the -1 group) the stack shrinks by one so that the result is in A;
// for getstatic the result is pushed instead.
// After return is served the stage raises halt. All of this follows the
// instruction set. That invoke and getstatic also wait for the host is
// this design's choice: the frame switch after invoke is not described,
// and getstatic's value (read by the constant-pool resolver at the top
// level) arrives on host_result at the acknowledge.
//
// Timing: one pair per cycle; stall is high in the first cycle of a mul
// pair and while a host service is pending. Writes and register updates
// happen at the end of the cycle in which stall is low.
module execute_stage
  import jp_pkg::*;
#(
  parameter int unsigned BW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  ctl_t          ctl,
  input  word_t         rdata [2],
  input  logic          host_ack,
  input  word_t         host_result,
  output logic          stall,
  output logic          branch,
  output addr_t         target,
  output logic          we    [2],
  output logic [BW-1:0] waddr [2],
  output word_t         wdata [2],
  output logic          wr_sp,
  output logic          wr_vp,
  output addr_t         wr_val,
  output word_t         a_q,
  output word_t         b_q,
  output word_t         c_q,
  output logic          irq,
  output mcode_t        irq_code,
  output logic          halt
);
  word_t  mul_q;
  logic   mul_phase;

  function automatic word_t lval(vsrc_t s, word_t imm, word_t r0, word_t r1);
    unique case (s)
      SRC_BANK0: return r0;
      SRC_BANK1: return r1;
      default:   return imm;
    endcase
  endfunction

  function automatic logic cond(logic [2:0] cc, word_t x, word_t y); // x ? y
    unique case (cc)
      3'd0: return x == y;
      3'd1: return x != y;
      3'd2: return $signed(x) <  $signed(y);
      3'd3: return $signed(x) >= $signed(y);
      3'd4: return $signed(x) >  $signed(y);
      3'd5: return $signed(x) <= $signed(y);
      default: return 1'b0;
    endcase
  endfunction

  // ---------------- ALU operand selection and ALU -------------------------
  mcode_t alu_op;
  word_t  alu_a, alu_b, alu_y;
  logic   has_mul;
  always_comb begin
    if (mclass(ctl.mc2) == CL_ALU) begin
      alu_op = ctl.mc2;
      alu_a  = (mclass(ctl.mc1) == CL_STORE) ? b_q : a_q;
      alu_b  = (mclass(ctl.mc1) == CL_STORE) ? c_q : b_q;
    end else begin
      alu_op = ctl.mc1;
      alu_a  = a_q;
      alu_b  = b_q;
    end
    has_mul = (alu_op == AMUL) && (mclass(ctl.mc1) == CL_ALU || mclass(ctl.mc2) == CL_ALU);
  end
  alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .mul_p(mul_q), .y(alu_y));

  // ---------------- host services -----------------------------------------
  logic   svc, svc_done;
  mcode_t svc_code;
  assign svc      = is_service(ctl.mc1) || ctl.mc1 == RETURN;
  assign svc_code = ctl.mc1;
  irq_gen u_irq (.clk(clk), .rst_n(rst_n), .req(svc && !start), .code(svc_code), .ack(host_ack),
                 .irq(irq), .irq_code(irq_code), .done(svc_done));

  assign stall = (has_mul && !mul_phase) || (svc && !svc_done);

  // ---------------- window update -----------------------------------------
  word_t w [7];
  logic  br;
  addr_t br_t;
  logic  wl_en [2];
  addr_t wl_a  [2];
  word_t wl_d  [2];
  logic signed [3:0] d;

  always_comb begin
    word_t  f1, f2, lv, sd;
    word_t  t [7];
    mcode_t m;
    f1 = ctl.f1_bank ? rdata[1] : rdata[0];
    f2 = ctl.f2_bank ? rdata[1] : rdata[0];
    w  = '{a_q, b_q, c_q, f1, f2, '0, '0};
    br = 1'b0;
    br_t = ctl.target;
    wr_sp = 1'b0;
    wr_vp = 1'b0;
    wr_val = '0;
    for (int k = 0; k < 2; k++) begin wl_en[k] = 1'b0; wl_a[k] = '0; wl_d[k] = '0; end
    for (int s = 0; s < 2; s++) begin
      m  = (s == 0) ? ctl.mc1 : ctl.mc2;
      lv = (s == 0) ? lval(ctl.src1, ctl.val1, rdata[0], rdata[1])
                    : lval(ctl.src2, ctl.val2, rdata[0], rdata[1]);
      sd = w[0];
      t  = w;
      unique case (mclass(m))
        CL_LOAD: begin
          w = '{(m == DUP) ? t[0] : lv, t[0], t[1], t[2], t[3], t[4], t[5]};
        end
        CL_STORE: begin
          if (writes_local(m)) begin
            wl_en[s] = 1'b1; wl_a[s] = (s == 0) ? ctl.wa1 : ctl.wa2; wl_d[s] = sd;
          end
          if (m == STSP) begin wr_sp = 1'b1; wr_val = addr_t'(sd); end
          if (m == STVP) begin wr_vp = 1'b1; wr_val = addr_t'(sd); end
          w = '{t[1], t[2], t[3], t[4], t[5], t[6], '0};
        end
        CL_ALU: begin
          w = '{alu_y, t[2], t[3], t[4], t[5], t[6], '0};
        end
        default: begin
          if (m[5:3] == 3'b000) begin                 // if_cmp<cond>: B ? A
            br = cond(m[2:0], w[1], w[0]);
            w  = '{t[2], t[3], t[4], t[5], t[6], '0, '0};
          end else if (m[5:3] == 3'b001) begin        // if<cond>: A ? 0
            br = cond(m[2:0], w[0], '0);
            w  = '{t[1], t[2], t[3], t[4], t[5], t[6], '0};
          end else if (m == GOTO) begin
            br = 1'b1;
          end else if (m == STJPC) begin
            br = 1'b1; br_t = addr_t'(w[0]);
          end else if (m == IINC1) begin                // A <- const, B <- local
            w = '{ctl.val1, lv, t[0], t[1], t[2], t[3], t[4]};
          end else if (m == IINC2) begin                // A + B -> stack[tmp2]
            wl_en[0] = 1'b1; wl_a[0] = ctl.wa1; wl_d[0] = w[0] + w[1];
            w = '{t[2], t[3], t[4], t[5], t[6], '0, '0};
          end else if (m == GETSTATIC) begin          // service result pushed
            w = '{host_result, t[0], t[1], t[2], t[3], t[4], t[5]};
          end else if (m[5:3] == 3'b101) begin        // host service, result to B
            w = '{host_result, t[2], t[3], t[4], t[5], t[6], '0};
          end else if (m == SWAP) begin
            w = '{t[1], t[0], t[2], t[3], t[4], t[5], t[6]};
          end
        end
      endcase
    end
    d = 4'(sp_delta(ctl.mc1)) + 4'(sp_delta(ctl.mc2));
  end

  // ---------------- RAM writes: stores and spills -------------------------
  always_comb begin
    logic  e [2];
    addr_t ad [2];
    word_t dt [2];
    e  = wl_en; ad = wl_a; dt = wl_d;
    if (d == 4'sd1) begin
      e[1] = 1'b1; ad[1] = ctl.sp - 16'd2; dt[1] = w[3];
    end else if (d == 4'sd2) begin
      e[0] = 1'b1; ad[0] = ctl.sp - 16'd1; dt[0] = w[3];
      e[1] = 1'b1; ad[1] = ctl.sp - 16'd2; dt[1] = w[4];
    end
    for (int b = 0; b < 2; b++) begin we[b] = 1'b0; waddr[b] = '0; wdata[b] = '0; end
    for (int k = 0; k < 2; k++)
      if (e[k] && !stall) begin
        we[ad[k][0]]    = 1'b1;
        waddr[ad[k][0]] = BW'(ad[k] >> 1);
        wdata[ad[k][0]] = dt[k];
      end
  end

  assign branch = br && !stall;
  assign target = br_t;
  assign halt   = (ctl.mc1 == RETURN) && svc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; c_q <= '0;
      mul_q <= '0; mul_phase <= 1'b0;
    end else if (start) begin
      a_q <= '0; b_q <= '0; c_q <= '0;
      mul_phase <= 1'b0;
    end else if (stall) begin
      if (has_mul && !mul_phase) begin
        mul_q     <= alu_a * alu_b;
        mul_phase <= 1'b1;
      end
    end else begin
      a_q <= w[0]; b_q <= w[1]; c_q <= w[2];
      mul_phase <= 1'b0;
    end
  end

  // two writes of one pair never hit the same bank (decode pairing rules)
  assert property (@(posedge clk) disable iff (!rst_n)
    !(wl_en[0] && wl_en[1] && wl_a[0][0] == wl_a[1][0] && !stall));
endmodule
