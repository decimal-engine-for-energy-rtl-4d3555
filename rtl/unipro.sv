// unipro: hybrid decimal/binary floating-point engine.
//
// One iterative datapath executes four operations:
//   DFP add/sub  decimal64, 16-digit BCD significands, 5 cycles
//   DFP mul      decimal64, one multiplier digit per cycle, 20 cycles
//   DFP div      decimal64, radix-10 digit recurrence, 23 cycles
//   BFP div      binary64 normal operands, radix-16 digit recurrence, 18 cycles
// The two divisions share the recurrence v = r*w - qH*k*d, w = v - qL*d; the
// radix (10 or 16) is a single control bit of the dual-radix carry-save
// adders, multiples and converters.
//
// Stages (one register set each):
//   set-up        operand latches and registers Mx, My (18 digits)
//   normalization leading non-zero digit detector and 32-digit left barrel
//                 shifter; aligns the DFP-add operands, normalizes the DFP-div
//                 operands and the 32-digit product
//   recurrence    multiples of Mx or My, two multiplexers (PPH, PPL), two
//                 dual-radix carry-save adders, carry-save residual Ws/Wc;
//                 multiplier recoding or quotient-digit selection feed the
//                 multiplexers; the product's low digits leave at the bottom
//   conversion    carry-propagate adder (carry-save to BCD/binary, rounding
//                 increment), register Zu, on-the-fly quotient conversion
// The sequence of phases comes from controller.sv, the exponents from
// sign_exp.sv.
//
// Interface: give op, x and y with start while busy is low. done pulses when
// result and the flags are valid; they hold until the next operation ends.
// OP_DFP_SUB flips the sign of y. Results round to nearest, ties to even.
// overflow/underflow flag a result exponent outside the format (the exponent
// field then holds the low bits); div_by_zero flags a zero divisor.
//
// Choices of this design where the paper is silent: the larger DFP-add
// operand is the one whose leading digit has the larger weight; digits of
// the smaller addend that fall below the guard digit are dropped (a sum
// that cancels its top digit is shifted up by one to keep the guard digit);
// a DFP-div
// dividend smaller than the divisor is shifted one more digit so that the
// quotient always has 16 digits plus a rounding digit; BFP division starts
// from w[0] = x/16 so that 15 hex digits give 53 bits plus guard bits; the
// quotient digits are selected by exact comparison (see qds.sv); infinities,
// NaNs and subnormals are not recognized, and DFP results are not given the
// preferred exponent.
module unipro
  import unipro_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  op_e      op,
  input  operand_t x,
  input  operand_t y,
  output logic     busy,
  output logic     done,
  output operand_t result,
  output logic     overflow,
  output logic     underflow,
  output logic     div_by_zero
);
  localparam int N  = WDIG;        // recurrence digits
  localparam int NB = 4 * WDIG;    // recurrence bits

  // ---------------- controller and operand latches ----------------------
  phase_e     phase;
  op_e        cur_op;
  logic [4:0] iter;
  logic       accept;

  controller u_ctrl (
    .clk, .rst_n, .start, .op,
    .phase, .cur_op, .iter, .busy, .done
  );

  assign accept = start && !busy;

  operand_t xq, yq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xq <= '0;
      yq <= '0;
    end else if (accept) begin
      xq <= x;
      yq <= (op == OP_DFP_SUB) ? operand_t'({~y.sign, y.exp, y.sig}) : y;
    end
  end

  logic is_add, is_mul, is_ddiv, is_bdiv, is_div, radix10;
  always_comb begin
    is_add  = (cur_op == OP_DFP_ADD) || (cur_op == OP_DFP_SUB);
    is_mul  = (cur_op == OP_DFP_MUL);
    is_ddiv = (cur_op == OP_DFP_DIV);
    is_bdiv = (cur_op == OP_BFP_DIV);
    is_div  = is_ddiv || is_bdiv;
    radix10 = !is_bdiv;
  end

  // ---------------- sign and exponent handling --------------------------
  logic [4:0]         lzx, lzy;
  logic               swap, eff_sub, sign_base;
  logic [13:0]        diff;
  logic signed [13:0] exp_base;

  sign_exp u_se (
    .op(cur_op), .x(xq), .y(yq),
    .lzx, .lzy, .swap, .diff, .exp_base, .sign_base, .eff_sub
  );

  // ---------------- registers --------------------------------------------
  logic [NB-1:0]     mx, my;        // set-up registers Mx, My
  logic [NB-1:0]     ws;            // residual / partial product, digits
  logic [N-1:0]      wc;            // residual / partial product, carries
  logic [4*NDIG-1:0] lsd;           // product digits shifted out (DFP mul)
  logic [NB-1:0]     zu;            // conversion register Zu
  logic [4*PDIG-1:0] nreg;          // normalized product
  logic [5:0]        nlz_q;         // leading zeros of the product
  logic              add_sign;      // sign of the larger DFP addend
  logic              ext;           // DFP div: dividend shifted one more digit

  // ---------------- normalization stage ----------------------------------
  logic [4*PDIG-1:0] norm_in, norm_out;
  logic [5:0]        nlz;
  logic [4:0]        amt;
  logic              b_lost;        // DFP add: aligned addend below the window
  logic [NB-1:0]     b_aligned;
  logic signed [7:0] sb;

  always_comb begin
    norm_in = '0;
    case (phase)
      PH_NORM1: norm_in[4*NDIG-1:0] = is_add ? (swap ? yq.sig : xq.sig) : yq.sig;
      PH_NORM2: norm_in[4*NDIG-1:0] = is_add ? (swap ? xq.sig : yq.sig) : xq.sig;
      PH_NRES:  norm_in = {zu[4*NDIG-1:0], lsd};
      default:  norm_in = '0;
    endcase
  end

  lnzd #(.N(PDIG)) u_lnzd (.din(norm_in), .count(nlz));

  always_comb begin
    sb     = $signed({2'b0, nlz}) - $signed({1'b0, diff[6:0]});
    b_lost = (nlz == 6'd32) || (diff > 14'd32) || (sb < 0);
    amt    = '0;
    case (phase)
      PH_NORM1: amt = is_add ? ((nlz == 6'd32) ? 5'd0 : nlz[4:0]) : 5'(nlz - 6'd16);
      PH_NORM2: amt = is_add ? (b_lost ? 5'd0 : sb[4:0]) : 5'(nlz - 6'd16);
      PH_NRES:  amt = (nlz < 6'd16) ? nlz[4:0] : 5'd0;
      default:  amt = '0;
    endcase
  end

  bcd_shifter #(.N(PDIG)) u_shift (.din(norm_in), .amt, .dout(norm_out));

  // Addend window: digits 31..15 of the shifter output, below a zero digit.
  assign b_aligned = b_lost ? '0 : {4'd0, norm_out[4*PDIG-1:4*15]};

  // ---------------- recurrence stage -------------------------------------
  logic [NB-1:0]     pc_in, m2, mk, m2k;
  logic [1:0]        yh_sel;
  logic signed [2:0] yl, qh, ql;
  logic [1:0]        mag_h, mag_l;
  logic              neg_h, neg_l, inc_h, inc_l;
  logic [NB-1:0]     pph, ppl;
  logic [NB-1:0]     csa1_a, s1, s2;
  logic [N-1:0]      csa1_ci, csa2_ci, c1, c2;
  logic signed [4:0] qdig;

  assign pc_in = is_mul ? mx : my;

  bcd_precomp #(.N(N)) u_pre (.m(pc_in), .radix10, .m2, .mk, .m2k);
  mul_recode u_rec (.y(my[3:0]), .yh_sel, .yl);
  qds #(.N(N)) u_qds (.ws, .wc, .d(my), .radix10, .qh, .ql);

  always_comb begin
    mag_h = 2'd0; neg_h = 1'b0;
    mag_l = 2'd0; neg_l = 1'b0;
    if (is_mul) begin
      mag_h = yh_sel;
      mag_l = (yl < 0) ? 2'(-yl) : 2'(yl);
      neg_l = (yl < 0);
    end else if (is_div) begin
      mag_h = (qh < 0) ? 2'(-qh) : 2'(qh);
      neg_h = (qh > 0);
      mag_l = (ql < 0) ? 2'(-ql) : 2'(ql);
      neg_l = (ql > 0);
    end else begin
      mag_l = 2'd1;
      neg_l = eff_sub;
    end
  end

  pp_mux #(.N(N)) u_pph (.m1(mk), .m2(m2k), .mag(mag_h), .neg(neg_h), .radix10,
                         .pp(pph), .inc(inc_h));
  pp_mux #(.N(N)) u_ppl (.m1(pc_in), .m2(m2), .mag(mag_l), .neg(neg_l), .radix10,
                         .pp(ppl), .inc(inc_l));

  // radix shift and initial multiplexer in front of the first adder
  always_comb begin
    if (is_div) begin
      csa1_a  = ws << 4;
      csa1_ci = {wc[N-2:0], inc_h};
    end else if (is_mul) begin
      csa1_a  = ws;
      csa1_ci = wc;
    end else begin
      csa1_a  = mx;
      csa1_ci = '0;
    end
    csa2_ci = {c1[N-2:0], inc_l};
  end

  dr_csa #(.N(N)) u_csa1 (.a(csa1_a), .b(pph), .ci(csa1_ci), .radix10, .s(s1), .co(c1));
  dr_csa #(.N(N)) u_csa2 (.a(s1),     .b(ppl), .ci(csa2_ci), .radix10, .s(s2), .co(c2));

  always_comb qdig = radix10 ? 5'(5 * qh + ql) : 5'(4 * qh + ql);

  logic [NB-1:0] q_otf, qm_otf;
  otf_conv #(.N(N)) u_otf (
    .clk, .rst_n, .clear(phase == PH_INIT), .en(phase == PH_ITER && is_div),
    .radix10, .q(qdig), .qout(q_otf), .qmout(qm_otf)
  );

  // ---------------- conversion stage and rounding ------------------------
  logic [NB-1:0]      cpa_a, cpa_b, cpa_s, wc_digits;
  logic               cpa_cin, cpa_cout;
  logic [NB-1:0]      qf;
  logic [4*NDIG-1:0]  sig0;
  logic [3:0]         rdig;
  logic               sticky, round_up, res_neg, res_zero;
  logic [52:0]        bman;
  logic signed [13:0] e_pre;

  always_comb begin
    for (int i = 0; i < N; i++) wc_digits[4*i +: 4] = {3'b0, wc[i]};
    res_neg  = radix10 ? (zu[NB-1 -: 4] >= 4'd5) : zu[NB-1];
    res_zero = (zu == '0);
    qf       = res_neg ? qm_otf : q_otf;
    sig0     = '0;
    rdig     = '0;
    sticky   = 1'b0;
    bman     = '0;
    round_up = 1'b0;
    e_pre    = exp_base;
    if (is_add) begin
      if (zu[NB-1 -: 4] != 4'd0) begin
        sig0   = zu[NB-1:8];
        rdig   = zu[7:4];
        sticky = (zu[3:0] != 4'd0);
        e_pre  = exp_base + 14'sd1;
      end else if (zu[NB-5 -: 4] != 4'd0) begin
        sig0   = zu[NB-5:4];
        rdig   = zu[3:0];
      end else begin                        // cancelled: guard digit kept
        sig0   = zu[4*NDIG-1:0];
        e_pre  = exp_base - 14'sd1;
      end
    end else if (is_mul) begin
      if (nlz_q >= 6'd16) begin
        sig0 = nreg[4*NDIG-1:0];
      end else begin
        sig0   = nreg[4*PDIG-1:4*NDIG];
        rdig   = nreg[4*NDIG-1 -: 4];
        sticky = (nreg[4*NDIG-5:0] != '0);
        e_pre  = exp_base + 14'sd16 - $signed({8'b0, nlz_q});
      end
    end else if (is_ddiv) begin
      sig0   = qf[4*NDIG+3:4];
      rdig   = qf[3:0];
      sticky = !res_zero;
      e_pre  = exp_base - $signed({13'b0, ext});
    end else begin
      if (qf[56]) begin
        bman   = qf[56:4];
        rdig   = {3'b0, qf[3]};
        sticky = (qf[2:0] != 3'd0) || !res_zero;
      end else begin
        bman   = qf[55:3];
        rdig   = {3'b0, qf[2]};
        sticky = (qf[1:0] != 2'd0) || !res_zero;
        e_pre  = exp_base - 14'sd1;
      end
    end
    if (is_bdiv) round_up = rdig[0] && (sticky || bman[0]);
    else         round_up = (rdig > 4'd5) || (rdig == 4'd5 && (sticky || sig0[0]));

    if (phase == PH_ROUND) begin
      cpa_a   = is_bdiv ? NB'(bman) : NB'(sig0);
      cpa_b   = '0;
      cpa_cin = round_up;
    end else begin
      cpa_a   = ws;
      cpa_b   = wc_digits;
      cpa_cin = 1'b0;
    end
  end

  dr_cpa #(.N(N)) u_cpa (.a(cpa_a), .b(cpa_b), .cin(cpa_cin), .radix10,
                         .s(cpa_s), .cout(cpa_cout));

  // final significand, exponent and sign
  operand_t           res_next;
  logic signed [13:0] e_fin;
  logic               ovf_next, unf_next, dbz_next;
  always_comb begin
    e_fin    = e_pre;
    res_next = '0;
    if (is_bdiv) begin
      if (cpa_s[53]) e_fin = e_pre + 14'sd1;   // rounded up to 2.0
      res_next.sig  = {12'b0, cpa_s[53] ? 52'd0 : cpa_s[51:0]};
      res_next.sign = sign_base;
      ovf_next      = (e_fin > 14'(BIN_EMAX));
      unf_next      = (e_fin < 14'sd1);
      dbz_next      = (yq.exp == 11'd0) && (yq.sig[51:0] == 52'd0);
    end else begin
      if (cpa_s[4*NDIG +: 4] != 4'd0) begin    // rounded up to 10^16
        e_fin        = e_pre + 14'sd1;
        res_next.sig = {4'd1, {(4*NDIG-4){1'b0}}};
      end else begin
        res_next.sig = cpa_s[4*NDIG-1:0];
      end
      if (is_add)
        res_next.sign = (res_next.sig == '0) ? (add_sign & ~eff_sub) : add_sign;
      else
        res_next.sign = sign_base;
      ovf_next = (e_fin > 14'(DEC_EMAX));
      unf_next = (e_fin < 14'sd0);
      dbz_next = is_ddiv && (yq.sig == '0);
    end
    res_next.exp = is_bdiv ? e_fin[10:0] : {1'b0, e_fin[9:0]};
  end

  // ---------------- register updates ------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0; my <= '0; ws <= '0; wc <= '0; lsd <= '0; zu <= '0;
      nreg <= '0; nlz_q <= '0; add_sign <= 1'b0; ext <= 1'b0;
      result <= '0; overflow <= 1'b0; underflow <= 1'b0; div_by_zero <= 1'b0;
    end else begin
      case (phase)
        PH_NORM1: begin
          if (is_add) begin
            mx       <= {4'd0, norm_out[4*PDIG-1:4*15]};
            add_sign <= sign_base;
          end else begin
            my       <= NB'(norm_out[4*NDIG-1:0]);
          end
        end
        PH_NORM2: begin
          if (is_add) begin
            if (diff == '0 && b_aligned > mx) begin
              mx       <= b_aligned;
              my       <= mx;
              add_sign <= swap ? xq.sign : yq.sign;
            end else begin
              my <= b_aligned;
            end
          end else begin
            mx <= NB'(norm_out[4*NDIG-1:0]);
          end
        end
        PH_INIT: begin
          wc <= '0;
          if (is_mul) begin
            mx  <= NB'(xq.sig);
            my  <= NB'(yq.sig);
            ws  <= '0;
            lsd <= '0;
          end else if (is_bdiv) begin
            my <= NB'({1'b1, yq.sig[51:0], 4'b0});
            ws <= NB'({1'b1, xq.sig[51:0]});
          end else begin
            my  <= my << 8;
            ext <= (mx < my);
            ws  <= (mx < my) ? (mx << 4) : mx;
          end
        end
        PH_ITER: begin
          if (is_mul) begin
            ws  <= {(s2[NB-1 -: 4] >= 4'd8) ? 4'd9 : 4'd0, s2[NB-1:4]};
            wc  <= {1'b0, c2[N-2:0]};
            lsd <= {s2[3:0], lsd[4*NDIG-1:4]};
            my  <= my >> 4;
          end else begin
            ws <= s2;
            wc <= {c2[N-2:0], 1'b0};
          end
        end
        PH_CPA:  zu <= cpa_s;
        PH_NRES: begin
          nreg  <= norm_out;
          nlz_q <= nlz;
        end
        PH_ROUND: begin
          result      <= res_next;
          overflow    <= ovf_next;
          underflow   <= unf_next;
          div_by_zero <= dbz_next;
        end
        default: ;
      endcase
    end
  end

  // The carry-save residual of a division stays within half the divisor,
  // so its selected digits never leave the digit sets of the recurrence.
  a_qh_range: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_ITER && is_ddiv) |-> (qh >= -3'sd1 && qh <= 3'sd1));
endmodule
