// sign_exp: sign and exponent handling.
//
// Works on the two operands held at the engine's inputs and provides, for the
// operation in op:
//   lzx, lzy   leading zero digits of the two decimal significands (0..16)
//   swap       DFP add: y is the operand whose leading digit has the larger
//              weight (exponent minus leading zeros), x otherwise; a zero
//              operand never wins against a non-zero one
//   diff       DFP add: difference of those two adjusted exponents
//   exp_base   biased result exponent before the data-dependent corrections
//              made at rounding time:
//                add : adjusted exponent of the larger operand
//                mul : ex + ey - 398
//                ddiv: ex - ey + lzy - lzx - 15 + 398
//                bdiv: ex - ey + 1023
//   sign_base  add: sign of the larger operand; otherwise sx xor sy
//   eff_sub    DFP add: the signs differ (subtraction after the sign flip
//              of OP_DFP_SUB, which the engine applies when it latches y)
// The paper only says that this unit computes the result sign and
// exponent and gives flags to the controller; the formulas follow from the
// alignment and normalization steps it describes. Combinational.
module sign_exp
  import unipro_pkg::*;
(
  input  op_e                op,
  input  operand_t           x,
  input  operand_t           y,
  output logic [4:0]         lzx,
  output logic [4:0]         lzy,
  output logic               swap,
  output logic [13:0]        diff,
  output logic signed [13:0] exp_base,
  output logic               sign_base,
  output logic               eff_sub
);
  logic signed [13:0] ex, ey, eadj_x, eadj_y;
  logic               x_zero, y_zero;

  lnzd #(.N(NDIG)) u_lzx (.din(x.sig), .count(lzx));
  lnzd #(.N(NDIG)) u_lzy (.din(y.sig), .count(lzy));

  always_comb begin
    ex     = $signed({3'b0, x.exp});
    ey     = $signed({3'b0, y.exp});
    x_zero = (lzx == 5'(NDIG));
    y_zero = (lzy == 5'(NDIG));
    eadj_x = ex - $signed({9'b0, lzx});
    eadj_y = ey - $signed({9'b0, lzy});
    swap   = (x_zero && !y_zero) || (!x_zero && !y_zero && (eadj_y > eadj_x));
    diff   = swap ? 14'(eadj_y - eadj_x) : 14'(eadj_x - eadj_y);
    eff_sub = x.sign ^ y.sign;
    case (op)
      OP_DFP_ADD, OP_DFP_SUB: begin
        exp_base  = swap ? eadj_y : eadj_x;
        sign_base = swap ? y.sign : x.sign;
      end
      OP_DFP_MUL: begin
        exp_base  = ex + ey - 14'(DEC_BIAS);
        sign_base = x.sign ^ y.sign;
      end
      OP_DFP_DIV: begin
        exp_base  = ex - ey + $signed({9'b0, lzy}) - $signed({9'b0, lzx})
                    - 14'sd15 + 14'(DEC_BIAS);
        sign_base = x.sign ^ y.sign;
      end
      default: begin
        exp_base  = ex - ey + 14'(BIN_BIAS);
        sign_base = x.sign ^ y.sign;
      end
    endcase
  end
endmodule
