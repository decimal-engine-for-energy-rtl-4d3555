// tb_sign_exp: self-checking test of the sign and exponent unit.
// Random decimal operands with random leading zeros and exponents; checks
// the leading-zero counts, the choice of the larger addend (by the weight of
// its leading digit), the alignment difference, the result sign and the
// biased exponent before rounding for every opcode.
module tb_sign_exp;
  import unipro_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  op_e                op;
  operand_t           x, y;
  logic [4:0]         lzx, lzy;
  logic               swap, sign_base, eff_sub;
  logic [13:0]        diff;
  logic signed [13:0] exp_base;
  int checks = 0, failures = 0;

  sign_exp dut (.op, .x, .y, .lzx, .lzy, .swap, .diff, .exp_base, .sign_base, .eff_sub);

  function automatic operand_t rnd(output int nd);
    operand_t o;
    nd = $urandom_range(16);
    o.sig = '0;
    for (int i = 0; i < nd; i++) o.sig[4*i +: 4] = 4'($urandom_range(9));
    if (nd > 0) o.sig[4*(nd-1) +: 4] = 4'($urandom_range(9, 1));
    o.exp  = 11'($urandom_range(767));
    o.sign = 1'($urandom_range(1));
    return o;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ndx, ndy, lead_x, lead_y, wexp, wdiff;
    logic wswap, wsign;
    op_e ops[5] = '{OP_DFP_ADD, OP_DFP_SUB, OP_DFP_MUL, OP_DFP_DIV, OP_BFP_DIV};
    for (int t = 0; t < 3000; t++) begin
      x  = rnd(ndx);
      y  = rnd(ndy);
      if (t % 7 == 0) y.exp = 11'(int'(x.exp) + ndx - ndy);   // equal leading weight
      op = ops[t % 5];
      @(posedge clk);
      lead_x = (ndx == 0) ? -1000 : int'(x.exp) + ndx;
      lead_y = (ndy == 0) ? -1000 : int'(y.exp) + ndy;
      wswap  = lead_y > lead_x;
      wdiff  = wswap ? lead_y - lead_x : lead_x - lead_y;
      wsign  = x.sign ^ y.sign;
      case (op)
        OP_DFP_MUL: wexp = int'(x.exp) + int'(y.exp) - 398;
        OP_DFP_DIV: wexp = int'(x.exp) - int'(y.exp) + (16 - ndy) - (16 - ndx) - 15 + 398;
        OP_BFP_DIV: wexp = int'(x.exp) - int'(y.exp) + 1023;
        default: begin
          wexp  = wswap ? lead_y - 16 : lead_x - 16;
          wsign = wswap ? y.sign : x.sign;
          if (ndx == 0 && ndy == 0) wexp = int'(x.exp) - 16;   // both zero: x kept
        end
      endcase
      checks++;
      if (int'(lzx) != 16 - ndx || int'(lzy) != 16 - ndy || int'(exp_base) != wexp ||
          sign_base != wsign || eff_sub != (x.sign ^ y.sign) ||
          (ndx > 0 && ndy > 0 && (swap != wswap || int'(diff) != wdiff)) ||
          (ndx == 0 && ndy > 0 && !swap) || (ndy == 0 && swap)) begin
        failures++;
        if (failures < 5) $display("FAIL %s x=%h/%0d y=%h/%0d exp=%0d want %0d swap=%b",
                                   op.name(), x.sig, x.exp, y.sig, y.exp, exp_base, wexp, swap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
