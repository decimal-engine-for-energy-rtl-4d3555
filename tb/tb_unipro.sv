// tb_unipro: end-to-end test of the decimal/binary floating-point engine.
//
// Issues random decimal64 additions, subtractions, multiplications and
// divisions and binary64 divisions, plus directed corner cases, and compares
// each result with a reference computed here with plain integer arithmetic
// (decimal) or the simulator's own double-precision division (binary). The
// latency of every operation is checked against 5 / 20 / 23 / 18 cycles.
// It counts how often each mechanism of the datapath was exercised (carry
// out of an addition, operand swap, truncated addend, rounded and exact
// products, extra dividend shift, negative final residual, negative quotient
// digits, rounding up, rounding overflow) and fails if one never occurred.
// The engine is used at its default (and only) size. NRAND sets the number
// of random operations per kind.
module tb_unipro;
  import unipro_pkg::*;

  localparam int NRAND = 2000;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     start = 1'b0;
  op_e      op = OP_DFP_ADD;
  operand_t x = '0, y = '0;
  logic     busy, done, overflow, underflow, div_by_zero;
  operand_t result;

  unipro dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic logic [127:0] p10(input int e);
    logic [127:0] p = 1;
    for (int i = 0; i < e; i++) p = p * 10;
    return p;
  endfunction

  function automatic logic [127:0] bcd2u(input logic [63:0] b);
    logic [127:0] v = 0;
    for (int i = 15; i >= 0; i--) v = v * 10 + 128'(b[4*i +: 4]);
    return v;
  endfunction

  function automatic logic [63:0] u2bcd(input logic [127:0] v);
    logic [63:0] b = 0;
    for (int i = 0; i < 16; i++) begin
      b[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return b;
  endfunction

  function automatic int ndigits(input logic [127:0] v);
    int n = 0;
    while (v != 0) begin n++; v = v / 10; end
    return n;
  endfunction

  function automatic logic [63:0] rand_sig(input int nd);
    logic [63:0] b = 0;
    for (int i = 0; i < nd; i++) b[4*i +: 4] = 4'($urandom_range(9));
    if (nd > 0 && $urandom_range(1)) b[4*(nd-1) +: 4] = 4'($urandom_range(9, 1));
    return b;
  endfunction

  // Round num/den (den > 0) to nearest, ties to even.
  function automatic logic [127:0] rne_div(input logic [127:0] num, input logic [127:0] den);
    logic [127:0] q = num / den, r = num % den;
    if (2 * r > den || (2 * r == den && q[0])) q = q + 1;
    return q;
  endfunction

  // ------------------------------------------------------------ references
  typedef struct {
    logic [127:0] sig;
    int           exp;   // biased
    logic         sign;
  } dref_t;

  // Fit a non-negative integer value*10^e into 16 digits, rounding.
  function automatic dref_t fit16(input logic [127:0] v, input int e, input logic s);
    dref_t r;
    int nd = ndigits(v);
    r.sign = s;
    if (nd > 16) begin
      v = rne_div(v, p10(nd - 16));
      e = e + nd - 16;
      if (v == p10(16)) begin v = p10(15); e++; end
    end
    r.sig = v;
    r.exp = e;
    return r;
  endfunction

  function automatic dref_t ref_mul(input operand_t a, input operand_t b);
    return fit16(bcd2u(a.sig) * bcd2u(b.sig), int'(a.exp) + int'(b.exp) - DEC_BIAS, a.sign ^ b.sign);
  endfunction

  function automatic dref_t ref_div(input operand_t a, input operand_t b);
    dref_t r;
    logic [127:0] an = bcd2u(a.sig), bn = bcd2u(b.sig), q;
    int e = int'(a.exp) - int'(b.exp) + DEC_BIAS;
    if (an == 0) begin
      r.sig = 0; r.exp = e; r.sign = a.sign ^ b.sign;
      return r;
    end
    while (an < p10(15)) begin an = an * 10; e--; end
    while (bn < p10(15)) begin bn = bn * 10; e++; end
    if (an < bn) begin an = an * 10; e--; end
    q = rne_div(an * p10(15), bn);
    e = e - 15;
    if (q == p10(16)) begin q = p10(15); e++; end
    r.sig = q; r.exp = e; r.sign = a.sign ^ b.sign;
    return r;
  endfunction

  // Addition: the operand with the more significant leading digit is
  // aligned so that its leading digit is the 16th digit above a guard digit;
  // digits of the other operand below the guard digit are dropped; the sum
  // keeps the 16 digits from its leading digit down, but never goes below the
  // guard digit, rounding the rest.
  function automatic dref_t ref_add(input operand_t a, input operand_t b);
    dref_t r;
    logic [127:0] av = bcd2u(a.sig), bv = bcd2u(b.sig), ai, bi, s;
    int ea = int'(a.exp), eb = int'(b.exp), u, nd, sh;
    logic sa = a.sign, sb = b.sign, sr;
    int lead_a = (av == 0) ? -100000 : ea + ndigits(av);
    int lead_b = (bv == 0) ? -100000 : eb + ndigits(bv);
    if (lead_b > lead_a) begin
      {av, bv} = {bv, av}; {ea, eb} = {eb, ea}; {sa, sb} = {sb, sa};
      lead_a = lead_b;
    end
    if (av == 0) u = ea - 17; else u = lead_a - 17;
    ai = av * p10(ea - u);
    if (eb >= u) bi = bv * p10(eb - u);
    else if (u - eb > 30) bi = 0;
    else bi = bv / p10(u - eb);
    if (sa == sb) begin s = ai + bi; sr = sa; end
    else if (ai >= bi) begin s = ai - bi; sr = sa; end
    else begin s = bi - ai; sr = sb; end
    sh = (s >= p10(17)) ? 2 : (s >= p10(16)) ? 1 : 0;
    s  = rne_div(s, p10(sh));
    u  = u + sh;
    if (s == p10(16)) begin s = p10(15); u++; end
    if (s == 0) sr = (sa == sb) ? sa : 1'b0;
    r.sig = s; r.exp = u; r.sign = sr;
    return r;
  endfunction

  // ------------------------------------------------------------ coverage
  int cov_add_carry = 0, cov_add_cancel = 0, cov_add_swap = 0, cov_add_trunc = 0, cov_add_sub = 0;
  int cov_mul_round = 0, cov_mul_exact = 0, cov_round_ovf = 0, cov_round_up = 0;
  int cov_ddiv_ext = 0, cov_ddiv_noext = 0, cov_res_neg = 0, cov_qneg = 0;
  int cov_bdiv_hi = 0, cov_bdiv_lo = 0;

  always @(posedge clk) begin
    if (dut.phase == PH_ROUND) begin
      if (dut.round_up) cov_round_up++;
      if (dut.cpa_s[64 +: 4] != 0 && !dut.is_bdiv) cov_round_ovf++;
      if (dut.is_add && dut.zu[71:68] != 0) cov_add_carry++;
      if (dut.is_add && dut.zu[71:64] == 0 && dut.zu != 0) cov_add_cancel++;
      if (dut.is_div && dut.res_neg) cov_res_neg++;
      if (dut.is_ddiv && dut.ext) cov_ddiv_ext++;
      if (dut.is_ddiv && !dut.ext) cov_ddiv_noext++;
      if (dut.is_mul && dut.nlz_q < 16) cov_mul_round++;
      if (dut.is_mul && dut.nlz_q >= 16) cov_mul_exact++;
      if (dut.is_bdiv && dut.qf[56]) cov_bdiv_hi++;
      if (dut.is_bdiv && !dut.qf[56]) cov_bdiv_lo++;
    end
    if (dut.phase == PH_NORM2 && dut.is_add) begin
      if (dut.diff == 0 && dut.b_aligned > dut.mx) cov_add_swap++;
      if (dut.b_lost || (dut.sb < 15)) cov_add_trunc++;
      if (dut.eff_sub) cov_add_sub++;
    end
    if (dut.phase == PH_ITER && dut.is_div && dut.qdig < 0) cov_qneg++;
  end

  // ------------------------------------------------------------ driver
  task automatic issue(input op_e o, input operand_t a, input operand_t b, output int lat);
    @(negedge clk);
    op = o; x = a; y = b; start = 1'b1;
    @(posedge clk);             // accepting edge
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end while (!done);
  endtask

  task automatic check_dec(input op_e o, input operand_t a, input operand_t b);
    dref_t r;
    int lat;
    issue(o, a, b, lat);
    case (o)
      OP_DFP_MUL: r = ref_mul(a, b);
      OP_DFP_DIV: r = ref_div(a, b);
      OP_DFP_SUB: r = ref_add(a, operand_t'({~b.sign, b.exp, b.sig}));
      default:    r = ref_add(a, b);
    endcase
    checks++;
    if (result.sig != u2bcd(r.sig) || result.sign != r.sign ||
        (r.sig != 0 && int'(result.exp[9:0]) != r.exp) || overflow || underflow) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d:%h:%0d b=%0d:%h:%0d got %0d:%h:%0d exp %0d:%h:%0d",
                 o.name(), a.sign, a.sig, a.exp, b.sign, b.sig, b.exp,
                 result.sign, result.sig, result.exp, r.sign, u2bcd(r.sig), r.exp);
    end
    checks++;
    if (lat != int'(op_latency(o))) begin
      failures++;
      if (failures < 10) $display("FAIL latency %s %0d", o.name(), lat);
    end
  endtask

  function automatic operand_t bfp_op(input real v);
    logic [63:0] b = $realtobits(v);
    operand_t o;
    o.sign = b[63]; o.exp = b[62:52]; o.sig = {12'b0, b[51:0]};
    return o;
  endfunction

  function automatic operand_t rand_bfp();
    operand_t o;
    o.sign = 1'($urandom_range(1));
    o.exp  = 11'($urandom_range(1023 + 200, 1023 - 200));
    o.sig  = {12'b0, 20'($urandom), 32'($urandom)};
    if ($urandom_range(7) == 0) o.sig[51:0] = '0;
    return o;
  endfunction

  task automatic check_bdiv(input operand_t a, input operand_t b);
    int lat;
    logic [63:0] ra, rb, want;
    issue(OP_BFP_DIV, a, b, lat);
    ra = {a.sign, a.exp, a.sig[51:0]};
    rb = {b.sign, b.exp, b.sig[51:0]};
    want = $realtobits($bitstoreal(ra) / $bitstoreal(rb));
    checks++;
    if ({result.sign, result.exp, result.sig[51:0]} != want || overflow || underflow) begin
      failures++;
      if (failures < 10) $display("FAIL BFP_DIV %h / %h got %h want %h", ra, rb,
                                  {result.sign, result.exp, result.sig[51:0]}, want);
    end
    checks++;
    if (lat != 18) begin
      failures++;
      if (failures < 10) $display("FAIL latency BFP_DIV %0d", lat);
    end
  endtask

  task automatic check_flags(input op_e o, input operand_t a, input operand_t b,
                           input logic want_ovf, input logic want_unf, input logic want_dbz);
    int lat;
    issue(o, a, b, lat);
    checks++;
    if (overflow != want_ovf || underflow != want_unf || div_by_zero != want_dbz) begin
      failures++;
      $display("FAIL flags %s ovf=%b unf=%b dbz=%b", o.name(), overflow, underflow, div_by_zero);
    end
  endtask

  function automatic operand_t rand_dec(input int emin, input int emax);
    operand_t o;
    o.sign = 1'($urandom_range(1));
    o.exp  = 11'($urandom_range(emax, emin));
    o.sig  = rand_sig($urandom_range(16, ($urandom_range(3) == 0) ? 1 : 12));
    return o;
  endfunction

  function automatic operand_t dec(input logic s, input logic [63:0] sig, input int e);
    operand_t o;
    o.sign = s; o.exp = 11'(e); o.sig = sig;
    return o;
  endfunction

  task automatic cover_check(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else $display("  %-22s %0d", name, n);
  endtask

  initial begin
    operand_t a, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // directed cases
    check_dec(OP_DFP_ADD, dec(0, 64'h1, 398), dec(0, 64'h2, 398));
    check_dec(OP_DFP_ADD, dec(0, 64'h9999999999999999, 398), dec(0, 64'h1, 398));
    check_dec(OP_DFP_SUB, dec(0, 64'h5, 398), dec(0, 64'h7, 398));
    check_dec(OP_DFP_SUB, dec(0, 64'h123, 400), dec(0, 64'h123, 400));
    check_dec(OP_DFP_ADD, dec(0, 64'h1, 420), dec(0, 64'h5, 398));
    check_dec(OP_DFP_ADD, dec(0, 64'h1000000000000000, 398), dec(0, 64'h5, 397));
    check_dec(OP_DFP_ADD, dec(0, 64'h9999999999999999, 398), dec(0, 64'h5, 397));
    check_dec(OP_DFP_MUL, dec(0, 64'h9999999999999999, 398), dec(1, 64'h9999999999999999, 398));
    check_dec(OP_DFP_MUL, dec(0, 64'h12, 398), dec(0, 64'h34, 390));
    check_dec(OP_DFP_MUL, dec(0, 64'h0, 398), dec(0, 64'h34, 390));
    check_dec(OP_DFP_MUL, dec(0, 64'h5000000000000001, 398), dec(0, 64'h2, 398));
    check_dec(OP_DFP_DIV, dec(0, 64'h1, 398), dec(0, 64'h3, 398));
    check_dec(OP_DFP_DIV, dec(1, 64'h2, 398), dec(0, 64'h3, 398));
    check_dec(OP_DFP_DIV, dec(0, 64'h9999999999999999, 398), dec(0, 64'h1, 398));
    check_dec(OP_DFP_DIV, dec(0, 64'h1, 398), dec(0, 64'h9999999999999999, 398));
    check_bdiv(bfp_op(1.0), bfp_op(3.0));
    check_bdiv(bfp_op(-7.5), bfp_op(2.5));
    check_bdiv(bfp_op(1.0), bfp_op(1.9999999999999998));
    check_bdiv(bfp_op(1.9999999999999998), bfp_op(1.0));

    for (int i = 0; i < NRAND; i++) begin
      a = rand_dec(300, 500);
      b = rand_dec(int'(a.exp) - 20, int'(a.exp) + 20);
      check_dec(($urandom_range(1) == 1) ? OP_DFP_SUB : OP_DFP_ADD, a, b);
      check_dec(OP_DFP_MUL, rand_dec(330, 460), rand_dec(330, 460));
      a = rand_dec(350, 450);
      b = rand_dec(350, 450);
      if (b.sig == 0) b.sig = 64'h7;
      if (a.sig == 0) a.sig = 64'h3;
      check_dec(OP_DFP_DIV, a, b);
      check_bdiv(rand_bfp(), rand_bfp());
    end

    check_dec(OP_DFP_SUB, dec(0, 64'h1000000000000000, 398), dec(0, 64'h9999999999999999, 397));
    check_dec(OP_DFP_SUB, dec(0, 64'h1234567890123456, 398), dec(0, 64'h1234567890123455, 398));
    // zero operands
    check_dec(OP_DFP_ADD, dec(0, 64'h0, 398), dec(1, 64'h123, 390));
    check_dec(OP_DFP_ADD, dec(1, 64'h0, 398), dec(1, 64'h0, 390));
    check_dec(OP_DFP_SUB, dec(0, 64'h0, 400), dec(0, 64'h0, 400));
    check_dec(OP_DFP_DIV, dec(0, 64'h0, 398), dec(0, 64'h7, 398));
    check_flags(OP_DFP_MUL, dec(0, 64'h1, 767), dec(0, 64'h1, 767), 1, 0, 0);
    check_flags(OP_DFP_MUL, dec(0, 64'h1, 0), dec(0, 64'h1, 0), 0, 1, 0);
    check_flags(OP_DFP_DIV, dec(0, 64'h5, 398), dec(0, 64'h0, 398), 0, 0, 1);
    check_flags(OP_BFP_DIV, bfp_op(1.0e300), bfp_op(1.0e-300), 1, 0, 0);
    check_flags(OP_BFP_DIV, bfp_op(1.0e-300), bfp_op(1.0e300), 0, 1, 0);
    check_flags(OP_BFP_DIV, bfp_op(1.0), bfp_op(0.0), 0, 0, 1);

    // back-to-back: start given in the cycle done is high
    check_dec(OP_DFP_MUL, dec(0, 64'h25, 398), dec(0, 64'h4, 398));

    $display("mechanisms exercised:");
    cover_check("add carry digit", cov_add_carry);
    cover_check("add cancellation", cov_add_cancel);
    cover_check("add operand swap", cov_add_swap);
    cover_check("add truncated addend", cov_add_trunc);
    cover_check("add effective sub", cov_add_sub);
    cover_check("mul rounded", cov_mul_round);
    cover_check("mul exact", cov_mul_exact);
    cover_check("round up", cov_round_up);
    cover_check("round overflow", cov_round_ovf);
    cover_check("ddiv extra shift", cov_ddiv_ext);
    cover_check("ddiv no extra shift", cov_ddiv_noext);
    cover_check("negative residual", cov_res_neg);
    cover_check("negative q digit", cov_qneg);
    cover_check("bdiv quotient >= 1", cov_bdiv_hi);
    cover_check("bdiv quotient < 1", cov_bdiv_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
