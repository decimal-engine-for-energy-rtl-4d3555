// qds: dual-radix quotient-digit selection of the division recurrence.
//
// The recurrence is   v[j] = r*w[j-1] - qH*k*d,   w[j] = v[j] - qL*d
// with r = 10, k = 5, qH in {-1,0,1} (radix 10) or r = 16, k = 4,
// qH in {-2..2} (radix 16), and qL in {-2..2}; the quotient digit is
// q = k*qH + qL. This block returns qH = SEL_H(r*w, d) and qL = SEL_L(v, d).
//
// The residual arrives in carry-save form modulo r^N: ws holds N digits and
// wc one carry bit per digit position (weight r^i). The block reduces it to
// one signed binary number (in radix 10 a residual of 5*10^(N-1) or more is
// negative), and selects by rounding: qH is r*w/(k*d) rounded to the nearest
// integer and clipped, qL is v/d rounded and clipped. With |w| <= d/2 this
// keeps |w[j]| <= d/2, inside the convergence bound rho*d of both radices.
// The paper does not give the selection functions; this exact-comparison
// form is this design's choice, chosen for simplicity, not for speed.
// d must be below r^N / 2 in radix 16 and below 10^N in radix 10.
// Combinational.
module qds #(
  parameter int unsigned N = 18
) (
  input  logic [4*N-1:0]     ws,
  input  logic [N-1:0]       wc,
  input  logic [4*N-1:0]     d,
  input  logic               radix10,
  output logic signed [2:0]  qh,
  output logic signed [2:0]  ql
);
  localparam int unsigned BW = 4 * N + 24;   // width of the binary evaluation

  function automatic logic [BW-1:0] pow10(input int unsigned e);
    logic [BW-1:0] p;
    p = 1;
    for (int unsigned i = 0; i < e; i++) p = p * 10;
    return p;
  endfunction

  localparam logic [BW-1:0] MOD10 = pow10(N);

  always_comb begin
    logic [BW-1:0]        dec_s, dec_c, tot, dval;
    logic signed [BW-1:0] w, rw, kd, v;
    dec_s = '0;
    dec_c = '0;
    dval  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      dec_s = dec_s * 10 + BW'(ws[4*i +: 4]);
      dec_c = dec_c * 10 + BW'(wc[i]);
      dval  = dval  * 10 + BW'(d[4*i +: 4]);
    end
    if (radix10) begin
      tot = dec_s + dec_c;
      if (tot >= MOD10) tot = tot - MOD10;
      w   = (tot >= MOD10 / 2) ? $signed(tot - MOD10) : $signed(tot);
      rw  = w * 10;
      kd  = $signed(dval * 5);
    end else begin
      tot = '0;   // the carry of position i has weight 16^i
      for (int i = 0; i < N; i++) tot[4*i] = wc[i];
      tot = BW'(ws) + tot;
      tot[BW-1:4*N] = {(BW-4*N){tot[4*N-1]}};
      w   = $signed(tot);
      rw  = w * 16;
      dval = BW'(d);
      kd  = $signed(dval * 4);
    end
    // SEL_H: nearest integer to r*w / (k*d)
    qh = 3'sd0;
    if (2 * rw >= kd)       qh = 3'sd1;
    if (2 * rw < -kd)       qh = -3'sd1;
    if (!radix10) begin
      if (2 * rw >= 3 * kd) qh = 3'sd2;
      if (2 * rw < -3 * kd) qh = -3'sd2;
    end
    // SEL_L: nearest integer to v / d, clipped to {-2..2}
    v  = rw - BW'(qh) * kd;
    ql = 3'sd0;
    if (2 * v >= $signed(dval))      ql = 3'sd1;
    if (2 * v >= 3 * $signed(dval))  ql = 3'sd2;
    if (2 * v < -$signed(dval))      ql = -3'sd1;
    if (2 * v < -3 * $signed(dval))  ql = -3'sd2;
  end
endmodule
