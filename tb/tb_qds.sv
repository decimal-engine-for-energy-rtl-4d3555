// tb_qds: self-checking test of the quotient-digit selection.
// Builds random normalized divisors (MSD of a decimal divisor in digit 17,
// a binary divisor in [2^56, 2^57)) and residuals |w| <= d/2, splits each
// residual into a random carry-save pair modulo r^18, and checks that qH and
// qL lie in their digit sets and that the next residual r*w - (k*qH + qL)*d
// again has magnitude at most d/2.
module tb_qds;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0]    ws, d;
  logic [N-1:0]      wc;
  logic              radix10;
  logic signed [2:0] qh, ql;
  int checks = 0, failures = 0;

  qds dut (.ws, .wc, .d, .radix10, .qh, .ql);

  function automatic logic [4*N-1:0] to_dec(input logic [127:0] v);
    logic [4*N-1:0] b;
    for (int i = 0; i < N; i++) begin b[4*i +: 4] = 4'(v % 10); v = v / 10; end
    return b;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] md, dv, wm, cval, p;
    logic signed [127:0] w, wn;
    int r, k;
    for (int t = 0; t < 4000; t++) begin
      radix10 = (t % 2 == 0);
      r = radix10 ? 10 : 16;
      k = radix10 ? 5 : 4;
      md = 1;
      for (int i = 0; i < N; i++) md = md * r;
      if (radix10) begin
        dv = 0;
        for (int i = 0; i < 16; i++) dv = dv * 10 + 128'($urandom_range(9));
        dv = dv + 128'($urandom_range(9, 1)) * 128'(1000000000000000);   // 16 digits
        dv = dv * 100;                                                    // MSD at digit 17
        if (dv >= md) dv = md - 1 - 128'($urandom_range(1000));
      end else begin
        dv = (128'(1) << 56) | (128'({$urandom, $urandom}) & ((128'(1) << 56) - 1));
      end
      // residual in [-d/2, d/2]
      w = $signed({64'b0, $urandom, $urandom, $urandom}) % $signed(dv / 2 + 1);
      if ($urandom_range(1)) w = -w;
      if (t % 50 == 0) w = $signed(dv / 2);
      if (t % 50 == 1) w = -$signed(dv / 2);
      wm = (w < 0) ? md - 128'(-w) : 128'(w);
      // random carry bits, digit word takes the rest
      wc = '0;
      cval = 0;
      p = 1;
      for (int i = 0; i < N; i++) begin
        wc[i] = 1'($urandom_range(1));
        if (wc[i]) cval = cval + p;
        p = p * r;
      end
      ws = radix10 ? to_dec((wm + md - (cval % md)) % md) : 72'((wm + md - (cval % md)) % md);
      d  = radix10 ? to_dec(dv) : 72'(dv);
      @(posedge clk);
      wn = $signed(r) * w - $signed(k * int'(qh) + int'(ql)) * $signed(dv);
      checks++;
      if (ql < -2 || ql > 2 || (radix10 && (qh < -1 || qh > 1)) || qh < -2 || qh > 2 ||
          2 * wn > $signed(dv) || 2 * wn < -$signed(dv)) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d w=%0d d=%0d qh=%0d ql=%0d", r, w, dv, qh, ql);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
