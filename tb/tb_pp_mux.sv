// tb_pp_mux: self-checking test of the multiple multiplexer. For random
// inputs, magnitudes and signs the output plus inc must equal +-0, +-m1 or
// +-m2 modulo r^18, and every output digit must be valid in the radix.
module tb_pp_mux;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] m1, m2, pp;
  logic [1:0]     mag;
  logic           neg, radix10, inc;
  int checks = 0, failures = 0;

  pp_mux dut (.m1, .m2, .mag, .neg, .radix10, .pp, .inc);

  function automatic logic [127:0] val(input logic [4*N-1:0] v, input int r);
    logic [127:0] acc = 0;
    for (int i = N - 1; i >= 0; i--) acc = acc * r + 128'(v[4*i +: 4]);
    return acc;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [127:0] md, sel, want;
    logic digits_ok;
    for (int t = 0; t < 3000; t++) begin
      radix10 = (t % 2 == 0);
      r = radix10 ? 10 : 16;
      md = 1;
      for (int i = 0; i < N; i++) md = md * r;
      for (int i = 0; i < N; i++) begin
        m1[4*i +: 4] = 4'($urandom_range(r - 1));
        m2[4*i +: 4] = 4'($urandom_range(r - 1));
      end
      mag = 2'($urandom_range(2));
      neg = 1'($urandom_range(1));
      @(posedge clk);
      sel  = (mag == 1) ? val(m1, r) : (mag == 2) ? val(m2, r) : 0;
      want = neg ? (md - sel) % md : sel;
      digits_ok = 1'b1;
      for (int i = 0; i < N; i++) if (int'(pp[4*i +: 4]) >= r) digits_ok = 1'b0;
      checks++;
      if ((val(pp, r) + 128'(inc)) % md != want || inc != neg || !digits_ok) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d mag=%0d neg=%b pp=%h", r, mag, neg, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
