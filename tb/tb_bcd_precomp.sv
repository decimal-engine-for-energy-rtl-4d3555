// tb_bcd_precomp: self-checking test of the multiple pre-computation.
// For random operands checks 2m, km and 2km modulo r^18 in both radices
// (k = 5 in radix 10, k = 4 in radix 16) with integer arithmetic.
module tb_bcd_precomp;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] m, m2, mk, m2k;
  logic           radix10;
  int checks = 0, failures = 0;

  bcd_precomp dut (.m, .radix10, .m2, .mk, .m2k);

  function automatic logic [127:0] val(input logic [4*N-1:0] v, input int r);
    logic [127:0] acc = 0;
    for (int i = N - 1; i >= 0; i--) acc = acc * r + 128'(v[4*i +: 4]);
    return acc;
  endfunction

  task automatic chk(input string what, input logic [4*N-1:0] got, input logic [127:0] want, input int r);
    logic ok = 1'b1;
    checks++;
    for (int i = 0; i < N; i++) if (int'(got[4*i +: 4]) >= r) ok = 1'b0;
    if (!ok || val(got, r) != want) begin
      failures++;
      if (failures < 5) $display("FAIL %s r=%0d m=%h got %h", what, r, m, got);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, k;
    logic [127:0] md, mv;
    for (int t = 0; t < 3000; t++) begin
      radix10 = (t % 2 == 0);
      r = radix10 ? 10 : 16;
      k = radix10 ? 5 : 4;
      md = 1;
      for (int i = 0; i < N; i++) md = md * r;
      for (int i = 0; i < N; i++) m[4*i +: 4] = 4'($urandom_range(r - 1));
      @(posedge clk);
      mv = val(m, r);
      chk("2m", m2, (2 * mv) % md, r);
      chk("km", mk, (k * mv) % md, r);
      chk("2km", m2k, (2 * k * mv) % md, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
