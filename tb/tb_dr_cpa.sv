// tb_dr_cpa: self-checking test of the dual-radix carry-propagate adder.
// Random 18-digit BCD and 72-bit binary operands with a random carry in;
// the sum and carry out are compared with integer arithmetic.
module tb_dr_cpa;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] a, b, s;
  logic           cin, cout, radix10;
  int checks = 0, failures = 0;

  dr_cpa dut (.a, .b, .cin, .radix10, .s, .cout);

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
    logic [127:0] m, want;
    for (int t = 0; t < 4000; t++) begin
      radix10 = (t % 2 == 0);
      r = radix10 ? 10 : 16;
      m = 1;
      for (int i = 0; i < N; i++) m = m * r;
      for (int i = 0; i < N; i++) begin
        a[4*i +: 4] = 4'($urandom_range(r - 1));
        b[4*i +: 4] = ($urandom_range(3) == 0) ? 4'(r - 1 - a[4*i +: 4]) : 4'($urandom_range(r - 1));
      end
      cin = 1'($urandom_range(1));
      @(posedge clk);
      want = val(a, r) + val(b, r) + 128'(cin);
      checks++;
      if (val(s, r) != want % m || cout != (want >= m)) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d a=%h b=%h cin=%b s=%h cout=%b", r, a, b, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
