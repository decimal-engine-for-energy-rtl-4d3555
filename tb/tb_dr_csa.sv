// tb_dr_csa: self-checking test of the dual-radix carry-save adder.
// Random BCD (radix 10) and hexadecimal (radix 16) operands with random
// carry bits; every digit position must satisfy s + r*co = a + b + ci with
// s a valid digit of the radix.
module tb_dr_csa;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] a, b, s;
  logic [N-1:0]   ci, co;
  logic           radix10;
  int checks = 0, failures = 0;

  dr_csa dut (.a, .b, .ci, .radix10, .s, .co);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int t = 0; t < 4000; t++) begin
      radix10 = (t % 2 == 0);
      r = radix10 ? 10 : 16;
      for (int i = 0; i < N; i++) begin
        a[4*i +: 4] = 4'($urandom_range(r - 1));
        b[4*i +: 4] = 4'($urandom_range(r - 1));
        ci[i]       = 1'($urandom_range(1));
      end
      if (t < 4) begin
        a = radix10 ? {N{4'd9}} : {N{4'hf}};
        b = a;
        ci = '1;
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(s[4*i +: 4]) + r * int'(co[i]) != int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + int'(ci[i])
            || int'(s[4*i +: 4]) >= r) begin
          failures++;
          if (failures < 5) $display("FAIL r=%0d digit %0d a=%h b=%h ci=%b s=%h co=%b", r, i,
                                     a[4*i +: 4], b[4*i +: 4], ci[i], s[4*i +: 4], co[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
