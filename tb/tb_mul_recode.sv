// tb_mul_recode: checks the multiplier digit recoding against the recoding
// table (yH, yL for every digit 0..9) and that yH + yL equals the digit.
module tb_mul_recode;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [3:0]        y;
  logic [1:0]        yh_sel;
  logic signed [2:0] yl;
  int checks = 0, failures = 0;
  int tab_h[10] = '{0, 0, 0, 5, 5, 5, 5, 5, 10, 10};
  int tab_l[10] = '{0, 1, 2, -2, -1, 0, 1, 2, -2, -1};

  mul_recode dut (.y, .yh_sel, .yl);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int yh;
    for (int d = 0; d < 10; d++) begin
      y = 4'(d);
      @(posedge clk);
      yh = 5 * int'(yh_sel);
      checks++;
      if (yh != tab_h[d] || int'(yl) != tab_l[d] || yh + int'(yl) != d) begin
        failures++;
        $display("FAIL y=%0d yh=%0d yl=%0d", d, yh, yl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
