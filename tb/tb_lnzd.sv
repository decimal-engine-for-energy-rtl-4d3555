// tb_lnzd: checks the leading non-zero digit detector on words with a
// random number of leading zero digits, including the all-zero word.
module tb_lnzd;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] din;
  logic [5:0]     count;
  int checks = 0, failures = 0;

  lnzd dut (.din, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lz;
    for (int t = 0; t < 3000; t++) begin
      lz = $urandom_range(N);
      din = '0;
      for (int i = 0; i < N - lz; i++) din[4*i +: 4] = 4'($urandom_range(15));
      if (lz < N) din[4*(N-1-lz) +: 4] = 4'($urandom_range(15, 1));
      @(posedge clk);
      checks++;
      if (int'(count) != lz) begin
        failures++;
        if (failures < 5) $display("FAIL din=%h count=%0d want %0d", din, count, lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
