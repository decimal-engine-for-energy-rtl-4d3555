// tb_bcd_shifter: checks the 32-digit left barrel shifter for every shift
// amount with random words; the expected value is built digit by digit.
module tb_bcd_shifter;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4*N-1:0] din, dout, want;
  logic [4:0]     amt;
  int checks = 0, failures = 0;

  bcd_shifter dut (.din, .amt, .dout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) din[4*i +: 4] = 4'($urandom_range(9));
      amt = 5'(t % N);
      @(posedge clk);
      want = '0;
      for (int i = 0; i < N; i++)
        if (i - int'(amt) >= 0) want[4*i +: 4] = din[4*(i - int'(amt)) +: 4];
      checks++;
      if (dout != want) begin
        failures++;
        if (failures < 5) $display("FAIL amt=%0d din=%h dout=%h", amt, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
