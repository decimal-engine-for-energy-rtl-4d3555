// tb_otf_conv: self-checking test of the on-the-fly quotient conversion.
// Feeds random signed digit strings (|q| <= 7 in radix 10, |q| <= 10 in
// radix 16) and checks after every digit that Q equals the accumulated value
// sum q_j * r^(n-j) and QM equals Q - 1, both modulo r^18.
module tb_otf_conv;
  localparam int N = 18;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic              rst_n = 1'b0, clear = 1'b0, en = 1'b0, radix10 = 1'b1;
  logic signed [4:0] q = '0;
  logic [4*N-1:0]    qout, qmout;
  int checks = 0, failures = 0;

  otf_conv dut (.clk, .rst_n, .clear, .en, .radix10, .q, .qout, .qmout);

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
    int r, lim;
    logic [127:0] md, acc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      radix10 = (t % 2 == 0);
      r   = radix10 ? 10 : 16;
      lim = radix10 ? 7 : 10;
      md = 1;
      for (int i = 0; i < N; i++) md = md * r;
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      acc = 0;
      for (int j = 0; j < N; j++) begin
        q  = 5'($signed($urandom_range(2 * lim)) - lim);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        acc = (acc * r + md + 128'($signed(q))) % md;
        checks++;
        if (val(qout, r) != acc || val(qmout, r) != (acc + md - 1) % md) begin
          failures++;
          if (failures < 5) $display("FAIL r=%0d j=%0d q=%0d Q=%h QM=%h", r, j, q, qout, qmout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
