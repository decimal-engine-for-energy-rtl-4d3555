// lnzd: leading non-zero digit detector.
//
// Counts the zero digits above the most significant non-zero digit of an
// N-digit word (4 bits per digit). An all-zero word gives N. The count
// drives the barrel shifter that moves the leading digit to the top, and the
// exponent adjustment. A priority scan is used. Combinational.
module lnzd #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0]           din,
  output logic [$clog2(N+1)-1:0]   count
);
  always_comb begin
    logic found;
    found = 1'b0;
    count = ($clog2(N+1))'(N);
    for (int i = N - 1; i >= 0; i--) begin
      if (!found && din[4*i +: 4] != 4'd0) begin
        found = 1'b1;
        count = ($clog2(N+1))'(N - 1 - i);
      end
    end
  end
endmodule
