// dr_cpa: N-digit dual-radix carry-propagate adder (the "BCD CPA").
//
// Computes s = a + b + cin with the carry rippling from digit 0 upward; cout
// is the carry out of the top digit. In radix 10 (radix10 = 1) the digits of
// a and b must be BCD and each digit sum of 10 or more is reduced by 10 with
// a carry; in radix 16 it is a plain binary addition of 4N bits. The engine
// uses it to turn the carry-save residual or product into one word and to add
// the rounding increment. The ripple structure is this design's choice; the
// paper only names the adder. Combinational.
module dr_cpa #(
  parameter int unsigned N = 18
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  input  logic           radix10,
  output logic [4*N-1:0] s,
  output logic           cout
);
  always_comb begin
    logic       c;
    logic [4:0] t;
    c = cin;
    s = '0;
    for (int i = 0; i < N; i++) begin
      t = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]} + {4'b0, c};
      if (radix10) begin
        if (t >= 5'd10) begin
          s[4*i +: 4] = 4'(t - 5'd10);
          c = 1'b1;
        end else begin
          s[4*i +: 4] = t[3:0];
          c = 1'b0;
        end
      end else begin
        s[4*i +: 4] = t[3:0];
        c = t[4];
      end
    end
    cout = c;
  end
endmodule
