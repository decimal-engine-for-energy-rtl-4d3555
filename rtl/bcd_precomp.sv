// bcd_precomp: pre-computed multiples and dual-radix selection.
//
// From an N-digit operand m it forms, modulo r^N:
//   m2  = 2m
//   mk  = k*m  (k = 5 in radix 10, k = 4 in radix 16)
//   m2k = 2k*m (10m in radix 10, 8m in radix 16)
// In radix 10 each digit of 2m and 5m depends only on the digit itself and
// its lower neighbour, so no carry propagates:
//   (2m)_i = (2*m_i mod 10) + (m_{i-1} >= 5)
//   (5m)_i = 5*(m_i mod 2)  + floor(m_{i-1} / 2)
// and 10m is a one-digit shift. In radix 16 all three are bit shifts. The
// multiplier uses x, 2x, 5x and 10x of the multiplicand; the divider uses d,
// 2d, kd and 2kd of the divisor. Combinational.
module bcd_precomp #(
  parameter int unsigned N = 18
) (
  input  logic [4*N-1:0] m,
  input  logic           radix10,
  output logic [4*N-1:0] m2,
  output logic [4*N-1:0] mk,
  output logic [4*N-1:0] m2k
);
  logic [4*N-1:0] d2, d5;

  always_comb begin
    logic [3:0] cur, low;
    for (int i = 0; i < N; i++) begin
      cur = m[4*i +: 4];
      low = (i == 0) ? 4'd0 : m[4*(i-1) +: 4];
      d2[4*i +: 4] = ((cur >= 4'd5) ? 4'(2*cur - 10) : 4'(2*cur)) + {3'b0, (low >= 4'd5)};
      d5[4*i +: 4] = (cur[0] ? 4'd5 : 4'd0) + {1'b0, low[3:1]};
    end
    if (radix10) begin
      m2  = d2;
      mk  = d5;
      m2k = m << 4;
    end else begin
      m2  = m << 1;
      mk  = m << 2;
      m2k = m << 3;
    end
  end
endmodule
