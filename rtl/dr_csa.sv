// dr_csa: N-digit dual-radix carry-save adder.
//
// Each digit position i adds a digit of a, a digit of b and the carry bit
// ci[i] that belongs to position i, producing a digit s[i] and a carry co[i]
// that belongs to position i+1. No carry travels between positions, so the
// delay is that of one digit. A carry-save number is kept as one digit word
// plus one carry bit per digit position. radix10 selects BCD (1) or
// hexadecimal (0) digits. The digit cell is dr_csa_digit. Combinational.
module dr_csa #(
  parameter int unsigned N = 18
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic [N-1:0]   ci,
  input  logic           radix10,
  output logic [4*N-1:0] s,
  output logic [N-1:0]   co
);
  for (genvar i = 0; i < N; i++) begin : g_digit
    dr_csa_digit u_digit (
      .a      (a[4*i +: 4]),
      .b      (b[4*i +: 4]),
      .ci     (ci[i]),
      .radix10(radix10),
      .s      (s[4*i +: 4]),
      .co     (co[i])
    );
  end
endmodule
