// bcd_shifter: N-digit left barrel shifter (the normalization shifter).
//
// Shifts din left by amt digits (4 bits per digit), filling zeros at the
// bottom and dropping digits shifted out at the top. It is built as log2(N)
// stages, stage s shifting by 2^s digits when amt[s] is set. The paper's
// shifter shifts only to the left and is 32 digits wide, enough for the
// double-length product. Combinational.
module bcd_shifter #(
  parameter int unsigned N = 32
) (
  input  logic [4*N-1:0]         din,
  input  logic [$clog2(N)-1:0]   amt,
  output logic [4*N-1:0]         dout
);
  always_comb begin
    logic [4*N-1:0] st;
    st = din;
    for (int s = 0; s < $clog2(N); s++)
      if (amt[s]) st = st << (4 * (1 << s));
    dout = st;
  end
endmodule
