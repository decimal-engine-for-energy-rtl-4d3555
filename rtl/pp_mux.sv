// pp_mux: partial-product / divisor-multiple multiplexer ("Mult/MUX").
//
// Selects 0, m1 or m2 by mag (0, 1, 2). When neg is set the selected word is
// replaced by its diminished-radix complement (each digit d becomes 9-d in
// radix 10, 15-d in radix 16) and inc is raised; the adder that takes the
// word adds inc at digit 0, which completes the r's complement, i.e. the
// negative multiple modulo r^N. Combinational.
module pp_mux #(
  parameter int unsigned N = 18
) (
  input  logic [4*N-1:0] m1,
  input  logic [4*N-1:0] m2,
  input  logic [1:0]     mag,
  input  logic           neg,
  input  logic           radix10,
  output logic [4*N-1:0] pp,
  output logic           inc
);
  always_comb begin
    logic [4*N-1:0] sel;
    case (mag)
      2'd1:    sel = m1;
      2'd2:    sel = m2;
      default: sel = '0;
    endcase
    for (int i = 0; i < N; i++)
      pp[4*i +: 4] = neg ? ((radix10 ? 4'd9 : 4'd15) - sel[4*i +: 4]) : sel[4*i +: 4];
    inc = neg;
  end
endmodule
