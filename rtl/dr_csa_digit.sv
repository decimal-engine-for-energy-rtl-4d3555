// dr_csa_digit: one digit of the dual-radix (10/16) carry-save adder.
//
// Adds two 4-bit digits a and b and a 1-bit carry ci. Two 4-bit adders run
// in parallel: one adds a, b and ci as they are, the other adds a+4, b+2 and
// ci, i.e. the sum plus 6. In radix 10 (radix10 = 1) the carry out of the
// second adder tells whether the sum reached 10; if so its low 4 bits are the
// BCD digit (sum - 10) and the digit's carry is 1, otherwise the plain sum is
// the digit and the carry is 0. In radix 16 the plain adder gives digit and
// carry. For radix 10 the digits must be BCD (0..9); the sum is at most 19.
// The structure (+4, +2, two adders, two output multiplexers) follows the
// paper's one-digit scheme. Purely combinational.
module dr_csa_digit (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  input  logic       radix10,
  output logic [3:0] s,
  output logic       co
);
  logic [4:0] sum_bin;   // a + b + ci
  logic [4:0] sum_adj;   // (a + 4) + (b + 2) + ci
  logic       sign;      // 1 when a + b + ci < 10

  always_comb begin
    sum_bin = {1'b0, a} + {1'b0, b} + {4'b0, ci};
    sum_adj = {1'b0, a + 4'd4} + {1'b0, b + 4'd2} + {4'b0, ci};
    sign    = ~sum_adj[4];
    s       = (radix10 && !sign) ? sum_adj[3:0] : sum_bin[3:0];
    co      = radix10 ? ~sign : sum_bin[4];
  end
endmodule
