// otf_conv: on-the-fly conversion of signed quotient digits ("DIV conversion").
//
// Each enabled cycle it appends the quotient digit q (|q| < r) to two
// registers: Q, the quotient so far, and QM = Q - 1 unit in the last place,
// without any carry propagation:
//   Q  <- (q >= 0) ? Q*r + q       : QM*r + (r + q)
//   QM <- (q >  0) ? Q*r + (q - 1) : QM*r + (r - 1 + q)
// Digits are BCD in radix 10 and hexadecimal in radix 16; both registers are
// N digits wide and kept modulo r^N. clear starts a new quotient with Q = 0
// and QM = -1 (all digits r - 1). When the final residual is negative the
// quotient is QM. The algorithm is the standard on-the-fly conversion; the
// paper names the unit only. One clock cycle per digit.
module otf_conv #(
  parameter int unsigned N = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic              radix10,
  input  logic signed [4:0] q,
  output logic [4*N-1:0]    qout,
  output logic [4*N-1:0]    qmout
);
  logic [4*N-1:0] q_r, qm_r;
  logic [4:0]     radix;
  logic [3:0]     dq, dqm;

  always_comb begin
    radix = radix10 ? 5'd10 : 5'd16;
    dq    = (q >= 0) ? 4'(q) : 4'(radix + 5'(q));
    dqm   = (q > 0)  ? 4'(q - 5'sd1) : 4'(radix - 5'd1 + 5'(q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r  <= '0;
      qm_r <= '0;
    end else if (clear) begin
      q_r  <= '0;
      qm_r <= radix10 ? {N{4'd9}} : {N{4'd15}};
    end else if (en) begin
      q_r  <= (q >= 0) ? {q_r[4*N-5:0], dq}   : {qm_r[4*N-5:0], dq};
      qm_r <= (q > 0)  ? {q_r[4*N-5:0], dqm}  : {qm_r[4*N-5:0], dqm};
    end
  end

  assign qout  = q_r;
  assign qmout = qm_r;
endmodule
