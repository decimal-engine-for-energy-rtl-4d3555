// mul_recode: recoding of one BCD multiplier digit for the DFP multiplier.
//
// A digit y (0..9) is split as y = yH + yL with yH in {0, 5, 10} and yL in
// {-2..2}, exactly as the paper's recoding table gives it:
//   y : 0  1  2  3  4  5  6  7  8   9
//   yH: 0  0  0  5  5  5  5  5  10  10
//   yL: 0  1  2 -2 -1  0  1  2 -2  -1
// so only the multiples x, 2x, 5x and 10x of the multiplicand are needed.
// yh_sel encodes yH as 0 (0), 1 (5) or 2 (10). Combinational.
module mul_recode (
  input  logic [3:0]        y,
  output logic [1:0]        yh_sel,
  output logic signed [2:0] yl
);
  always_comb begin
    case (y)
      4'd0: begin yh_sel = 2'd0; yl =  3'sd0; end
      4'd1: begin yh_sel = 2'd0; yl =  3'sd1; end
      4'd2: begin yh_sel = 2'd0; yl =  3'sd2; end
      4'd3: begin yh_sel = 2'd1; yl = -3'sd2; end
      4'd4: begin yh_sel = 2'd1; yl = -3'sd1; end
      4'd5: begin yh_sel = 2'd1; yl =  3'sd0; end
      4'd6: begin yh_sel = 2'd1; yl =  3'sd1; end
      4'd7: begin yh_sel = 2'd1; yl =  3'sd2; end
      4'd8: begin yh_sel = 2'd2; yl = -3'sd2; end
      4'd9: begin yh_sel = 2'd2; yl = -3'sd1; end
      default: begin yh_sel = 2'd0; yl = 3'sd0; end
    endcase
  end
endmodule
