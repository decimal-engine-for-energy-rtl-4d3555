// controller: sequencer of the engine.
//
// Accepts an operation when start is high and the engine is idle, then steps
// the datapath through one phase per clock cycle:
//   DFP add/sub : NORM1 NORM2 ITER                 CPA       ROUND  ( 5 cycles)
//   DFP mul     : INIT  ITER x16                   CPA NRES  ROUND  (20 cycles)
//   BFP div     : INIT  ITER x15                   CPA       ROUND  (18 cycles)
//   DFP div     : NORM1 NORM2 INIT ITER x18        CPA       ROUND  (23 cycles)
// done is high for one cycle after the ROUND edge, so the result is ready
// the stated number of clock edges after the edge that accepted start; a new
// start may be given in that same cycle. busy is high from the accepting
// edge until done. cur_op holds the accepted opcode; iter counts recurrence
// iterations from 0.
// The cycle counts of add (5), mul (20) and BFP div (18) are the paper's;
// for DFP div it gives 23 in its text and 25 in its results table, and this
// design takes 23. The phase split is this design's own.
module controller
  import unipro_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  op_e         op,
  output phase_e      phase,
  output op_e         cur_op,
  output logic [4:0]  iter,
  output logic        busy,
  output logic        done
);
  phase_e next;
  logic   last_iter;

  assign busy      = (phase != PH_IDLE);
  assign last_iter = (32'(iter) == op_iterations(cur_op) - 1);

  always_comb begin
    next = phase;
    case (phase)
      PH_IDLE:  if (start) next = (op == OP_DFP_MUL || op == OP_BFP_DIV) ? PH_INIT : PH_NORM1;
      PH_NORM1: next = PH_NORM2;
      PH_NORM2: next = (cur_op == OP_DFP_DIV) ? PH_INIT : PH_ITER;
      PH_INIT:  next = PH_ITER;
      PH_ITER:  if (last_iter) next = PH_CPA;
      PH_CPA:   next = (cur_op == OP_DFP_MUL) ? PH_NRES : PH_ROUND;
      PH_NRES:  next = PH_ROUND;
      PH_ROUND: next = PH_IDLE;
      default:  next = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      cur_op <= OP_DFP_ADD;
      iter   <= '0;
      done   <= 1'b0;
    end else begin
      phase <= next;
      done  <= (phase == PH_ROUND);
      if (phase == PH_IDLE && start) cur_op <= op;
      iter  <= (phase == PH_ITER && !last_iter) ? iter + 5'd1 : '0;
    end
  end

  // An opcode outside the enumeration is never accepted.
  a_known_op: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_IDLE && start) |-> (op inside {OP_DFP_ADD, OP_DFP_SUB, OP_DFP_MUL, OP_DFP_DIV, OP_BFP_DIV}));
endmodule
