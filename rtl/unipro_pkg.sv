// unipro_pkg: types and constants shared by the hybrid decimal/binary
// floating-point engine.
//
// The engine executes decimal64 addition, subtraction, multiplication and
// division on BCD significands, and binary64 division. All four operations
// share one recurrence datapath of WDIG digits that works either in radix 10
// (BCD digits) or in radix 16 (hexadecimal digits of a binary word).
//
// operand_t is the register-file format seen at the engine's ports:
//   decimal64 : sign, biased exponent in exp[9:0] (bias 398), 16 BCD digits
//               in sig[63:0] (digit 0 in sig[3:0]). Conversion from the
//               densely-packed encoding is done outside the engine.
//   binary64  : sign, biased exponent in exp[10:0] (bias 1023), the 52-bit
//               fraction in sig[51:0] (sig[63:52] ignored).
// The 16-digit significand, the 18-digit recurrence and the 32-digit
// normalization shifter follow the paper; the opcode and phase encodings
// are this design's own.
package unipro_pkg;

  localparam int NDIG = 16;        // decimal64 significand digits
  localparam int WDIG = 18;        // recurrence datapath digits (16 + 2)
  localparam int PDIG = 32;        // digits of the normalization shifter
  localparam int DEC_BIAS = 398;   // decimal64 exponent bias
  localparam int DEC_EMAX = 767;   // largest biased decimal64 exponent
  localparam int BIN_BIAS = 1023;  // binary64 exponent bias
  localparam int BIN_EMAX = 2046;  // largest biased exponent of a finite binary64

  typedef enum logic [2:0] {
    OP_DFP_ADD = 3'd0,
    OP_DFP_SUB = 3'd1,
    OP_DFP_MUL = 3'd2,
    OP_DFP_DIV = 3'd3,
    OP_BFP_DIV = 3'd4
  } op_e;

  // One datapath phase per clock cycle; see controller.sv for the sequences.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_NORM1 = 3'd1,   // first use of the normalization stage
    PH_NORM2 = 3'd2,   // second use of the normalization stage
    PH_INIT  = 3'd3,   // set-up / recurrence initialization
    PH_ITER  = 3'd4,   // one recurrence iteration (or the DFP-add CSA step)
    PH_CPA   = 3'd5,   // carry-save to conventional conversion
    PH_NRES  = 3'd6,   // normalization of the 32-digit product
    PH_ROUND = 3'd7    // rounding and result write
  } phase_e;

  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [63:0] sig;
  } operand_t;

  // Number of recurrence iterations of each operation.
  function automatic int unsigned op_iterations(op_e op);
    case (op)
      OP_DFP_MUL: return 16;
      OP_DFP_DIV: return 18;
      OP_BFP_DIV: return 15;
      default:    return 1;
    endcase
  endfunction

  // Clock edges from the edge that accepts start to the edge that raises done.
  function automatic int unsigned op_latency(op_e op);
    case (op)
      OP_DFP_MUL: return 20;
      OP_DFP_DIV: return 23;
      OP_BFP_DIV: return 18;
      default:    return 5;
    endcase
  endfunction

endpackage
