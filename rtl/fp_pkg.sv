// fp_pkg: shared types and constants of the short floating-point instruction set.
//
// The operators are those of the custom F16 instructions: addition, subtraction,
// multiplication, scaling by a power of two (both directions) and the two pixel
// conversions (unsigned byte to float, float to unsigned byte).  LD and ST are
// only meaningful to the register-file coprocessor (xt_fp_cop), which moves
// whole vectors between its register file and the host's memory interface.
// The 4-bit encoding is this design's own choice.
package fp_pkg;

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,   // y = a + b
    OP_SUB   = 4'd1,   // y = a - b
    OP_MUL   = 4'd2,   // y = a * b
    OP_MUL2N = 4'd3,   // y = a * 2^n
    OP_DIV2N = 4'd4,   // y = a / 2^n
    OP_B2F   = 4'd5,   // lane i = float(byte i of a)
    OP_F2B   = 4'd6,   // byte i of y = byte(lane i of a)
    OP_LD    = 4'd8,   // coprocessor only: register <- load data
    OP_ST    = 4'd9    // coprocessor only: store data <- register
  } fp_op_e;

  // Storage width of one lane: every short float lives in a 16-bit word.
  localparam int unsigned LANE_W = 16;

  // Formats used by the design (exponent bits, mantissa bits).
  localparam int unsigned F16_EW = 5;
  localparam int unsigned F16_MW = 10;
  localparam int unsigned F13_EW = 5;
  localparam int unsigned F13_MW = 7;

  // True when the operator reads its second source operand.
  function automatic logic op_reads_b(fp_op_e op);
    return (op == OP_ADD) || (op == OP_SUB) || (op == OP_MUL);
  endfunction

endpackage
