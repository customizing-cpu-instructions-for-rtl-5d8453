// fp_simd_alu: LANES-wide execution unit of the short floating-point instructions.
//
// Each lane holds one instance of every operator of the instruction set: adder
// (also subtracting), multiplier, *2^n, /2^n, byte -> float and float -> byte.
// The operator chosen by `op` runs on all lanes at once (SIMD).  LANES = 8 with
// 16-bit lanes fills the 128-bit memory interface of the document's Xtensa
// configuration ("8 points per data vector"); LANES = 2 gives the SIMD2
// instructions of its NIOS II version, LANES = 1 the scalar ones.
//
// Operand layout (this design's choice): lane i of a vector is bits
// [16*i +: 16].  A short float sits in its lane as "sign, zero padding,
// exponent, fraction", so F16 fills the lane and F13 (EW = 5, MW = 7) leaves
// three zero bits under the sign.  OP_B2F takes byte i of `a` (bits [8*i +: 8])
// for lane i and scales it by 2^-n; OP_F2B writes byte i of the result and
// clears the rest.  MUL2N and DIV2N take n from the `n` input.  Combinational.
module fp_simd_alu
  import fp_pkg::*;
#(
  parameter int unsigned EW    = 5,
  parameter int unsigned MW    = 10,
  parameter int unsigned LANES = 8,
  parameter int unsigned NW    = 5,
  localparam int unsigned LW   = LANE_W,
  localparam int unsigned VW   = LANES * LW
) (
  input  fp_op_e         op,
  input  logic [VW-1:0]  a,
  input  logic [VW-1:0]  b,
  input  logic [NW-1:0]  n,
  output logic [VW-1:0]  y
);
  localparam int unsigned FW = EW + MW + 1;

  initial begin
    assert (FW <= LW) else $error("format does not fit a %0d-bit lane", LW);
  end

  logic [7:0] bytes_out [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic [LW-1:0] la, lb;
    logic [FW-1:0] fa, fb, r_add, r_mul, r_m2n, r_d2n, r_b2f, r;
    logic [7:0]    r_f2b;

    assign la = a[LW*i +: LW];
    assign lb = b[LW*i +: LW];
    assign fa = {la[LW-1], la[FW-2:0]};
    assign fb = {lb[LW-1], lb[FW-2:0]};

    fp_add      #(.EW(EW), .MW(MW))         u_add (.a(fa), .b(fb), .sub(op == OP_SUB), .y(r_add));
    fp_mul      #(.EW(EW), .MW(MW))         u_mul (.a(fa), .b(fb), .y(r_mul));
    fp_mul_pow2 #(.EW(EW), .MW(MW), .NW(NW)) u_m2n (.a(fa), .n(n), .y(r_m2n));
    fp_div_pow2 #(.EW(EW), .MW(MW), .NW(NW)) u_d2n (.a(fa), .n(n), .y(r_d2n));
    byte_to_fp  #(.EW(EW), .MW(MW), .NW(NW)) u_b2f (.u(a[8*i +: 8]), .n(n), .y(r_b2f));
    fp_to_byte  #(.EW(EW), .MW(MW))         u_f2b (.a(fa), .u(r_f2b));

    always_comb begin
      unique case (op)
        OP_ADD, OP_SUB: r = r_add;
        OP_MUL:         r = r_mul;
        OP_MUL2N:       r = r_m2n;
        OP_DIV2N:       r = r_d2n;
        OP_B2F:         r = r_b2f;
        default:        r = fa;     // F2B, LD, ST: lane value unchanged
      endcase
    end

    assign bytes_out[i] = r_f2b;

    // Lane result: the short float repacked into its lane.
    logic [LW-1:0] lane_y;
    always_comb begin
      lane_y = LW'(r[FW-2:0]);
      lane_y[LW-1] = r[FW-1];
    end
    assign y_lanes[i] = lane_y;
  end

  logic [LW-1:0] y_lanes [LANES];

  always_comb begin
    y = '0;
    for (int i = 0; i < LANES; i++) begin
      if (op == OP_F2B) y[8*i +: 8] = bytes_out[i];
      else              y[LW*i +: LW] = y_lanes[i];
    end
  end

endmodule
