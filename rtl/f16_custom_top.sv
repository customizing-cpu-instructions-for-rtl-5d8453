// f16_custom_top: short floating-point instruction hardware for two embedded
// processors, side by side.
//
// The design adds 16-bit floating-point (F16: 1 sign, 5 exponent, 10 fraction
// bits, truncating, no denormals) instructions to processors that run image
// algorithms such as Harris corner detection and Horn & Schunck optical flow.
// F16 values take half the memory and cache of F32 ones, and their operators
// are roughly half the size.  This top holds three independent parts, each with
// its own ports:
//   * xt_*     the register-file coprocessor for a configurable RISC core
//              (Xtensa LX in the document): XT_LANES-wide SIMD F16 instructions
//              with XT_LAT-cycle latency and interlocks.  XT_LANES = 8 fills
//              its 128-bit memory interface; XT_LAT = 2 is the document's
//              "realistic" 2-cycle case.
//   * nios_*   the SIMD2 custom instruction of a NIOS II soft core, in the
//              F16-1.5 version by default (1-cycle multiply, 2-cycle add).
//   * narrow_* F32 -> F16 and F32 -> F13 storage converters (F13: 5-bit
//              exponent, 7-bit fraction, in a 16-bit word).
// The processors themselves are not part of this RTL; their side of each port
// is brought out.  xt_* uses rst_n (asynchronous, active low); the NIOS part
// is reset by the same signal, inverted, as its port expects an active-high
// reset.
module f16_custom_top
  import fp_pkg::*;
#(
  parameter int unsigned EW              = F16_EW,
  parameter int unsigned MW              = F16_MW,
  parameter int unsigned XT_LANES        = 8,
  parameter int unsigned XT_NREGS        = 16,
  parameter int unsigned XT_LAT          = 2,
  parameter int unsigned NIOS_ADD_CYCLES = 2,
  parameter int unsigned NIOS_MUL_CYCLES = 1,
  localparam int unsigned XT_AW          = $clog2(XT_NREGS),
  localparam int unsigned XT_VW          = XT_LANES * LANE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // register-file coprocessor
  input  logic             xt_valid,
  output logic             xt_ready,
  input  fp_op_e           xt_op,
  input  logic [XT_AW-1:0] xt_rd,
  input  logic [XT_AW-1:0] xt_rs,
  input  logic [XT_AW-1:0] xt_rt,
  input  logic [4:0]       xt_imm,
  input  logic [XT_VW-1:0] xt_ld_data,
  output logic             xt_st_valid,
  output logic [XT_VW-1:0] xt_st_data,
  output logic             xt_interlock,
  // NIOS II custom instruction
  input  logic             nios_clk_en,
  input  logic             nios_start,
  input  logic [3:0]       nios_n,
  input  logic [31:0]      nios_dataa,
  input  logic [31:0]      nios_datab,
  output logic [31:0]      nios_result,
  output logic             nios_done,
  // F32 storage narrowing
  input  logic [31:0]      narrow_f32,
  output logic [15:0]      narrow_f16,
  output logic [15:0]      narrow_f13
);

  xt_fp_cop #(
    .EW(EW), .MW(MW), .LANES(XT_LANES), .NREGS(XT_NREGS), .LAT(XT_LAT), .NW(5)
  ) u_xt (
    .clk, .rst_n,
    .in_valid(xt_valid), .in_ready(xt_ready), .op(xt_op),
    .rd(xt_rd), .rs(xt_rs), .rt(xt_rt), .imm(xt_imm),
    .ld_data(xt_ld_data), .st_valid(xt_st_valid), .st_data(xt_st_data),
    .interlock(xt_interlock)
  );

  nios_f16_ci #(
    .EW(EW), .MW(MW), .ADD_CYCLES(NIOS_ADD_CYCLES), .MUL_CYCLES(NIOS_MUL_CYCLES), .NW(5)
  ) u_nios (
    .clk, .reset(!rst_n), .clk_en(nios_clk_en), .start(nios_start), .n(nios_n),
    .dataa(nios_dataa), .datab(nios_datab), .result(nios_result), .done(nios_done)
  );

  fp_narrow #(.EW(F16_EW), .MW(F16_MW), .LW(LANE_W)) u_n16 (.f32(narrow_f32), .y(narrow_f16));
  fp_narrow #(.EW(F13_EW), .MW(F13_MW), .LW(LANE_W)) u_n13 (.f32(narrow_f32), .y(narrow_f13));

endmodule
