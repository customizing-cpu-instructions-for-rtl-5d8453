// nios_f16_ci: SIMD2 short floating-point custom instruction for a NIOS II core.
//
// The 32-bit operands dataa and datab each carry two 16-bit floats (lane 0 in
// bits 15:0, lane 1 in bits 31:16); the selector n chooses the operator with
// the fp_pkg encoding.  The document builds three versions of its F16
// operators for this core: "F16-2" (2-cycle multiply and add), "F16-1.5"
// (1-cycle multiply, 2-cycle add) and "F16-1" (both in 1 cycle).
// ADD_CYCLES and MUL_CYCLES pick the version; the default is F16-1.5.
//
// A 1-cycle operator acts as a combinational custom instruction: result is
// valid and done is high in the cycle start is high.  A 2-cycle operator
// behaves as a multicycle instruction: the core stalls after start until done.
// Here the operator result is registered once and done comes one clock-enabled
// cycle after start.  The register sits at the output and is meant to be
// retimed into the operator by synthesis, as the document does for its faster
// versions.  The scaling operators take n from datab[NW-1:0].  The byte
// conversions use bytes 0 and 1 of dataa and of the result.  Both have one
// cycle of latency.  Port names follow the core's custom-instruction port.
module nios_f16_ci
  import fp_pkg::*;
#(
  parameter int unsigned EW         = 5,
  parameter int unsigned MW         = 10,
  parameter int unsigned ADD_CYCLES = 2,
  parameter int unsigned MUL_CYCLES = 1,
  parameter int unsigned NW         = 5
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        clk_en,
  input  logic        start,
  input  logic [3:0]  n,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        done
);
  fp_op_e      op;
  logic [31:0] alu_y, res_q;
  logic        multi, done_q;

  assign op = fp_op_e'(n);

  fp_simd_alu #(.EW(EW), .MW(MW), .LANES(2), .NW(NW)) u_alu (
    .op, .a(dataa), .b(datab), .n(datab[NW-1:0]), .y(alu_y)
  );

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB: multi = (ADD_CYCLES > 1);
      OP_MUL:         multi = (MUL_CYCLES > 1);
      default:        multi = 1'b0;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      done_q <= 1'b0;
      res_q  <= '0;
    end else if (clk_en) begin
      done_q <= start && multi;
      if (start && multi) res_q <= alu_y;
    end
  end

  assign result = done_q ? res_q : alu_y;
  assign done   = done_q || (start && !multi);

  // The core waits for done: no new start while a multicycle result is due.
  a_no_overlap : assert property (@(posedge clk) disable iff (reset)
    (clk_en && start && multi) |=> !start)
    else $error("nios_f16_ci: start during a multicycle operation");

endmodule
