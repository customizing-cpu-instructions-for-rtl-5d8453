// xt_fp_cop: register-file coprocessor for short floating-point instructions,
// as added to a configurable RISC core (the document's Xtensa LX version).
//
// The document adds custom F16 instructions to the core together with a
// dedicated register file, load/store instructions and decoding logic, and
// evaluates them with 1-, 2- and 4-cycle latencies; the stalls the core takes
// when an instruction needs a result that is not ready are its "instruction
// interlocks".  This module holds that hardware:
//   * fp_regfile   NREGS registers of LANES x 16 bits,
//   * fp_simd_alu  the operators, on all lanes at once,
//   * a result pipeline of LAT-1 stages, written back at its end, and
//   * an interlock that holds an instruction back while one of its sources is
//     still in that pipeline.
//
// Interface (this design's choice; the core's own side is not described):
// an instruction is offered with in_valid and taken in a cycle where in_ready
// is high.  It names a destination rd, sources rs and rt, and a shift count imm
// (MUL2N, DIV2N, B2F).  OP_LD writes ld_data (one memory-interface word, LANES x
// 16 bits, the host's load unit delivers it with the instruction) into rd;
// OP_ST presents register rs on st_data with st_valid in the issue cycle.
//
// Timing: an instruction issued in cycle t has its result in the register file
// from cycle t+LAT on, so a dependent instruction issued back to back waits
// LAT-1 cycles (interlock = 1 in those cycles).  There is no bypass.  All
// instructions have the same latency, so results retire in order.
module xt_fp_cop
  import fp_pkg::*;
#(
  parameter int unsigned EW    = 5,
  parameter int unsigned MW    = 10,
  parameter int unsigned LANES = 8,
  parameter int unsigned NREGS = 16,
  parameter int unsigned LAT   = 2,
  parameter int unsigned NW    = 5,
  localparam int unsigned AW   = $clog2(NREGS),
  localparam int unsigned VW   = LANES * LANE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  fp_op_e        op,
  input  logic [AW-1:0] rd,
  input  logic [AW-1:0] rs,
  input  logic [AW-1:0] rt,
  input  logic [NW-1:0] imm,
  input  logic [VW-1:0] ld_data,
  output logic          st_valid,
  output logic [VW-1:0] st_data,
  output logic          interlock
);
  localparam int unsigned NST = (LAT > 1) ? LAT - 1 : 1;

  logic [VW-1:0] va, vb, alu_y, res;
  logic          fire, writes, reads_a, reads_b, hazard;
  logic          we;
  logic [AW-1:0] wa;
  logic [VW-1:0] wd;

  fp_regfile #(.NREGS(NREGS), .WIDTH(VW)) u_rf (
    .clk, .rst_n,
    .ra1(rs), .rd1(va),
    .ra2(rt), .rd2(vb),
    .we, .wa, .wd
  );

  fp_simd_alu #(.EW(EW), .MW(MW), .LANES(LANES), .NW(NW)) u_alu (
    .op, .a(va), .b(vb), .n(imm), .y(alu_y)
  );

  assign res     = (op == OP_LD) ? ld_data : alu_y;
  assign writes  = (op != OP_ST);
  assign reads_a = (op != OP_LD);
  assign reads_b = op_reads_b(op);

  // Result pipeline: stage k holds an instruction issued k+1 cycles ago.
  logic          pv  [NST];
  logic [AW-1:0] prd [NST];
  logic [VW-1:0] pd  [NST];

  always_comb begin
    hazard = 1'b0;
    if (LAT > 1) begin
      for (int k = 0; k < NST; k++) begin
        if (pv[k] && ((reads_a && prd[k] == rs) || (reads_b && prd[k] == rt)))
          hazard = 1'b1;
      end
    end
  end

  assign in_ready  = !hazard;
  assign interlock = in_valid && hazard;
  assign fire      = in_valid && in_ready;
  assign st_valid  = fire && (op == OP_ST);
  assign st_data   = va;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NST; k++) begin
        pv[k]  <= 1'b0;
        prd[k] <= '0;
        pd[k]  <= '0;
      end
    end else begin
      pv[0]  <= fire && writes;
      prd[0] <= rd;
      pd[0]  <= res;
      for (int k = 1; k < NST; k++) begin
        pv[k]  <= pv[k-1];
        prd[k] <= prd[k-1];
        pd[k]  <= pd[k-1];
      end
    end
  end

  always_comb begin
    if (LAT > 1) begin
      we = pv[NST-1];
      wa = prd[NST-1];
      wd = pd[NST-1];
    end else begin
      we = fire && writes;
      wa = rd;
      wd = res;
    end
  end

  // An offered instruction must carry a defined operation.
  a_legal_op : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (op inside {OP_ADD, OP_SUB, OP_MUL, OP_MUL2N, OP_DIV2N,
                             OP_B2F, OP_F2B, OP_LD, OP_ST}))
    else $error("xt_fp_cop: undefined operation %0d", op);

endmodule
