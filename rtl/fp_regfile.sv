// fp_regfile: dedicated register file of the custom floating-point instructions.
//
// NREGS registers of WIDTH bits (one lane for scalar instructions, LANES lanes
// of 16 bits for SIMD ones).  Two asynchronous read ports feed the two source
// operands of an instruction, one synchronous write port takes results and
// loaded data.  Reset clears every register.  The document says the custom
// instructions use their own register file but gives neither its depth nor its
// ports; 16 entries copies the depth of the processor's native FPU register
// file, and 2 read / 1 write ports is the least a two-operand instruction set
// needs.  A read of the register being written in the same cycle returns the
// old value.
module fp_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
