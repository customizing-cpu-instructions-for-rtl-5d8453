// tb_nios_f16_ci: the SIMD2 custom instruction in its three versions,
// F16-2 (2-cycle add and multiply), F16-1.5 (the default: 2-cycle add,
// 1-cycle multiply) and F16-1 (all combinational), plus a 2-cycle F13
// version (7-bit fraction).  The testbench acts as the
// core: it raises start for one cycle with random operands, waits for done
// and checks both lanes against the real-number reference and the number of
// cycles each operator takes in each version.  It also holds clk_en low for a
// while during a multicycle operation, which must delay done.
module tb_nios_f16_ci;
  import fp_pkg::*;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int multi_seen = 0, comb_seen = 0;

  localparam int NV = 4;
  localparam int ADDC [NV] = '{2, 2, 1, 2};
  localparam int MULC [NV] = '{2, 1, 1, 2};
  localparam int MWC  [NV] = '{10, 10, 10, 7};   // version 3: F13 operators

  logic        reset, clk_en;
  logic        start [NV];
  logic        done  [NV];
  logic [31:0] result [NV];
  logic [3:0]  n;
  logic [31:0] dataa, datab;

  for (genvar v = 0; v < NV; v++) begin : g_v
    if (v == 1) begin : g_def
      nios_f16_ci dut (.clk, .reset, .clk_en, .start(start[v]), .n, .dataa, .datab,
                       .result(result[v]), .done(done[v]));
    end else begin : g_alt
      nios_f16_ci #(.MW(MWC[v]), .ADD_CYCLES(ADDC[v]), .MUL_CYCLES(MULC[v])) dut (
        .clk, .reset, .clk_en, .start(start[v]), .n, .dataa, .datab,
        .result(result[v]), .done(done[v]));
    end
  end

  task automatic run(int v, fp_op_e o, logic [31:0] xa, logic [31:0] xb, bit pause);
    int cyc, want;
    logic [31:0] exp;
    @(negedge clk);
    n = 4'(o); dataa = xa; datab = xb; start[v] = 1;
    want = ((o == OP_ADD || o == OP_SUB) ? ADDC[v] : (o == OP_MUL) ? MULC[v] : 1) - 1;
    exp  = 32'(ref_vec(o, 256'(xa), 256'(xb), int'(xb[4:0]), 2, 5, MWC[v]));
    #1;
    cyc = 0;
    if (!done[v]) begin
      if (pause) begin
        // Clock enable low: the operation must not advance, start is held.
        clk_en = 0;
        repeat (3) begin @(posedge clk); #1; checks++; if (done[v]) failures++; end
        clk_en = 1;
      end
      @(posedge clk); #1 start[v] = 0;
      while (!done[v] && cyc < 10) begin @(negedge clk); #1; cyc++; end
      cyc++;
      multi_seen++;
    end else begin
      comb_seen++;
    end
    checks += 2;
    if (cyc != want) begin
      failures++;
      if (failures < 10) $display("FAIL version %0d op %s took %0d extra cycles, expected %0d", v, o.name(), cyc, want);
    end
    if (!same_vec(256'(result[v]), 256'(exp), (o == OP_F2B) ? 1 : 2, 5, MWC[v]) ||
        (o == OP_F2B && result[v][31:16] != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL version %0d op %s: %h %h -> %h, expected %h", v, o.name(), xa, xb, result[v], exp);
    end
    @(posedge clk);
    #1 start[v] = 0;
  endtask

  // A short float with mw fraction bits, placed in its 16-bit lane.
  function automatic logic [15:0] lane(longint unsigned w, int mw);
    logic [15:0] x;
    x = 16'(w & ((64'd1 << (5 + mw)) - 1));
    x[15] = 1'(w >> (5 + mw));
    return x;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_op_e ops [7] = '{OP_ADD, OP_SUB, OP_MUL, OP_MUL2N, OP_DIV2N, OP_B2F, OP_F2B};
    logic [31:0] xa, xb;
    reset = 1; clk_en = 1; n = 0; dataa = 0; datab = 0;
    for (int v = 0; v < NV; v++) start[v] = 0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 6000; i++) begin
      fp_op_e o;
      int v;
      o  = ops[i % 7];
      v  = (i / 7) % NV;
      xa = {lane(rand_fp(5, MWC[v]), MWC[v]), lane(rand_fp(5, MWC[v]), MWC[v])};
      xb = {lane(rand_fp(5, MWC[v]), MWC[v]), lane(rand_fp(5, MWC[v]), MWC[v])};
      if (o == OP_MUL2N || o == OP_DIV2N) xb = 32'($urandom_range(12, 0));
      if (o == OP_F2B) xa = {lane(from_real_rz(real'($urandom_range(300, 0)) + 0.5, 5, MWC[v]), MWC[v]),
                             lane(from_real_rz(real'($urandom_range(300, 0)) + 0.5, 5, MWC[v]), MWC[v])};
      run(v, o, xa, xb, (i % 11) == 0);
    end
    checks += 2;
    if (multi_seen == 0) failures++;
    if (comb_seen == 0) failures++;
    $display("multicycle operations %0d, combinational operations %0d", multi_seen, comb_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
