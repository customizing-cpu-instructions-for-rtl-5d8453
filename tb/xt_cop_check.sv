// xt_cop_check: test harness for one configuration of the register-file
// coprocessor (LANES lanes of F16, 16 registers, LAT-cycle latency), used by
// tb_xt_fp_cop.  It runs a random instruction stream and reports its counts
// through `checks` and `failures`, raising `finished` at the end.
// The testbench keeps its own architectural register file, computes every
// result with the real-number reference and checks each stored vector.  It
// also predicts, from the issue cycle of each register's last writer, how many
// interlock cycles every instruction must wait (latency minus distance, no
// bypass) and checks the observed count, so both a missing and a needless
// stall are caught.  Loads carry random vectors of F16 values or of pixels.
module xt_cop_check #(
  parameter int LAT   = 2,
  parameter int LANES = 8
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  import fp_pkg::*;
  import tb_fp_ref::*;

  localparam int VW = 16 * LANES;

  logic         rst_n, in_valid, in_ready, st_valid, interlock;
  fp_op_e       op;
  logic [3:0]   rd, rs, rt;
  logic [4:0]   imm;
  logic [VW-1:0] ld_data, st_data;

  xt_fp_cop #(.LAT(LAT), .LANES(LANES)) dut (.clk, .rst_n, .in_valid, .in_ready, .op, .rd, .rs, .rt, .imm,
                              .ld_data, .st_valid, .st_data, .interlock);

  logic [VW-1:0] arch [16];
  longint       ready_at [16];
  longint       cycle = 0;
  int           total_stalls = 0, stores = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic issue(fp_op_e o, int d, int s, int t, int k, logic [VW-1:0] ld);
    int stalls;
    longint need;
    stalls = 0;
    @(negedge clk);
    in_valid = 1; op = o; rd = 4'(d); rs = 4'(s); rt = 4'(t); imm = 5'(k); ld_data = ld;
    need = cycle;
    if (o != OP_LD && ready_at[s] > need) need = ready_at[s];
    if (op_reads_b(o) && ready_at[t] > need) need = ready_at[t];
    #1;
    while (!in_ready) begin
      checks++; if (!interlock) failures++;
      @(negedge clk); #1; stalls++;
    end
    checks++;
    if (longint'(stalls) != need - (cycle - longint'(stalls))) begin
      failures++;
      if (failures < 10) $display("FAIL stall count %0d, expected %0d (op %s)", stalls, need - (cycle - stalls), o.name());
    end
    total_stalls += stalls;
    if (o == OP_ST) begin
      checks++; stores++;
      if (!st_valid || !same_vec(256'(st_data), 256'(arch[s]), LANES, 5, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL store r%0d: %h, expected %h", s, st_data, arch[s]);
      end
    end else begin
      arch[d] = (o == OP_LD) ? ld : VW'(ref_vec(o, 256'(arch[s]), 256'(arch[t]), k, LANES, 5, 10));
      ready_at[d] = cycle + LAT;
    end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  function automatic logic [VW-1:0] rand_vec(bit pixels);
    logic [VW-1:0] v;
    for (int l = 0; l < LANES; l++) v[16*l +: 16] = 16'(rand_fp(5, 10));
    if (pixels) begin
      // Bytes in the low half; no lane decodes as infinity or NaN.
      v = '0;
      for (int l = 0; l < LANES; l++) v[8*l +: 8] = 8'($urandom) & ((l % 2) ? 8'hBF : 8'hFF);
    end
    return v;
  endfunction

  initial begin
    fp_op_e ops [7] = '{OP_ADD, OP_SUB, OP_MUL, OP_MUL2N, OP_DIV2N, OP_B2F, OP_F2B};
    finished = 0; checks = 0; failures = 0;
    rst_n = 0; in_valid = 0; op = OP_ADD; rd = 0; rs = 0; rt = 0; imm = 0; ld_data = 0;
    for (int i = 0; i < 16; i++) begin arch[i] = '0; ready_at[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill the register file.
    for (int i = 0; i < 16; i++) issue(OP_LD, i, 0, 0, 0, rand_vec(i >= 12));
    // Back-to-back dependent chain: each must wait LAT-1 cycles.
    issue(OP_ADD, 1, 2, 3, 0, '0);
    issue(OP_MUL, 4, 1, 1, 0, '0);
    issue(OP_ST,  0, 4, 0, 0, '0);
    // Independent instructions: no waiting.
    issue(OP_ADD, 5, 6, 7, 0, '0);
    issue(OP_SUB, 8, 9, 10, 0, '0);
    issue(OP_MUL, 11, 2, 3, 0, '0);
    // Random stream, narrow register window so dependences are frequent.
    for (int i = 0; i < 4000; i++) begin
      int sel, d, s, t;
      sel = $urandom_range(9, 0);
      d = $urandom_range(15, 0); s = $urandom_range(15, 0); t = $urandom_range(15, 0);
      if (i % 3 == 0) begin d = $urandom_range(3, 0); s = $urandom_range(3, 0); end
      if (sel == 5) begin
        // B2F reads raw bytes: give it a freshly loaded pixel vector.
        issue(OP_LD, s, 0, 0, 0, rand_vec(1));
        issue(OP_B2F, d, s, 0, $urandom_range(8, 0), '0);
      end else if (sel < 7) issue(ops[sel], d, s, t, $urandom_range(6, 0), '0);
      // Bytes from F2B are turned straight back into floats, as pixel code does,
      // so that no register holds a byte pattern read as infinity or NaN.
      if (sel == 6)      issue(OP_B2F, d, d, 0, 0, '0);
      else if (sel == 7) issue(OP_LD, d, 0, 0, 0, rand_vec($urandom_range(1, 0) == 1));
      else               issue(OP_ST, 0, s, 0, 0, '0);
      // Re-seed registers that have become zero, infinite or NaN now and then.
      if (i % 50 == 0) for (int r = 0; r < 16; r += 5) issue(OP_LD, r, 0, 0, 0, rand_vec(r >= 12));
    end
    for (int r = 0; r < 16; r++) issue(OP_ST, 0, r, 0, 0, '0);
    // With LAT = 1 nothing may ever wait; otherwise waiting must occur.
    checks++;
    if ((LAT == 1) != (total_stalls == 0)) failures++;
    $display("LAT %0d, %0d lanes: interlock cycles %0d, stores %0d, failures %0d",
             LAT, LANES, total_stalls, stores, failures);
    finished = 1;
  end
endmodule
