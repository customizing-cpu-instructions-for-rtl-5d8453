// tb_fp_narrow: test of fp_narrow for F32 -> F16 and F32 -> F13 storage.
// Random F32 values around the short formats' range are compared with the
// real-number reference (truncation, flush, saturation); the F13 word must
// have the layout "s 000 eeeee fffffff".  Directed cases: infinity, NaN,
// F32 denormal, overflow, underflow.
module tb_fp_narrow;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] f32;
  logic [15:0] y16, y13;

  fp_narrow dut16 (.f32, .y(y16));
  fp_narrow #(.EW(5), .MW(7), .LW(16)) dut13 (.f32, .y(y13));

  function automatic logic [15:0] pack13(longint unsigned w);
    return {1'(w >> 12), 3'b000, 12'(w)};
  endfunction

  task automatic chk(logic [15:0] got, logic [15:0] exp, int mw, string what);
    checks++;
    if (!same(got, exp, 5, mw) || got[15] != exp[15] && got[14:0] != 0) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h -> %h, expected %h", what, f32, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    for (int i = 0; i < 20000; i++) begin
      f32 = {1'($urandom_range(1, 0)), 8'($urandom_range(127 + 18, 127 - 18)), 23'($urandom)};
      #1;
      x = to_real(f32, 8, 23);
      chk(y16, 16'(from_real_rz(x, 5, 10)), 10, "F16");
      chk(y13, pack13(from_real_rz(x, 5, 7)), 7, "F13");
      checks++;
      if (y13[14:12] != 3'b000) failures++;
    end
    f32 = 32'h7F800000; #1; checks++; if (y16 != 16'h7C00) failures++;
    f32 = 32'hFF800000; #1; checks++; if (y16 != 16'hFC00 || y13 != 16'h8F80) failures++;
    f32 = 32'h7FC00000; #1; checks++; if (!(y16[14:10] == 5'h1F && y16[9:0] != 0)) failures++;
    f32 = 32'h00000123; #1; checks++; if (y16[14:0] != 0) failures++;
    f32 = 32'h47800000; #1; checks++; if (y16 != 16'h7BFF) failures++;    // 65536 saturates
    f32 = 32'h3F7FFFFF; #1; checks++; if (y16 != 16'h3BFF || y13 != 16'h077F) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
