// tb_fp_add: self-checking test of fp_add in F16 (default), F13 (5 + 7)
// and F10 (5 + 4), the narrowest mantissa of the accuracy study.
// Random operands, operands of nearby exponents (cancellation), and directed
// cases: overflow saturation, flush of results below the normal range, exact
// cancellation, infinities and NaN.  Expected values come from tb_fp_ref.
module tb_fp_add;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b, y;
  logic        sub;
  logic [12:0] a13, b13, y13;
  logic [9:0]  a10, b10, y10;

  fp_add dut (.a, .b, .sub, .y);
  fp_add #(.EW(5), .MW(7)) dut13 (.a(a13), .b(b13), .sub(sub), .y(y13));
  fp_add #(.EW(5), .MW(4)) dut10 (.a(a10), .b(b10), .sub(sub), .y(y10));

  task automatic chk16(logic [15:0] exp, string what);
    checks++;
    if (!same(y, exp, 5, 10)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h %s %h = %h, expected %h", what, a, sub ? "-" : "+", b, y, exp);
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
    for (int i = 0; i < 40000; i++) begin
      a = 16'(rand_fp(5, 10));
      b = (i % 2) ? 16'(rand_near(a, 5, 10)) : 16'(rand_fp(5, 10));
      sub = 1'($urandom_range(1, 0));
      #1;
      x = sub ? to_real(a, 5, 10) - to_real(b, 5, 10) : to_real(a, 5, 10) + to_real(b, 5, 10);
      chk16(16'(from_real_rz(x, 5, 10)), "random");
      a13 = 13'(rand_fp(5, 7));
      b13 = (i % 2) ? 13'(rand_near(a13, 5, 7)) : 13'(rand_fp(5, 7));
      #1;
      x = sub ? to_real(a13, 5, 7) - to_real(b13, 5, 7) : to_real(a13, 5, 7) + to_real(b13, 5, 7);
      checks++;
      if (!same(y13, from_real_rz(x, 5, 7), 5, 7)) begin
        failures++;
        if (failures < 10) $display("FAIL F13 %h %h -> %h", a13, b13, y13);
      end
      a10 = 10'(rand_fp(5, 4));
      b10 = (i % 2) ? 10'(rand_near(a10, 5, 4)) : 10'(rand_fp(5, 4));
      #1;
      x = sub ? to_real(a10, 5, 4) - to_real(b10, 5, 4) : to_real(a10, 5, 4) + to_real(b10, 5, 4);
      checks++;
      if (!same(y10, from_real_rz(x, 5, 4), 5, 4)) begin
        failures++;
        if (failures < 10) $display("FAIL F10 %h %h -> %h", a10, b10, y10);
      end
    end
    // Directed cases.
    sub = 0; a = 16'h7BFF; b = 16'h7BFF; #1; chk16(16'h7BFF, "overflow saturates");
    sub = 1; a = 16'hFBFF; b = 16'h7BFF; #1; chk16(16'hFBFF, "negative overflow");
    sub = 1; a = 16'h0401; b = 16'h0400; #1; chk16(16'h0000, "below normal range flushes");
    sub = 1; a = 16'h3C00; b = 16'h3C00; #1; chk16(16'h0000, "exact cancellation");
    sub = 0; a = 16'h3C00; b = 16'h0000; #1; chk16(16'h3C00, "x + 0");
    sub = 1; a = 16'h3C00; b = 16'h1000; #1; chk16(16'h3BFF, "truncation toward zero");
    sub = 0; a = 16'h3C00; b = 16'h1000; #1; chk16(16'h3C00, "small addend truncated");
    sub = 0; a = 16'h7C00; b = 16'h3C00; #1; chk16(16'h7C00, "inf + 1");
    sub = 1; a = 16'h7C00; b = 16'h7C00; #1;
    checks++; if (!(y[14:10] == 5'h1F && y[9:0] != 0)) failures++;
    sub = 0; a = 16'h7E00; b = 16'h3C00; #1;
    checks++; if (!(y[14:10] == 5'h1F && y[9:0] != 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
