// tb_fp_mul: self-checking test of fp_mul in F16, F13 (5 + 7) and F10
// (5 + 4): random products
// checked against the real-number reference, plus overflow saturation,
// underflow flush, signed zero, infinity and NaN cases.
module tb_fp_mul;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b, y;
  logic [12:0] a13, b13, y13;
  logic [9:0]  a10, b10, y10;

  fp_mul dut (.a, .b, .y);
  fp_mul #(.EW(5), .MW(7)) dut13 (.a(a13), .b(b13), .y(y13));
  fp_mul #(.EW(5), .MW(4)) dut10 (.a(a10), .b(b10), .y(y10));

  task automatic chk16(logic [15:0] exp, string what);
    checks++;
    if (!same(y, exp, 5, 10)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp);
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
    for (int i = 0; i < 40000; i++) begin
      a = 16'(rand_fp(5, 10));
      b = 16'(rand_fp(5, 10));
      a13 = 13'(rand_fp(5, 7));
      b13 = 13'(rand_fp(5, 7));
      a10 = 10'(rand_fp(5, 4));
      b10 = 10'(rand_fp(5, 4));
      #1;
      chk16(16'(from_real_rz(to_real(a, 5, 10) * to_real(b, 5, 10), 5, 10)), "random");
      checks++;
      if (!same(y13, from_real_rz(to_real(a13, 5, 7) * to_real(b13, 5, 7), 5, 7), 5, 7)) begin
        failures++;
        if (failures < 10) $display("FAIL F13 %h * %h = %h", a13, b13, y13);
      end
      checks++;
      if (!same(y10, from_real_rz(to_real(a10, 5, 4) * to_real(b10, 5, 4), 5, 4), 5, 4)) begin
        failures++;
        if (failures < 10) $display("FAIL F10 %h * %h = %h", a10, b10, y10);
      end
    end
    a = 16'h5C00; b = 16'h5C00; #1; chk16(16'h7BFF, "overflow saturates");
    a = 16'h0400; b = 16'h3800; #1; chk16(16'h0000, "underflow flushes");
    a = 16'h3E00; b = 16'h3E00; #1; chk16(16'h4080, "1.5 * 1.5 = 2.25");
    a = 16'h3BFF; b = 16'h3BFF; #1; chk16(16'h3BFE, "truncation");
    a = 16'h8000; b = 16'h3C00; #1; checks++; if (y != 16'h8000) failures++;
    a = 16'h7C00; b = 16'hC000; #1; checks++; if (y != 16'hFC00) failures++;
    a = 16'h7C00; b = 16'h0000; #1; checks++; if (!(y[14:10] == 5'h1F && y[9:0] != 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
