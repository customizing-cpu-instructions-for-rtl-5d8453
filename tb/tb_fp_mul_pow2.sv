// tb_fp_mul_pow2: exhaustive-in-n, random-in-a test of fp_mul_pow2 (F16):
// y must equal a * 2^n, saturated to the largest finite number on overflow.
module tb_fp_mul_pow2;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, y;
  logic [4:0]  n;

  fp_mul_pow2 dut (.a, .n, .y);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = 16'(rand_fp(5, 10));
      for (int k = 0; k < 32; k++) begin
        n = 5'(k);
        #1;
        checks++;
        if (!same(y, from_real_rz(to_real(a, 5, 10) * pow2(k), 5, 10), 5, 10)) begin
          failures++;
          if (failures < 10) $display("FAIL %h * 2^%0d = %h", a, k, y);
        end
      end
    end
    a = 16'h7C00; n = 5'd3; #1; checks++; if (y != 16'h7C00) failures++;
    a = 16'h8000; n = 5'd3; #1; checks++; if (y != 16'h8000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
