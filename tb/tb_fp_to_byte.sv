// tb_fp_to_byte: exhaustive test of fp_to_byte over all 65536 F16 words:
// truncation toward zero, negative and NaN to 0, 256 and above to 255.
module tb_fp_to_byte;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a;
  logic [7:0]  u;

  fp_to_byte dut (.a, .u);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a = 16'(v);
      #1;
      checks++;
      if (int'(u) != to_byte(a, 5, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL %h -> %0d, expected %0d", a, u, to_byte(a, 5, 10));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
