// tb_byte_to_fp: exhaustive test of byte_to_fp over every byte and every
// scale n (0..31), for F16 and F13: y must equal u / 2^n, exact for these
// formats, flushed to zero below the normal range.
module tb_byte_to_fp;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  u;
  logic [4:0]  n;
  logic [15:0] y;
  logic [12:0] y13;

  byte_to_fp dut (.u, .n, .y);
  byte_to_fp #(.EW(5), .MW(7)) dut13 (.u, .n, .y(y13));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 32; k++) begin
        u = 8'(v); n = 5'(k);
        #1;
        checks += 2;
        if (y != 16'(from_real_rz(real'(v) / pow2(k), 5, 10))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d / 2^%0d -> %h", v, k, y);
        end
        if (y13 != 13'(from_real_rz(real'(v) / pow2(k), 5, 7))) begin
          failures++;
          if (failures < 10) $display("FAIL F13 %0d / 2^%0d -> %h", v, k, y13);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
