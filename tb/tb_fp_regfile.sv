// tb_fp_regfile: random writes and reads on both ports of fp_regfile against a
// shadow copy; checks the reset value, write-then-read timing and that a read
// in the cycle of a write to the same register returns the old value.
module tb_fp_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, we;
  logic [3:0]  ra1, ra2, wa;
  logic [127:0] rd1, rd2, wd;
  logic [127:0] shadow [16];

  fp_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra1 = 4'(i); #1;
      checks++; if (rd1 != '0) failures++;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we  = 1'($urandom_range(1, 0));
      wa  = 4'($urandom);
      wd  = {$urandom, $urandom, $urandom, $urandom};
      ra1 = 4'($urandom);
      ra2 = (i % 4 == 0) ? wa : 4'($urandom);
      #1;
      checks += 2;
      if (rd1 != shadow[ra1]) failures++;
      if (rd2 != shadow[ra2]) failures++;
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
