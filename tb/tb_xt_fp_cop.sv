// tb_xt_fp_cop: random instruction streams through the register-file
// coprocessor in four configurations: 8 lanes with 1-, 2- and 4-cycle latency
// (the latencies the custom instructions were evaluated with) and a scalar
// 1-lane unit with 3-cycle latency.  Each configuration runs in its own
// xt_cop_check harness: a shadow register file computed with the real-number
// reference checks every stored vector, and the number of interlock cycles
// of every instruction is predicted from the issue times of its sources'
// producers (latency minus distance, no bypass) and checked exactly.
module tb_xt_fp_cop;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  localparam int LATS  [NC] = '{1, 2, 4, 3};
  localparam int LANESC [NC] = '{8, 8, 8, 1};

  logic fin [NC];
  int   chk [NC], fail [NC];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    xt_cop_check #(.LAT(LATS[i]), .LANES(LANESC[i])) u_chk (
      .clk, .finished(fin[i]), .checks(chk[i]), .failures(fail[i]));
  end

  int checks, failures;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < NC; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
