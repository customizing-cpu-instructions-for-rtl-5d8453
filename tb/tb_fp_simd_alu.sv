// tb_fp_simd_alu: random operations on the 8-lane F16 unit.  Every lane of
// every result is compared with the real-number reference for the chosen
// operator, so lane wiring, operator selection and the byte packing of the
// conversions are all checked.  A 2-lane F13 instance checks the lane layout
// "sign, 000, exponent, fraction".
module tb_fp_simd_alu;
  import fp_pkg::*;
  import tb_fp_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fp_op_e       op;
  logic [127:0] a, b, y;
  logic [31:0]  a13, b13, y13;
  logic [4:0]   n;

  fp_simd_alu dut (.op, .a, .b, .n, .y);
  fp_simd_alu #(.EW(5), .MW(7), .LANES(2)) dut13 (.op, .a(a13), .b(b13), .n, .y(y13));

  function automatic longint unsigned ref_lane(fp_op_e o, longint unsigned x, longint unsigned z,
                                               int k, int ubyte, int ew, int mw);
    real rx = to_real(x, ew, mw), rz = to_real(z, ew, mw);
    case (o)
      OP_ADD:   return from_real_rz(rx + rz, ew, mw);
      OP_SUB:   return from_real_rz(rx - rz, ew, mw);
      OP_MUL:   return from_real_rz(rx * rz, ew, mw);
      OP_MUL2N: return from_real_rz(rx * pow2(k), ew, mw);
      OP_DIV2N: return from_real_rz(rx / pow2(k), ew, mw);
      OP_B2F:   return from_real_rz(real'(ubyte) / pow2(k), ew, mw);
      default:  return 0;
    endcase
  endfunction

  function automatic logic [15:0] f13_to_lane(longint unsigned w);
    return {1'(w >> 12), 3'b000, 12'(w)};
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
    for (int i = 0; i < 6000; i++) begin
      op = ops[i % 7];
      n  = 5'($urandom_range(12, 0));
      for (int l = 0; l < 8; l++) begin
        a[16*l +: 16] = 16'(rand_fp(5, 10));
        b[16*l +: 16] = 16'(rand_fp(5, 10));
      end
      if (op == OP_F2B)
        for (int l = 0; l < 8; l++) a[16*l +: 16] = 16'(from_real_rz(real'($urandom_range(300, 0)) + 0.75, 5, 10));
      for (int l = 0; l < 2; l++) begin
        a13[16*l +: 16] = f13_to_lane(rand_fp(5, 7));
        b13[16*l +: 16] = f13_to_lane(rand_fp(5, 7));
      end
      #1;
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (op == OP_F2B) begin
          if (int'(y[8*l +: 8]) != to_byte(a[16*l +: 16], 5, 10)) failures++;
        end else if (!same(y[16*l +: 16],
                           ref_lane(op, a[16*l +: 16], b[16*l +: 16], int'(n), int'(a[8*l +: 8]), 5, 10), 5, 10)) begin
          failures++;
          if (failures < 10) $display("FAIL op %s lane %0d: %h %h -> %h", op.name(), l, a[16*l +: 16], b[16*l +: 16], y[16*l +: 16]);
        end
      end
      if (op == OP_F2B) begin
        checks++;
        if (y[127:64] != '0) failures++;
      end else begin
        for (int l = 0; l < 2; l++) begin
          longint unsigned x13, z13;
          x13 = {a13[16*l+15], a13[16*l +: 12]};
          z13 = {b13[16*l+15], b13[16*l +: 12]};
          checks++;
          if (!same({y13[16*l+15], y13[16*l +: 12]}, ref_lane(op, x13, z13, int'(n), int'(a13[8*l +: 8]), 5, 7), 5, 7)
              || y13[16*l+12 +: 3] != 3'b000) begin
            failures++;
            if (failures < 10) $display("FAIL F13 op %s lane %0d -> %h", op.name(), l, y13[16*l +: 16]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
