// tb_optical_flow: Horn & Schunck optical flow run on the register-file
// coprocessor (default parameters: 8 F16 lanes, 2-cycle latency).
//
// Two 10 x 20 frames of a smooth pattern are generated, the second one moved by
// (0.5, 0.25) pixel.  The coprocessor computes, on 8-pixel strips, the
// derivatives
//   Ix = (I0(x+1) - I0(x-1) + I1(x+1) - I1(x-1)) / 4,  Iy likewise,
//   It = I1 - I0             (pixels converted with a 2^-4 scale),
// and then, each iteration, the neighbour averages u_avg, v_avg (four
// neighbours, /4 by /2^n), the numerator Ix*u_avg + Iy*v_avg + It and the
// denominator alpha^2 + Ix^2 + Iy^2.  There is no divide instruction, so the
// host divides the two stored vectors (truncating to F16) and loads the ratio
// back; the coprocessor finishes u = u_avg - Ix*ratio, v = v_avg - Iy*ratio.
// Flow outside the computed area stays zero.  Every stored vector is checked
// bit for bit against the reference model, and after the last iteration the
// F16 flow is compared with the same iterations in double precision (the
// accuracy question of F16 against wider formats).
module tb_optical_flow;
  import fp_pkg::*;
  import tb_fp_ref::*;

  localparam int H = 10, W = 20, ITER = 12;
  localparam real ALPHA2 = 1.0;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n;
  logic         xt_valid, xt_ready, xt_st_valid, xt_interlock;
  fp_op_e       xt_op;
  logic [3:0]   xt_rd, xt_rs, xt_rt;
  logic [4:0]   xt_imm;
  logic [127:0] xt_ld_data, xt_st_data;
  logic         nios_clk_en, nios_start, nios_done;
  logic [3:0]   nios_n;
  logic [31:0]  nios_dataa, nios_datab, nios_result;
  logic [31:0]  narrow_f32;
  logic [15:0]  narrow_f16, narrow_f13;

  f16_custom_top dut (.*);

  logic [127:0] arch [16];
  logic [7:0]   i0 [H][W], i1 [H][W];
  logic [15:0]  gx [H][W], gy [H][W], gt [H][W];
  logic [15:0]  u [H][W], v [H][W], un [H][W], vn [H][W];
  real          ur [H][W], vr [H][W], unr [H][W], vnr [H][W];
  int           n_interlock = 0;

  task automatic xt(fp_op_e o, int d, int s, int t, int k, logic [127:0] ld,
                    output logic [127:0] st);
    @(negedge clk);
    xt_valid = 1; xt_op = o; xt_rd = 4'(d); xt_rs = 4'(s); xt_rt = 4'(t); xt_imm = 5'(k);
    xt_ld_data = ld;
    #1;
    while (!xt_ready) begin n_interlock++; @(negedge clk); #1; end
    st = xt_st_data;
    if (o == OP_ST) begin
      checks++;
      if (!xt_st_valid || !same_vec(256'(xt_st_data), 256'(arch[s]), 8, 5, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL store r%0d: %h, expected %h", s, xt_st_data, arch[s]);
      end
    end else begin
      arch[d] = (o == OP_LD) ? ld : 128'(ref_vec(o, 256'(arch[s]), 256'(arch[t]), k, 8, 5, 10));
    end
    @(posedge clk);
    #1 xt_valid = 0;
  endtask

  task automatic op(fp_op_e o, int d, int s, int t = 0, int k = 0);
    logic [127:0] st;
    xt(o, d, s, t, k, '0, st);
  endtask

  task automatic ld(int d, logic [127:0] val);
    logic [127:0] st;
    xt(OP_LD, d, 0, 0, 0, val, st);
  endtask

  task automatic st(int s, output logic [127:0] val);
    xt(OP_ST, 0, s, 0, 0, '0, val);
  endtask

  function automatic logic [127:0] pix(bit second, int r, int c);
    logic [127:0] x = '0;
    for (int l = 0; l < 8; l++) x[8*l +: 8] = second ? i1[r][c + l] : i0[r][c + l];
    return x;
  endfunction

  typedef logic [15:0] plane_t [H][W];
  function automatic logic [127:0] row8(const ref plane_t p, input int r, input int c);
    logic [127:0] x;
    for (int l = 0; l < 8; l++) x[16*l +: 16] = p[r][c + l];
    return x;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] x, num, den, ratio;
    real maxdiff, mu, mv, d;
    rst_n = 0; xt_valid = 0; xt_op = OP_ADD; xt_rd = 0; xt_rs = 0; xt_rt = 0; xt_imm = 0;
    xt_ld_data = 0; nios_clk_en = 1; nios_start = 0; nios_n = 0; nios_dataa = 0; nios_datab = 0;
    narrow_f32 = 0;
    for (int i = 0; i < 16; i++) arch[i] = '0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        i0[r][c] = 8'($rtoi(128.0 + 60.0 * $sin(0.5 * c + 0.3 * r)));
        i1[r][c] = 8'($rtoi(128.0 + 60.0 * $sin(0.5 * (c - 0.5) + 0.3 * (r - 0.25))));
        gx[r][c] = 0; gy[r][c] = 0; gt[r][c] = 0;
        u[r][c] = 0; v[r][c] = 0; un[r][c] = 0; vn[r][c] = 0;
        ur[r][c] = 0; vr[r][c] = 0; unr[r][c] = 0; vnr[r][c] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Derivatives, rows 1..H-2, strips at columns 2..9 and 10..17.
    for (int r = 1; r <= H - 2; r++)
      for (int c0 = 2; c0 <= 10; c0 += 8) begin
        ld(0, pix(0, r, c0 + 1)); ld(1, pix(0, r, c0 - 1));
        ld(2, pix(1, r, c0 + 1)); ld(3, pix(1, r, c0 - 1));
        for (int q = 0; q < 4; q++) op(OP_B2F, q, q, 0, 4);
        op(OP_SUB, 4, 0, 1); op(OP_SUB, 5, 2, 3); op(OP_ADD, 4, 4, 5); op(OP_DIV2N, 4, 4, 0, 2);
        ld(0, pix(0, r + 1, c0)); ld(1, pix(0, r - 1, c0));
        ld(2, pix(1, r + 1, c0)); ld(3, pix(1, r - 1, c0));
        for (int q = 0; q < 4; q++) op(OP_B2F, q, q, 0, 4);
        op(OP_SUB, 5, 0, 1); op(OP_SUB, 6, 2, 3); op(OP_ADD, 5, 5, 6); op(OP_DIV2N, 5, 5, 0, 2);
        ld(0, pix(1, r, c0)); ld(1, pix(0, r, c0));
        op(OP_B2F, 0, 0, 0, 4); op(OP_B2F, 1, 1, 0, 4);
        op(OP_SUB, 6, 0, 1);
        st(4, x); for (int l = 0; l < 8; l++) gx[r][c0 + l] = x[16*l +: 16];
        st(5, x); for (int l = 0; l < 8; l++) gy[r][c0 + l] = x[16*l +: 16];
        st(6, x); for (int l = 0; l < 8; l++) gt[r][c0 + l] = x[16*l +: 16];
      end

    // alpha^2 in every lane.
    x = '0;
    for (int l = 0; l < 8; l++) x[16*l +: 16] = 16'(from_real_rz(ALPHA2, 5, 10));
    ld(7, x);

    for (int it = 0; it < ITER; it++) begin
      for (int r = 1; r <= H - 2; r++)
        for (int c0 = 2; c0 <= 10; c0 += 8) begin
          ld(8, row8(u, r, c0 - 1)); ld(9, row8(u, r, c0 + 1));
          ld(10, row8(u, r - 1, c0)); ld(11, row8(u, r + 1, c0));
          op(OP_ADD, 8, 8, 9); op(OP_ADD, 10, 10, 11); op(OP_ADD, 8, 8, 10); op(OP_DIV2N, 8, 8, 0, 2);
          ld(12, row8(v, r, c0 - 1)); ld(13, row8(v, r, c0 + 1));
          ld(14, row8(v, r - 1, c0)); ld(15, row8(v, r + 1, c0));
          op(OP_ADD, 12, 12, 13); op(OP_ADD, 14, 14, 15); op(OP_ADD, 12, 12, 14); op(OP_DIV2N, 12, 12, 0, 2);
          ld(4, row8(gx, r, c0)); ld(5, row8(gy, r, c0)); ld(6, row8(gt, r, c0));
          op(OP_MUL, 9, 4, 8); op(OP_MUL, 10, 5, 12); op(OP_ADD, 9, 9, 10); op(OP_ADD, 9, 9, 6);
          op(OP_MUL, 10, 4, 4); op(OP_MUL, 11, 5, 5); op(OP_ADD, 10, 10, 11); op(OP_ADD, 10, 10, 7);
          st(9, num); st(10, den);
          // Host division, truncated to F16.
          for (int l = 0; l < 8; l++)
            ratio[16*l +: 16] = 16'(from_real_rz(to_real(num[16*l +: 16], 5, 10) /
                                                 to_real(den[16*l +: 16], 5, 10), 5, 10));
          ld(11, ratio);
          op(OP_MUL, 13, 4, 11); op(OP_SUB, 13, 8, 13);
          op(OP_MUL, 14, 5, 11); op(OP_SUB, 14, 12, 14);
          st(13, x); for (int l = 0; l < 8; l++) un[r][c0 + l] = x[16*l +: 16];
          st(14, x); for (int l = 0; l < 8; l++) vn[r][c0 + l] = x[16*l +: 16];
        end
      u = un; v = vn;
      // The same iteration in double precision, from the same derivatives.
      for (int r = 1; r <= H - 2; r++)
        for (int c = 2; c <= 17; c++) begin
          real ua, va, ix, iy, t;
          ua = (ur[r][c-1] + ur[r][c+1] + ur[r-1][c] + ur[r+1][c]) / 4.0;
          va = (vr[r][c-1] + vr[r][c+1] + vr[r-1][c] + vr[r+1][c]) / 4.0;
          ix = to_real(gx[r][c], 5, 10); iy = to_real(gy[r][c], 5, 10);
          t  = (ix * ua + iy * va + to_real(gt[r][c], 5, 10)) / (ALPHA2 + ix * ix + iy * iy);
          unr[r][c] = ua - ix * t; vnr[r][c] = va - iy * t;
        end
      ur = unr; vr = vnr;
    end

    maxdiff = 0; mu = 0; mv = 0;
    for (int r = 1; r <= H - 2; r++)
      for (int c = 2; c <= 17; c++) begin
        d = to_real(u[r][c], 5, 10) - ur[r][c]; if (d < 0) d = -d; if (d > maxdiff) maxdiff = d;
        d = to_real(v[r][c], 5, 10) - vr[r][c]; if (d < 0) d = -d; if (d > maxdiff) maxdiff = d;
        mu += to_real(u[r][c], 5, 10); mv += to_real(v[r][c], 5, 10);
      end
    mu = mu / ((H - 2) * 16); mv = mv / ((H - 2) * 16);
    $display("after %0d iterations: mean flow (%f, %f), true (0.5, 0.25); max |F16 - double| = %f; interlock cycles %0d",
             ITER, mu, mv, maxdiff, n_interlock);
    checks += 3;
    if (maxdiff > 0.02) failures++;
    if (!(mu > 0.0 && mv > 0.0)) failures++;   // moving the right way
    if (n_interlock == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
