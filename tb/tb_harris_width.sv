// tb_harris_width: Harris corner strength computed with short floats of every
// mantissa width from 4 to 10 bits (F10 ... F16, all with the 5-bit exponent),
// compared with the same computation in double precision.
//
// Seven 8-lane SIMD units, one per width, run the same instruction stream in
// lockstep; the testbench plays the host and holds the vectors.  Per 8-pixel
// strip the program converts pixels with a 2^-sh scale, forms the gradients
// Ix, Iy by central differences, their products, the 3 x 3 binomial Gauss sums
// (weights applied with *2^n, sum divided by 16 with /2^n) and the corner
// strength K = Sxx * Syy - Sxy^2.  Every instruction result of every width is
// compared bit for bit with the real-number reference.  For each width the
// testbench then reports the PSNR of K against double precision,
// PSNR = 10 log10(max|K|^2 / mean squared error), over a synthetic 18 x 28
// image of blocks, ramps and noise, with the pixel scale 2^-4 and 2^-8.  The
// PSNR must grow with the mantissa width at the 2^-4 scale, and F16 must beat
// F13 by a clear margin (a few dB per bit).  The image, its size and the PSNR
// definition are this testbench's own.
module tb_harris_width;
  import fp_pkg::*;
  import tb_fp_ref::*;

  localparam int NWID = 7;                 // widths MW = 4 .. 10
  localparam int H = 18, W = 28;
  localparam int NSTRIP = (W - 4) / 8;     // output columns 2 .. W-3

  typedef logic [127:0] vecs_t [NWID];

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fp_op_e       op;
  logic [4:0]   n;
  logic [127:0] va [NWID], vb [NWID], vy [NWID];

  for (genvar w = 0; w < NWID; w++) begin : g_width
    fp_simd_alu #(.EW(5), .MW(4 + w), .LANES(8)) u_alu (.op, .a(va[w]), .b(vb[w]), .n, .y(vy[w]));
  end

  logic [7:0] img [H][W];
  real        kfp [2][NWID][H][W];
  real        kdb [2][H][W];

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instruction on all widths at once, each result checked.
  task automatic run(fp_op_e o, input vecs_t a, input vecs_t b, input int k, output vecs_t y);
    logic [255:0] e;
    op = o; n = 5'(k);
    va = a; vb = b;
    #1;
    for (int w = 0; w < NWID; w++) begin
      e = ref_vec(o, 256'(a[w]), 256'(b[w]), k, 8, 5, 4 + w);
      checks++;
      if (!same_vec(256'(vy[w]), e, 8, 5, 4 + w)) begin
        failures++;
        if (failures < 10) $display("FAIL MW=%0d op %s: %h, expected %h", 4 + w, o.name(), vy[w], e[127:0]);
      end
      y[w] = vy[w];
    end
    @(posedge clk);
  endtask

  task automatic pixels(int r, int c, output vecs_t v);
    for (int w = 0; w < NWID; w++) begin
      v[w] = '0;
      for (int l = 0; l < 8; l++) v[w][8*l +: 8] = img[r][c + l];
    end
  endtask

  // Ixx, Ixy, Iyy of the strip starting at (r, c).
  task automatic products(int r, int c, int sh, output vecs_t pxx, output vecs_t pxy, output vecs_t pyy);
    vecs_t p, q, fa, fb, ix, iy;
    pixels(r, c + 1, p); run(OP_B2F, p, p, sh, fa);
    pixels(r, c - 1, q); run(OP_B2F, q, q, sh, fb);
    run(OP_SUB, fa, fb, 0, ix);
    pixels(r + 1, c, p); run(OP_B2F, p, p, sh, fa);
    pixels(r - 1, c, q); run(OP_B2F, q, q, sh, fb);
    run(OP_SUB, fa, fb, 0, iy);
    run(OP_MUL, ix, ix, 0, pxx);
    run(OP_MUL, ix, iy, 0, pxy);
    run(OP_MUL, iy, iy, 0, pyy);
  endtask

  // Value of a short float held in a 16-bit lane: sign on top, then padding.
  function automatic real lane_real(logic [15:0] x, int mw);
    longint unsigned f;
    f = (64'(x[15]) << (5 + mw)) | (64'(x[14:0]) & ((64'd1 << (5 + mw)) - 1));
    return to_real(f, 5, mw);
  endfunction

  function automatic real harris_real(int r, int c, int sh);
    real sxx = 0, sxy = 0, syy = 0, ix, iy, wt;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        ix = (real'(img[r+dr][c+dc+1]) - real'(img[r+dr][c+dc-1])) / pow2(sh);
        iy = (real'(img[r+dr+1][c+dc]) - real'(img[r+dr-1][c+dc])) / pow2(sh);
        wt = real'((2 - (dr < 0 ? -dr : dr)) * (2 - (dc < 0 ? -dc : dc))) / 16.0;
        sxx += wt * ix * ix; sxy += wt * ix * iy; syy += wt * iy * iy;
      end
    return sxx * syy - sxy * sxy;
  endfunction

  task automatic harris(int cfg, int sh);
    vecs_t sxx, sxy, syy, pxx, pxy, pyy, t, kk, k2;
    for (int r = 2; r <= H - 3; r++)
      for (int s = 0; s < NSTRIP; s++) begin
        int c0;
        bit first;
        c0 = 2 + 8 * s;
        first = 1;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            int wn;
            wn = (1 - (dr < 0 ? -dr : dr)) + (1 - (dc < 0 ? -dc : dc));
            products(r + dr, c0 + dc, sh, pxx, pxy, pyy);
            run(OP_MUL2N, pxx, pxx, wn, pxx);
            run(OP_MUL2N, pxy, pxy, wn, pxy);
            run(OP_MUL2N, pyy, pyy, wn, pyy);
            if (first) begin
              sxx = pxx; sxy = pxy; syy = pyy;
              first = 0;
            end else begin
              run(OP_ADD, sxx, pxx, 0, sxx);
              run(OP_ADD, sxy, pxy, 0, sxy);
              run(OP_ADD, syy, pyy, 0, syy);
            end
          end
        run(OP_DIV2N, sxx, sxx, 4, sxx);
        run(OP_DIV2N, sxy, sxy, 4, sxy);
        run(OP_DIV2N, syy, syy, 4, syy);
        run(OP_MUL, sxx, syy, 0, kk);
        run(OP_MUL, sxy, sxy, 0, k2);
        run(OP_SUB, kk, k2, 0, t);
        for (int l = 0; l < 8; l++) begin
          kdb[cfg][r][c0 + l] = harris_real(r, c0 + l, sh);
          for (int w = 0; w < NWID; w++)
            kfp[cfg][w][r][c0 + l] = lane_real(t[w][16*l +: 16], 4 + w);
        end
      end
  endtask

  function automatic real psnr(int cfg, int w);
    real peak = 0, mse = 0, d;
    int  cnt = 0;
    for (int r = 2; r <= H - 3; r++)
      for (int c = 2; c < 2 + 8 * NSTRIP; c++) begin
        if (kdb[cfg][r][c] > peak) peak = kdb[cfg][r][c];
        if (-kdb[cfg][r][c] > peak) peak = -kdb[cfg][r][c];
        d = kfp[cfg][w][r][c] - kdb[cfg][r][c];
        mse += d * d;
        cnt++;
      end
    mse = mse / cnt;
    if (mse == 0) return 999.0;
    return 10.0 * $log10(peak * peak / mse);
  endfunction

  initial begin
    real p [2][NWID];
    int  v;
    // Synthetic scene: two bright blocks with corners, a ramp, and noise.
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        v = 40 + 3 * c;
        if (r >= 4 && r < 11 && c >= 5 && c < 13) v = 200;
        if (r >= 9 && r < 15 && c >= 16 && c < 24) v = 20;
        v = v + int'($urandom_range(12, 0));
        img[r][c] = 8'(v > 255 ? 255 : v);
      end
    op = OP_ADD; n = '0;
    for (int w = 0; w < NWID; w++) begin va[w] = '0; vb[w] = '0; end
    @(posedge clk);
    harris(0, 4);
    harris(1, 8);
    for (int cfg = 0; cfg < 2; cfg++) begin
      $display("pixel scale 2^-%0d: PSNR of K against double precision", cfg == 0 ? 4 : 8);
      for (int w = NWID - 1; w >= 0; w--) begin
        p[cfg][w] = psnr(cfg, w);
        $display("  F%0d (mantissa %0d bits): %6.1f dB", 10 + w, 4 + w, p[cfg][w]);
      end
    end
    // Trend of the accuracy study: more mantissa bits, more accuracy.
    for (int w = 1; w < NWID; w++) begin
      checks++;
      if (!(p[0][w] > p[0][w-1])) begin
        failures++;
        $display("FAIL PSNR does not grow from MW=%0d to MW=%0d", 3 + w, 4 + w);
      end
    end
    checks++;
    if (!(p[0][6] > p[0][3] + 9.0)) begin
      failures++;
      $display("FAIL F16 not clearly more accurate than F13");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
