// tb_f16_custom_top: end-to-end run of the whole design at its default sizes.
//
// The testbench plays the two host processors and their memory.  The
// register-file coprocessor computes Harris corner strength on 8-pixel-wide
// strips of a small 8 x 12 image, the way the document's code does it:
//   gradients  Ix = I(x+1) - I(x-1), Iy = I(y+1) - I(y-1) (pixels converted
//              with a 2^-4 scale, the document's "division by 16"),
//   products   Ixx, Ixy, Iyy, stored to memory,
//   smoothing  3 x 3 binomial Gauss filter, the weights applied with *2^n and
//              the sum divided by 16 with /2^n, giving Sxx, Sxy, Syy,
//   coarsity   K = Sxx * Syy - Sxy^2.
// Unaligned neighbours are fetched by the host with shifted loads.  Every
// stored vector is compared with the same computation done by the
// testbench's real-number reference; K is also compared, loosely, with a
// double-precision Harris to show the F16 accuracy.  The same image without
// the 2^-4 scale is then run again: K leaves the F16 range and must saturate,
// the dynamic-range problem the document discusses (products and sums
// saturate at the largest finite number).  The NIOS II custom
// instruction recomputes K for lanes 0 and 1 from the coprocessor's S values
// (1-cycle multiply, 2-cycle subtract) and must agree bit for bit.  The
// double-precision K is finally narrowed by the F32 -> F16 and F32 -> F13
// converters.  Each mechanism is counted and must occur: interlock stalls,
// multicycle and combinational custom instructions, saturation, flush to zero
// and both narrowings.
module tb_f16_custom_top;
  import fp_pkg::*;
  import tb_fp_ref::*;

  localparam int H = 8, W = 12;

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

  // Mechanism counters.
  int n_interlock = 0, n_multi = 0, n_comb = 0, n_sat = 0, n_flush = 0, n_n16 = 0, n_n13 = 0;

  logic [127:0] arch [16];
  logic [7:0]   img [H][W];
  logic [15:0]  fmem [3][H][W];   // Ixx, Ixy, Iyy

  // ---------------- coprocessor host ----------------
  task automatic xt(fp_op_e o, int d, int s, int t, int k, logic [127:0] ld,
                    output logic [127:0] st);
    @(negedge clk);
    xt_valid = 1; xt_op = o; xt_rd = 4'(d); xt_rs = 4'(s); xt_rt = 4'(t); xt_imm = 5'(k);
    xt_ld_data = ld;
    #1;
    while (!xt_ready) begin n_interlock++; @(negedge clk); #1; end
    st = xt_st_data;
    if (o == OP_ST)
      for (int l = 0; l < 8; l++) if (xt_st_data[16*l +: 15] == 15'h7BFF) n_sat++;
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

  task automatic store(int s, output logic [127:0] v);
    xt(OP_ST, 0, s, 0, 0, '0, v);
  endtask

  task automatic load_pixels(int d, int r, int c);
    logic [127:0] v, st;
    v = '0;
    for (int l = 0; l < 8; l++) v[8*l +: 8] = img[r][c + l];
    xt(OP_LD, d, 0, 0, 0, v, st);
  endtask

  task automatic load_floats(int d, int p, int r, int c);
    logic [127:0] v, st;
    for (int l = 0; l < 8; l++) v[16*l +: 16] = fmem[p][r][c + l];
    xt(OP_LD, d, 0, 0, 0, v, st);
  endtask

  // ---------------- NIOS host ----------------
  task automatic nios(fp_op_e o, logic [31:0] xa, logic [31:0] xb, output logic [31:0] y);
    @(negedge clk);
    nios_start = 1; nios_n = 4'(o); nios_dataa = xa; nios_datab = xb;
    #1;
    if (nios_done) n_comb++;
    else begin
      @(posedge clk); #1 nios_start = 0;
      while (!nios_done) begin @(negedge clk); #1; end
      n_multi++;
    end
    y = nios_result;
    @(posedge clk);
    #1 nios_start = 0;
  endtask

  // Harris in double precision on the scaled pixels, for the accuracy check.
  function automatic real harris_real(int r, int c, int sh);
    real sxx = 0, sxy = 0, syy = 0, ix, iy, w;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        ix = (real'(img[r+dr][c+dc+1]) - real'(img[r+dr][c+dc-1])) / pow2(sh);
        iy = (real'(img[r+dr+1][c+dc]) - real'(img[r+dr-1][c+dc])) / pow2(sh);
        w  = real'((2 - (dr < 0 ? -dr : dr)) * (2 - (dc < 0 ? -dc : dc))) / 16.0;
        sxx += w * ix * ix; sxy += w * ix * iy; syy += w * iy * iy;
      end
    return sxx * syy - sxy * sxy;
  endfunction

  task automatic harris(int sh, bit check_real);
    logic [127:0] v, k_vec, s_vec [3];
    logic [31:0]  y1, y2, y3;
    real          kmax, kr, err;
    // Gradients and their products, two strips per row (columns 1..8 and 3..10).
    for (int r = 1; r <= H - 2; r++) begin
      for (int c0 = 1; c0 <= 3; c0 += 2) begin
        load_pixels(0, r, c0 + 1);
        load_pixels(1, r, c0 - 1);
        load_pixels(2, r + 1, c0);
        load_pixels(3, r - 1, c0);
        for (int q = 0; q < 4; q++) op(OP_B2F, q, q, 0, sh);
        op(OP_SUB, 4, 0, 1);          // Ix
        op(OP_SUB, 5, 2, 3);          // Iy
        op(OP_MUL, 6, 4, 4);
        op(OP_MUL, 7, 4, 5);
        op(OP_MUL, 8, 5, 5);
        for (int p = 0; p < 3; p++) begin
          store(6 + p, v);
          for (int l = 0; l < 8; l++) fmem[p][r][c0 + l] = v[16*l +: 16];
        end
      end
    end
    // Smoothing and coarsity on columns 2..9 of rows 2..H-3.
    for (int r = 2; r <= H - 3; r++) begin
      for (int p = 0; p < 3; p++) begin
        bit first = 1;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            int lw;
            lw = (dr == 0 ? 1 : 0) + (dc == 0 ? 1 : 0);   // log2 of the binomial weight
            load_floats(9, p, r + dr, 2 + dc);
            if (first) op(OP_MUL2N, 10, 9, 0, lw);
            else begin
              op(OP_MUL2N, 9, 9, 0, lw);
              op(OP_ADD, 10, 10, 9);
            end
            first = 0;
          end
        store(10, v);                 // the weighted sum, before /16
        op(OP_DIV2N, 11 + p, 10, 0, 4);
      end
      op(OP_MUL, 14, 11, 13);
      op(OP_MUL, 15, 12, 12);
      op(OP_SUB, 14, 14, 15);
      store(14, k_vec);
      for (int p = 0; p < 3; p++) store(11 + p, s_vec[p]);
      // Flush: K / 2^24 lies below the smallest normal F16 number.
      op(OP_DIV2N, 15, 14, 0, 24);
      store(15, v);
      for (int l = 0; l < 8; l++)
        if (k_vec[16*l+10 +: 5] != 0 && v[16*l+10 +: 5] == 0) n_flush++;
      // NIOS II: K for lane pairs, from the same S values.
      for (int l = 0; l < 8; l += 2) begin
        nios(OP_MUL, s_vec[0][16*l +: 32], s_vec[2][16*l +: 32], y1);
        nios(OP_MUL, s_vec[1][16*l +: 32], s_vec[1][16*l +: 32], y2);
        nios(OP_SUB, y1, y2, y3);
        checks++;
        if (!same_vec(256'(y3), 256'(k_vec[16*l +: 32]), 2, 5, 10)) begin
          failures++;
          if (failures < 10) $display("FAIL NIOS K %h, coprocessor %h", y3, k_vec[16*l +: 32]);
        end
      end
      // Accuracy against double precision, and the F32 storage converters.
      if (check_real) begin
        kmax = 0;
        for (int l = 0; l < 8; l++) begin
          kr = harris_real(r, 2 + l, sh);
          if ((kr < 0 ? -kr : kr) > kmax) kmax = (kr < 0 ? -kr : kr);
        end
        for (int l = 0; l < 8; l++) begin
          logic [31:0] f32;
          kr  = harris_real(r, 2 + l, sh);
          err = to_real(k_vec[16*l +: 16], 5, 10) - kr;
          checks++;
          if ((err < 0 ? -err : err) > 0.02 * kmax + 1e-3) begin
            failures++;
            $display("FAIL accuracy: K %f, double %f", to_real(k_vec[16*l +: 16], 5, 10), kr);
          end
          f32 = 32'(from_real_rz(kr, 8, 23));
          narrow_f32 = f32;
          #1;
          checks += 2;
          if (!same(narrow_f16, from_real_rz(to_real(f32, 8, 23), 5, 10), 5, 10)) failures++;
          else n_n16++;
          if (narrow_f13 != {1'(from_real_rz(to_real(f32, 8, 23), 5, 7) >> 12), 3'b000,
                             12'(from_real_rz(to_real(f32, 8, 23), 5, 7))} && narrow_f13[14:0] != 0)
            failures++;
          else n_n13++;
        end
      end
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
    rst_n = 0; xt_valid = 0; xt_op = OP_ADD; xt_rd = 0; xt_rs = 0; xt_rt = 0; xt_imm = 0;
    xt_ld_data = 0; nios_clk_en = 1; nios_start = 0; nios_n = 0; nios_dataa = 0; nios_datab = 0;
    narrow_f32 = 0;
    for (int i = 0; i < 16; i++) arch[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A smooth image with a bright corner, plus noise.
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = 8'(((r >= 4 && c >= 6) ? 180 : 40) + $urandom_range(20, 0));
    harris(4, 1);
    if (n_sat != 0) begin failures++; $display("FAIL saturation with the 2^-4 scale"); end
    // High-contrast image without the scale: K leaves the F16 range.
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = ((r + c) % 3 == 0) ? 8'd255 : 8'd0;
    harris(0, 0);
    $display("interlock %0d, nios multicycle %0d, combinational %0d, saturated %0d, flushed %0d, narrowed F16 %0d F13 %0d",
             n_interlock, n_multi, n_comb, n_sat, n_flush, n_n16, n_n13);
    checks += 7;
    if (n_interlock == 0) failures++;
    if (n_multi == 0) failures++;
    if (n_comb == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_n16 == 0) failures++;
    if (n_n13 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
