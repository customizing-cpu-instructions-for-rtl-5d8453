// tb_fp_ref: reference model of the short floating-point formats, for testbenches.
//
// Works on real numbers rather than on bit fields, so it is independent of the
// RTL's algorithms.  to_real() decodes a word with ew exponent and mw fraction
// bits (zero exponent = zero, no denormals).  from_real_rz() encodes a real by
// rounding toward zero, flushing values below the smallest normal number to
// zero and saturating values beyond the range to the largest finite number.
// Double precision holds every sum and product of two F16 or F13 numbers
// exactly, so ref(a op b) is exactly the truncated result.
package tb_fp_ref;
  import fp_pkg::*;

  function automatic real pow2(int k);
    real r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(longint unsigned w, int ew, int mw);
    int bias = (1 << (ew - 1)) - 1;
    longint unsigned e = (w >> mw) & ((64'd1 << ew) - 1);
    longint unsigned f = w & ((64'd1 << mw) - 1);
    real r;
    if (e == 0) return 0.0;
    r = (1.0 + real'(f) / pow2(mw)) * pow2(int'(e) - bias);
    if ((w >> (ew + mw)) & 1) r = -r;
    return r;
  endfunction

  function automatic longint unsigned from_real_rz(real x, int ew, int mw);
    int bias = (1 << (ew - 1)) - 1;
    int emax = (1 << ew) - 1;
    longint unsigned s = (x < 0.0) ? 1 : 0;
    real ax = (x < 0.0) ? -x : x;
    int e = 0;
    longint unsigned f;
    if (ax == 0.0) return 0;
    while (ax >= 2.0) begin ax = ax / 2.0; e++; end
    while (ax < 1.0)  begin ax = ax * 2.0; e--; end
    if (e + bias <= 0) return s << (ew + mw);
    if (e + bias >= emax)
      return (s << (ew + mw)) | (longint'(emax - 1) << mw) | ((64'd1 << mw) - 1);
    f = longint'($floor((ax - 1.0) * pow2(mw)));
    return (s << (ew + mw)) | (longint'(e + bias) << mw) | f;
  endfunction

  // Equal, counting +0 and -0 (any zero exponent) as the same value.
  function automatic bit same(longint unsigned x, longint unsigned y, int ew, int mw);
    longint unsigned ex = (x >> mw) & ((64'd1 << ew) - 1);
    longint unsigned ey = (y >> mw) & ((64'd1 << ew) - 1);
    if (ex == 0 && ey == 0) return 1;
    return x == y;
  endfunction

  // Random finite operand: random sign, exponent 1..emax-1 (or zero now and then).
  function automatic longint unsigned rand_fp(int ew, int mw);
    longint unsigned e = 64'($urandom_range((1 << ew) - 2, 1));
    longint unsigned f = {$urandom, $urandom} & ((64'd1 << mw) - 1);
    longint unsigned s = 64'($urandom_range(1, 0));
    if ($urandom_range(31, 0) == 0) e = 0;
    return (s << (ew + mw)) | (e << mw) | (e == 0 ? 0 : f);
  endfunction

  // Random operand with an exponent near a given one, to make cancellation likely.
  function automatic longint unsigned rand_near(longint unsigned w, int ew, int mw);
    longint unsigned e = (w >> mw) & ((64'd1 << ew) - 1);
    int ne = int'(e) + $urandom_range(2, 0) - 1;
    longint unsigned f = {$urandom, $urandom} & ((64'd1 << mw) - 1);
    if (ne < 1) ne = 1;
    if (ne > (1 << ew) - 2) ne = (1 << ew) - 2;
    return (64'($urandom_range(1, 0)) << (ew + mw)) | (longint'(ne) << mw) | f;
  endfunction

  // Byte conversion reference: truncate toward zero, saturate to 0..255.
  function automatic int to_byte(longint unsigned w, int ew, int mw);
    longint unsigned e = (w >> mw) & ((64'd1 << ew) - 1);
    longint unsigned f = w & ((64'd1 << mw) - 1);
    bit s = (w >> (ew + mw)) & 1;
    real x;
    if (e == (64'd1 << ew) - 1) return (f == 0 && !s) ? 255 : 0;
    x = to_real(w, ew, mw);
    if (x <= 0.0) return 0;
    if (x >= 256.0) return 255;
    return int'($floor(x));
  endfunction

  // Reference for one operation of the SIMD unit on lanes of 16 bits.  Short
  // floats occupy a lane as "sign, zero padding, exponent, fraction".
  function automatic logic [255:0] ref_vec(fp_op_e o, logic [255:0] a, logic [255:0] b,
                                           int k, int lanes, int ew, int mw);
    logic [255:0] y = '0;
    for (int l = 0; l < lanes; l++) begin
      longint unsigned x = {a[16*l+15], a[16*l +: 15]} & ((64'd1 << (ew + mw + 1)) - 1);
      longint unsigned z = {b[16*l+15], b[16*l +: 15]} & ((64'd1 << (ew + mw + 1)) - 1);
      longint unsigned r;
      real rx, rz;
      x = ((a[16*l+15] ? 64'd1 : 64'd0) << (ew + mw)) | (a[16*l +: 15] & ((64'd1 << (ew + mw)) - 1));
      z = ((b[16*l+15] ? 64'd1 : 64'd0) << (ew + mw)) | (b[16*l +: 15] & ((64'd1 << (ew + mw)) - 1));
      rx = to_real(x, ew, mw);
      rz = to_real(z, ew, mw);
      case (o)
        OP_ADD:   r = from_real_rz(rx + rz, ew, mw);
        OP_SUB:   r = from_real_rz(rx - rz, ew, mw);
        OP_MUL:   r = from_real_rz(rx * rz, ew, mw);
        OP_MUL2N: r = from_real_rz(rx * pow2(k), ew, mw);
        OP_DIV2N: r = from_real_rz(rx / pow2(k), ew, mw);
        OP_B2F:   r = from_real_rz(real'(a[8*l +: 8]) / pow2(k), ew, mw);
        default:  r = x;
      endcase
      if (o == OP_F2B) y[8*l +: 8] = 8'(to_byte(x, ew, mw));
      else begin
        y[16*l +: 16] = 16'(r & ((64'd1 << (ew + mw)) - 1));
        y[16*l+15]    = 1'(r >> (ew + mw));
      end
    end
    return y;
  endfunction

  // Vector equality lane by lane, zeros of either sign counting as equal.
  function automatic bit same_vec(logic [255:0] x, logic [255:0] y, int lanes, int ew, int mw);
    for (int l = 0; l < lanes; l++) begin
      if (x[16*l +: 16] != y[16*l +: 16] &&
          !(x[16*l+mw +: 5] == 0 && y[16*l+mw +: 5] == 0 && ew == 5)) return 0;
    end
    return 1;
  endfunction

endpackage
