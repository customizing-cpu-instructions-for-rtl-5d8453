// fp_add: short floating-point adder/subtracter, truncating, without denormals.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1) on IEEE-style numbers with
// EW exponent bits and MW fraction bits (defaults: the 16-bit "half" format,
// 5 + 10).  As in the document, results are truncated (rounded toward zero) and
// denormals are not supported: a zero exponent field reads as zero and any
// result below the smallest normal number is flushed to zero.  Overflow follows
// IEEE round-toward-zero and gives the largest finite number.  Infinities and
// NaNs (all-ones exponent) are propagated; invalid cases give a quiet NaN.
//
// How it works (this design's own choice, the document only names the
// operator): the operands are ordered by magnitude, the smaller significand is
// aligned with three extra bits (guard, round, sticky) so the truncated result
// equals round-toward-zero of the exact sum, the significands are added or
// subtracted, and the sum is normalised with a leading-zero count.
//
// Purely combinational; a pipeline register, if wanted, is added by the user.
module fp_add #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  input  logic           sub,
  output logic [EW+MW:0] y
);
  localparam int unsigned W    = EW + MW + 1;
  localparam int unsigned SW   = MW + 4;              // hidden + fraction + G,R,S
  localparam logic [EW-1:0] EMAX = '1;

  logic          sa, sb, sbig, ssml;
  logic [EW-1:0] ea, eb, ebig, esml;
  logic [MW-1:0] fa, fb;
  logic          a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, swap, sml_zero;
  logic [SW-1:0] mbig, msml, msml_sh;
  logic [2*SW-1:0] ext;
  logic [EW-1:0] d;
  logic [SW:0]   sum;
  logic [SW:0]   norm;
  int            lz;
  int            eres;
  logic          sres;

  always_comb begin
    sa = a[W-1];
    sb = b[W-1] ^ sub;
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    fa = a[MW-1:0];
    fb = b[MW-1:0];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);

    // Order by magnitude; a zero operand counts as exponent 0, fraction 0.
    swap = {eb, (b_zero ? '0 : fb)} > {ea, (a_zero ? '0 : fa)};
    sbig = swap ? sb : sa;
    ssml = swap ? sa : sb;
    ebig = swap ? eb : ea;
    esml = swap ? ea : eb;
    mbig = swap ? {~b_zero, fb, 3'b000} : {~a_zero, fa, 3'b000};
    msml = swap ? {~a_zero, fa, 3'b000} : {~b_zero, fb, 3'b000};
    sml_zero = swap ? a_zero : b_zero;
    if (sml_zero) msml = '0;

    // Align the smaller operand; bits shifted out collapse into the sticky bit.
    d   = ebig - esml;
    ext = {msml, {SW{1'b0}}} >> ((d > EW'(SW)) ? SW : int'(d));
    msml_sh = ext[2*SW-1:SW];
    msml_sh[0] = msml_sh[0] | (|ext[SW-1:0]);

    if (sbig == ssml) sum = {1'b0, mbig} + {1'b0, msml_sh};
    else              sum = {1'b0, mbig} - {1'b0, msml_sh};

    // Normalise.
    lz = 0;
    for (int i = SW - 1; i >= 0; i--) begin
      if (sum[i]) break;
      lz++;
    end
    if (sum[SW]) begin
      norm = sum >> 1;
      eres = int'(ebig) + 1;
    end else begin
      norm = sum << lz;
      eres = int'(ebig) - lz;
    end
    sres = sbig;

    // Pack, with the special cases.
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      y = {(a_inf ? sa : sb), EMAX, {MW{1'b0}}};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, {(W-1){1'b0}}};
    end else if (sum == '0) begin
      y = '0;
    end else if (eres >= int'(EMAX)) begin
      y = {sres, EMAX - 1'b1, {MW{1'b1}}};
    end else if (eres <= 0) begin
      y = {sres, {(W-1){1'b0}}};
    end else begin
      y = {sres, EW'(eres), norm[SW-2:3]};
    end
  end

endmodule
