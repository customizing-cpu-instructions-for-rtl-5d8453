// byte_to_fp: converts an unsigned 8-bit pixel to a short float, scaled by 2^-n.
//
// y = u / 2^n.  The document uses this conversion to bring 8-bit images into
// F16 and notes that a normalising division (by 16 or by 256 in its Harris
// tests) can be folded into it, so the scale is an input here.  An 8-bit value
// needs 8 significant bits, so the conversion is exact for MW >= 7 (F16 and
// F13); for narrower fractions the low bits are truncated.  Results below the
// smallest normal number are flushed to zero, results above the range saturate
// to the largest finite number.
//
// How it works (own choice): a leading-one search gives the exponent, the byte
// is shifted left so its leading one drops out as the hidden bit, and the
// exponent is reduced by n.  Combinational.
module byte_to_fp #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10,
  parameter int unsigned NW = 5
) (
  input  logic [7:0]     u,
  input  logic [NW-1:0]  n,
  output logic [EW+MW:0] y
);
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  int              p, e;
  logic [7:0]      norm8;
  logic [MW+6:0]   ext;

  always_comb begin
    p = 0;
    for (int i = 0; i < 8; i++) if (u[i]) p = i;
    norm8 = u << (7 - p);
    ext   = {norm8[6:0], {MW{1'b0}}};
    e     = p + BIAS - int'(n);
    if (u == '0 || e <= 0)   y = '0;
    else if (e >= int'(EMAX)) y = {1'b0, EMAX - 1'b1, {MW{1'b1}}};
    else                     y = {1'b0, EW'(e), ext[MW+6 -: MW]};
  end

endmodule
