// fp_narrow: stores an IEEE single-precision number (F32) as a short float.
//
// Two storage formats are of interest: F16 (EW = 5, MW = 10, the default) and
// F13 (EW = 5, MW = 7).  The exponent is rebiased from 127 to 2^(EW-1)-1 and
// the fraction is truncated to its MW most significant bits, as the document
// describes for F32 -> F16 storage.  The result sits in an LW-bit word: sign in
// the top bit, exponent and fraction in the low EW+MW bits, zeros between (for
// F13 that is the word "s 000 eeeee fffffff").  F32 denormals and results below
// the smallest normal short float become signed zero; values beyond the range
// become the largest finite number (truncation); infinities stay infinities and
// NaNs become a quiet NaN.  Combinational.
module fp_narrow #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10,
  parameter int unsigned LW = 16
) (
  input  logic [31:0]   f32,
  output logic [LW-1:0] y
);
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic          s;
  logic [7:0]    e32;
  logic [22:0]   f;
  int            e;
  logic [EW+MW-1:0] body;

  always_comb begin
    s   = f32[31];
    e32 = f32[30:23];
    f   = f32[22:0];
    e   = int'(e32) - 127 + BIAS;
    if (e32 == 8'hFF)        body = {EMAX, (f != '0), {(MW-1){1'b0}}};
    else if (e32 == 8'h00)   body = '0;
    else if (e <= 0)         body = '0;
    else if (e >= int'(EMAX)) body = {EMAX - 1'b1, {MW{1'b1}}};
    else                     body = {EW'(e), f[22 -: MW]};
    y = LW'(body);
    y[LW-1] = s & ~((e32 == 8'hFF) && (f != '0));
  end

endmodule
