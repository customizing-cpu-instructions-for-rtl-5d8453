// fp_mul: short floating-point multiplier, truncating, without denormals.
//
// Computes y = a * b on numbers with EW exponent bits and MW fraction bits
// (defaults: F16, 5 + 10).  Following the document, the product is truncated
// (rounded toward zero) and denormals do not exist: zero exponent fields read as
// zero and products below the smallest normal number become a signed zero.
// Overflow gives the largest finite number (IEEE round toward zero).  NaN inputs
// and 0 * infinity give a quiet NaN; other infinities propagate.
//
// How it works (own choice, the document only names the operator): the two
// (MW+1)-bit significands are multiplied exactly, the product is normalised by
// at most one position and its low half is dropped.  Exponents are added and
// rebiased.  Purely combinational.
module fp_mul #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned W    = EW + MW + 1;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic            s, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [EW-1:0]   ea, eb;
  logic [2*MW+1:0] p;
  logic [MW-1:0]   frac;
  int              e;

  always_comb begin
    s  = a[W-1] ^ b[W-1];
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (a[MW-1:0] == '0);
    b_inf  = (eb == EMAX) && (b[MW-1:0] == '0);
    a_nan  = (ea == EMAX) && (a[MW-1:0] != '0);
    b_nan  = (eb == EMAX) && (b[MW-1:0] != '0);

    p = {1'b1, a[MW-1:0]} * {1'b1, b[MW-1:0]};
    if (p[2*MW+1]) begin
      frac = p[2*MW:MW+1];
      e    = int'(ea) + int'(eb) - BIAS + 1;
    end else begin
      frac = p[2*MW-1:MW];
      e    = int'(ea) + int'(eb) - BIAS;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      y = {s, EMAX, {MW{1'b0}}};
    end else if (a_zero || b_zero || e <= 0) begin
      y = {s, {(W-1){1'b0}}};
    end else if (e >= int'(EMAX)) begin
      y = {s, EMAX - 1'b1, {MW{1'b1}}};
    end else begin
      y = {s, EW'(e), frac};
    end
  end

endmodule
