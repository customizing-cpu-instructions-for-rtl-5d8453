// fp_mul_pow2: multiplies a short float by 2^n.
//
// y = a * 2^n for an unsigned shift count n of NW bits.  Only the exponent
// field changes: it is increased by n.  When the new exponent leaves the finite
// range the result is the largest finite number of the operand's sign
// (truncation, as everywhere in this design).  Zero, infinity and NaN pass
// through unchanged.  The document lists this operator ("*2^n") with its cost
// but not its insides or the width of n; NW = 5 covers every useful shift of
// the F16 exponent range.  Combinational.
module fp_mul_pow2 #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10,
  parameter int unsigned NW = 5
) (
  input  logic [EW+MW:0] a,
  input  logic [NW-1:0]  n,
  output logic [EW+MW:0] y
);
  localparam int unsigned W = EW + MW + 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic [EW-1:0] ea;
  int            e;

  always_comb begin
    ea = a[W-2:MW];
    e  = int'(ea) + int'(n);
    if (ea == '0 || ea == EMAX) y = a;
    else if (e >= int'(EMAX))  y = {a[W-1], EMAX - 1'b1, {MW{1'b1}}};
    else                       y = {a[W-1], EW'(e), a[MW-1:0]};
  end

endmodule
