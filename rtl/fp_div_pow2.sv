// fp_div_pow2: divides a short float by 2^n.
//
// y = a / 2^n for an unsigned shift count n of NW bits.  The exponent field is
// decreased by n; since the design has no denormals, a result below the
// smallest normal number becomes a zero of the operand's sign.  Zero, infinity
// and NaN pass through.  The document lists the operator ("/2^n") with its cost;
// the width of n (NW = 5) and the flush are this design's choices, the flush
// following the document's "without denormals".  Combinational.
module fp_div_pow2 #(
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
    e  = int'(ea) - int'(n);
    if (ea == '0 || ea == EMAX) y = a;
    else if (e <= 0)           y = {a[W-1], {(W-1){1'b0}}};
    else                       y = {a[W-1], EW'(e), a[MW-1:0]};
  end

endmodule
