// fp_to_byte: converts a short float to an unsigned 8-bit pixel.
//
// The value is truncated toward zero and saturated to 0..255: negative numbers,
// numbers below 1 and NaN give 0, numbers of 256 and above (and +infinity) give
// 255.  The document only names the operator ("Fxx -> Byte"); the unsigned
// saturating behaviour is this design's choice, fitting 8-bit image output.
//
// How it works: the significand with its hidden bit is shifted left by the
// unbiased exponent (0..7) and the integer part is taken.  Combinational.
module fp_to_byte #(
  parameter int unsigned EW = 5,
  parameter int unsigned MW = 10
) (
  input  logic [EW+MW:0] a,
  output logic [7:0]     u
);
  localparam int unsigned W    = EW + MW + 1;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic [EW-1:0] ea;
  logic [MW+7:0] wide;
  int            k;

  always_comb begin
    ea   = a[W-2:MW];
    k    = int'(ea) - BIAS;
    wide = '0;
    if (a[W-1] || ea == '0 || (ea == EMAX && a[MW-1:0] != '0) || k < 0) begin
      u = 8'd0;
    end else if (k >= 8) begin
      u = 8'd255;
    end else begin
      wide = {7'd0, 1'b1, a[MW-1:0]} << k;
      u    = wide[MW+7:MW];
    end
  end

endmodule
