// posit_normalize: normalize stage of the posit FMA/MAC unit.
//
// Turns a 2's complement fixed-point accumulator value (W bits, FP of them
// fraction) scaled by 2^scale into sign / scale factor / fraction for the
// encoder. The sign is the accumulator's MSB; a 2's complement gives the
// magnitude; a leading-zero counter finds the leading one; a left shifter
// moves it to the MSB; and the scale factor is the offset of the MSB
// position (W-1-FP) minus the zero count, plus the input scale. With the
// standard quire the input scale is tied to zero; with the scaled
// accumulator it is the accumulator's scale field.
//
// Outputs the FRW bits below the leading one and a sticky bit (OR of all
// lower bits) so the encoder can round correctly; FRW = N is enough for any
// posit<N,ES>. The FRW/sticky split is this design's own choice. Purely
// combinational.
module posit_normalize #(
  parameter int unsigned W   = 32,
  parameter int unsigned FP  = 24,
  parameter int unsigned SIW = 7,
  parameter int unsigned SOW = 16,
  parameter int unsigned FRW = 8
) (
  input  logic [W-1:0]          value,
  input  logic signed [SIW-1:0] scale,
  output logic                  sign,
  output logic                  zero,
  output logic signed [SOW-1:0] sf,
  output logic [FRW-1:0]        frac,
  output logic                  sticky
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  mag, norm;
  logic [CW-1:0] zc;

  initial begin
    assert (W > FRW + 1) else $fatal(1, "posit_normalize: W must exceed FRW+1");
  end

  assign sign = value[W-1];
  assign mag  = sign ? (~value + 1'b1) : value;
  assign zero = (value == '0);

  lzc #(.W(W)) u_lzc (.in(mag), .cnt(zc));

  always_comb begin
    norm   = mag << zc;
    frac   = norm[W-2 -: FRW];
    sticky = |norm[W-2-FRW:0];
    sf     = SOW'(scale) + SOW'(W - 1 - FP) - SOW'(zc);
  end
endmodule
