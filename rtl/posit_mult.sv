// posit_mult: multiply stage of the posit FMA/MAC unit.
//
// Combinational. Multiplies two decoded posits the way floating-point
// multipliers do: the sign is the XOR of the signs, the scale factors are
// added and the fractions (hidden one included) multiplied. The product of
// two values in [1,2) lies in [1,4): when its top bit is set (ovf) the scale
// factor gets +1, otherwise the product is shifted left by one, so the
// result always carries its hidden one in the MSB (2*FW bits, 2*FW-1 of
// them fraction). Zero and NaR flags are combined (NaR wins in the later
// stages); a zero operand gives a zero fraction.
//
// Interface: decoded operands a and b in, sign_m / sf_m (one bit wider than
// the inputs) / frac_m / zero_m / nar_m out. Timing: purely combinational,
// registered by the caller.
//
// Follows the published design: XOR of signs, sum of scale factors, product
// of fractions, and the ovf-driven renormalisation of the product.
// Own choices: the zero/NaR flag handling and the exact output widths.
module posit_mult
  import posit_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned ES  = 2,
  parameter int unsigned SFW = sf_width(N, ES),
  parameter int unsigned FW  = frac_width(N, ES)
) (
  input  logic                  sign_a,
  input  logic signed [SFW-1:0] sf_a,
  input  logic [FW-1:0]         frac_a,
  input  logic                  zero_a,
  input  logic                  nar_a,
  input  logic                  sign_b,
  input  logic signed [SFW-1:0] sf_b,
  input  logic [FW-1:0]         frac_b,
  input  logic                  zero_b,
  input  logic                  nar_b,
  output logic                  sign_m,
  output logic signed [SFW:0]   sf_m,
  output logic [2*FW-1:0]       frac_m,
  output logic                  zero_m,
  output logic                  nar_m
);
  logic [2*FW-1:0] prod;
  logic            ovf;

  assign prod   = frac_a * frac_b;
  assign ovf    = prod[2*FW-1];
  assign sign_m = sign_a ^ sign_b;
  assign zero_m = zero_a | zero_b;
  assign nar_m  = nar_a | nar_b;

  always_comb begin
    if (zero_m || nar_m) begin
      sf_m   = '0;
      frac_m = '0;
    end else begin
      sf_m   = (SFW+1)'(sf_a) + (SFW+1)'(sf_b) + (SFW+1)'(ovf);
      frac_m = ovf ? prod : (prod << 1);
    end
  end
endmodule
