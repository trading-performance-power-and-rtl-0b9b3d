// quire_acc: quire (exact accumulator) stage of the posit FMA/MAC unit.
//
// The quire is a 2's complement fixed-point number of
// QW = 1 + CG + 2^(ES+2)*(N-2) bits whose lowest QF = 2^(ES+1)*(N-2) bits
// are fraction: it holds any product of two posit<N,ES> values exactly and
// CG carry-guard bits protect sums of many of them. CG = 31 is the current
// standard's choice, CG = N-1 the older one.
//
// Each enabled cycle the stage converts the product (frac_m * 2^sf_m) and the
// third operand (frac_c * 2^sf_c) to quire format by shifting the fraction
// according to its scale factor and taking the 2's complement by its sign.
// The product's sign is also flipped when `sub` is set. The product is then
// added either to the converted third operand (acc = 0: fused multiply-add)
// or to the stored quire (acc = 1: multiply-accumulate), and the sum is
// registered. The register is the stage's pipeline register, so
// accumulations can issue back to back.
//
// The meaning of `sub` (negate the product) and the NaR flag, which sticks
// in the quire while it keeps accumulating, are this design's own choices.
// Reset (asynchronous, active low) clears the quire. Quire overflow beyond
// the carry guard wraps.
module quire_acc
  import posit_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned ES  = 2,
  parameter int unsigned CG  = 31,
  parameter int unsigned SFW = sf_width(N, ES),
  parameter int unsigned FW  = frac_width(N, ES),
  parameter int unsigned QW  = quire_width(N, ES, CG),
  parameter int unsigned QF  = quire_frac(N, ES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  acc,
  input  logic                  sub,
  // product from the multiply stage
  input  logic                  sign_m,
  input  logic signed [SFW:0]   sf_m,
  input  logic [2*FW-1:0]       frac_m,
  input  logic                  nar_m,
  // decoded third operand
  input  logic                  sign_c,
  input  logic signed [SFW-1:0] sf_c,
  input  logic [FW-1:0]         frac_c,
  input  logic                  nar_c,
  // registered quire
  output logic [QW-1:0]         quire,
  output logic                  nar
);
  // Extra low bits so that the product may be placed with a non-negative
  // shift; bits below the quire LSB are always zero for posit products.
  localparam int unsigned XW = QW + 2*FW - 1;

  logic [XW-1:0] m_ext;
  logic [QW-1:0] m_mag, c_mag, q_m, q_c, q_add, q_sum;
  logic [SFW+1:0] m_sh;
  logic [SFW+1:0] c_sh;
  logic           nar_next;

  always_comb begin
    // Product: value = frac_m * 2^(sf_m - (2FW-1)); quire LSB = 2^-QF.
    m_sh  = (SFW+2)'(sf_m) + (SFW+2)'(QF);
    m_ext = XW'(frac_m) << m_sh;
    m_mag = QW'(m_ext >> (2*FW - 1));
    q_m   = (sign_m ^ sub) ? (~m_mag + 1'b1) : m_mag;
    // Third operand: value = frac_c * 2^(sf_c - (FW-1)); the shift is
    // never negative because |sf_c| <= (N-2)*2^ES.
    c_sh  = (SFW+2)'(sf_c) + (SFW+2)'(QF - (FW - 1));
    c_mag = QW'(frac_c) << c_sh;
    q_c   = sign_c ? (~c_mag + 1'b1) : c_mag;
    // Addend selection and accumulation.
    q_add    = acc ? quire : q_c;
    q_sum    = q_add + q_m;
    nar_next = nar_m | (acc ? nar : nar_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quire <= '0;
      nar   <= 1'b0;
    end else if (en) begin
      quire <= q_sum;
      nar   <= nar_next;
    end
  end
endmodule
