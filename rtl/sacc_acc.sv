// sacc_acc: scaled-accumulator stage of the posit MAC unit.
//
// Replaces the wide quire with a 4N-bit 2's complement fixed-point "base"
// (sign, 7-bit accumulation guard, 4N-8 fraction bits) paired with a signed
// scale factor of clog2(N)+ES+2 bits: value = base * 2^(scale - (4N-8)).
// For posit<8,2> that is 32 bits instead of a 104- or 128-bit quire.
//
// Each enabled cycle:
//   1. the product and the third operand are sign-applied (2's complement)
//      and placed so that the hidden one sits in the guard's LSB; their scale
//      factors become the scale fields;
//   2. `acc` selects the stored accumulator or the third operand as addend;
//   3. the two scale fields are compared; the base with the smaller scale is
//      shifted right (arithmetically) by the difference, the other is kept;
//   4. the aligned bases are added;
//   5. Adjust: if the guard's MSB differs from the sign bit the sum is shifted
//      right by one and the scale incremented, which keeps |base| < 2^(4N-2)
//      so the next addition cannot overflow.
// The result is registered (the stage's pipeline register).
//
// This design's own choices: `sub` negates the product; a base equal to zero
// is treated as having the smallest scale, so a zero operand or an emptied
// accumulator never forces the other operand to be shifted; the scale
// saturates at its maximum; NaR sticks while accumulating; reset
// (asynchronous, active low) clears base and scale.
module sacc_acc
  import posit_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned ES  = 2,
  parameter int unsigned SFW = sf_width(N, ES),
  parameter int unsigned FW  = frac_width(N, ES),
  parameter int unsigned BW  = sa_width(N),
  parameter int unsigned BF  = sa_frac(N),
  parameter int unsigned SCW = scale_width(N, ES)
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
  // registered accumulator
  output logic signed [BW-1:0]  base,
  output logic signed [SCW-1:0] scale,
  output logic                  nar,
  // high for one cycle after an Adjust (guard overflow) step
  output logic                  adjusted
);
  localparam logic signed [SCW-1:0] SC_MIN = {1'b1, {(SCW-1){1'b0}}};
  localparam logic signed [SCW-1:0] SC_MAX = {1'b0, {(SCW-1){1'b1}}};

  logic signed [BW-1:0]  b_m, b_c, b_o, b_big, b_small, b_aligned, b_sum, b_next;
  logic [BW-1:0]         m_mag, c_mag;
  logic signed [SCW-1:0] s_m, s_c, s_o, s_m_eff, s_o_eff, s_big, s_next;
  logic [SCW:0]          diff;
  logic                  m_bigger, ovf, nar_next;

  always_comb begin
    // 1. operands to base/scale form
    m_mag = BW'(frac_m) << (BF - (2*FW - 1));
    c_mag = BW'(frac_c) << (BF - (FW - 1));
    b_m   = (sign_m ^ sub) ? -$signed(m_mag) : $signed(m_mag);
    b_c   = sign_c ? -$signed(c_mag) : $signed(c_mag);
    s_m   = SCW'(sf_m);
    s_c   = SCW'(sf_c);
    // 2. addend select
    b_o   = acc ? base  : b_c;
    s_o   = acc ? scale : s_c;
    // 3. compare and align (zero bases rank lowest)
    s_m_eff  = (b_m == '0) ? SC_MIN : s_m;
    s_o_eff  = (b_o == '0) ? SC_MIN : s_o;
    m_bigger = (s_m_eff >= s_o_eff);
    if (m_bigger) begin
      b_big   = b_m;  s_big = s_m_eff;
      b_small = b_o;
      diff    = (SCW+1)'(s_m_eff) - (SCW+1)'(s_o_eff);
    end else begin
      b_big   = b_o;  s_big = s_o_eff;
      b_small = b_m;
      diff    = (SCW+1)'(s_o_eff) - (SCW+1)'(s_m_eff);
    end
    if (diff >= (SCW+1)'(BW)) b_aligned = b_small >>> (BW - 1);
    else                      b_aligned = b_small >>> diff;
    // 4. add
    b_sum = b_big + b_aligned;
    // 5. adjust on guard overflow
    ovf = b_sum[BW-1] ^ b_sum[BW-2];
    if (ovf) begin
      b_next = b_sum >>> 1;
      s_next = (s_big == SC_MAX) ? SC_MAX : s_big + SCW'(1);
    end else begin
      b_next = b_sum;
      s_next = s_big;
    end
    nar_next = nar_m | (acc ? nar : nar_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base     <= '0;
      scale    <= SC_MIN;
      nar      <= 1'b0;
      adjusted <= 1'b0;
    end else begin
      // After every step the guard's MSB equals the sign bit
      // (|base| < 2^(BW-2)), which lets the next addition proceed without
      // overflow.
      assert (base[BW-1] == base[BW-2])
        else $error("sacc_acc: accumulator base left the guard range");
      adjusted <= en & ovf;
      if (en) begin
        base  <= b_next;
        scale <= s_next;
        nar   <= nar_next;
      end
    end
  end
endmodule
