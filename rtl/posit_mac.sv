// posit_mac: pipelined posit<N,ES> fused multiply-add / multiply-accumulate
// unit for low-precision CNN training.
//
// Computes r = c + a*b (acc = 0) or acc_reg += a*b, r = acc_reg (acc = 1),
// with the product negated when `sub` is set. Multiplication (c = 0) and
// addition (b = 1.0) are special cases. Five stages:
//   1 decode     three posit decoders (sign, scale factor, fraction)
//   2 multiply   sign XOR, scale-factor sum, fraction product
//   3 accumulate scaled accumulator (ACC = ACC_SCALED, the default) or
//                standard quire (ACC = ACC_QUIRE, carry guard CG)
//   4 normalize  2's complement, leading-zero count, alignment
//   5 encode     regime/exponent/fraction packing, round to nearest even
// Pipeline registers sit after stages 1, 2, 3 (the accumulator register
// itself) and 4; stage 5 is combinational, so a result appears on posit_r,
// with out_valid high, 4 clock edges after its operands were presented with
// in_valid high. One operation can be issued every cycle, including
// back-to-back accumulations, since the accumulator feeds itself within
// stage 3. There is no stall: the unit accepts every valid input.
//
// The stage split, the register positions and both accumulator formats
// follow the published architecture; the valid signals, the meaning of
// `sub`, the NaR handling and the reset are this design's own choices.
// Reset is asynchronous, active low, and clears the valid pipeline and the
// accumulator. The `adjusted` output pulses when the scaled accumulator had
// to rescale on a guard overflow (always 0 with the quire).
module posit_mac
  import posit_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned ES       = 2,
  parameter acc_mode_e   ACC      = ACC_SCALED,
  parameter int unsigned CG       = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         acc,
  input  logic         sub,
  input  logic [N-1:0] posit_a,
  input  logic [N-1:0] posit_b,
  input  logic [N-1:0] posit_c,
  output logic         out_valid,
  output logic [N-1:0] posit_r,
  output logic         adjusted
);
  localparam int unsigned SFW = sf_width(N, ES);
  localparam int unsigned FW  = frac_width(N, ES);
  localparam int unsigned SCW = scale_width(N, ES);
  localparam int unsigned QW  = quire_width(N, ES, CG);
  localparam int unsigned QF  = quire_frac(N, ES);
  localparam int unsigned AW  = (ACC == ACC_QUIRE) ? QW : sa_width(N);
  localparam int unsigned AF  = (ACC == ACC_QUIRE) ? QF : sa_frac(N);
  localparam int unsigned SOW = $clog2(AW + 1) + SCW + 2;
  localparam int unsigned FRW = N;

  typedef struct packed {
    logic                  sign;
    logic signed [SFW-1:0] sf;
    logic [FW-1:0]         frac;
    logic                  zero;
    logic                  nar;
  } dec_t;

  typedef struct packed {
    logic valid;
    logic acc;
    logic sub;
    dec_t a;
    dec_t b;
    dec_t c;
  } s1_t;

  typedef struct packed {
    logic                valid;
    logic                acc;
    logic                sub;
    logic                sign;
    logic signed [SFW:0] sf;
    logic [2*FW-1:0]     frac;
    logic                nar;
    dec_t                c;
  } s2_t;

  typedef struct packed {
    logic                  valid;
    logic                  sign;
    logic                  zero;
    logic                  nar;
    logic signed [SOW-1:0] sf;
    logic [FRW-1:0]        frac;
    logic                  sticky;
  } s4_t;

  // ---------------- stage 1: decode ----------------
  dec_t dec_a, dec_b, dec_c;
  s1_t  s1_q;

  posit_decode #(.N(N), .ES(ES)) u_dec_a (.posit(posit_a), .sign(dec_a.sign),
    .sf(dec_a.sf), .frac(dec_a.frac), .zero(dec_a.zero), .nar(dec_a.nar));
  posit_decode #(.N(N), .ES(ES)) u_dec_b (.posit(posit_b), .sign(dec_b.sign),
    .sf(dec_b.sf), .frac(dec_b.frac), .zero(dec_b.zero), .nar(dec_b.nar));
  posit_decode #(.N(N), .ES(ES)) u_dec_c (.posit(posit_c), .sign(dec_c.sign),
    .sf(dec_c.sf), .frac(dec_c.frac), .zero(dec_c.zero), .nar(dec_c.nar));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_q <= '0;
    else        s1_q <= '{valid: in_valid, acc: acc, sub: sub,
                          a: dec_a, b: dec_b, c: dec_c};
  end

  // ---------------- stage 2: multiply ----------------
  logic                sign_m, zero_m, nar_m;
  logic signed [SFW:0] sf_m;
  logic [2*FW-1:0]     frac_m;
  s2_t                 s2_q;

  posit_mult #(.N(N), .ES(ES)) u_mult (
    .sign_a(s1_q.a.sign), .sf_a(s1_q.a.sf), .frac_a(s1_q.a.frac),
    .zero_a(s1_q.a.zero), .nar_a(s1_q.a.nar),
    .sign_b(s1_q.b.sign), .sf_b(s1_q.b.sf), .frac_b(s1_q.b.frac),
    .zero_b(s1_q.b.zero), .nar_b(s1_q.b.nar),
    .sign_m(sign_m), .sf_m(sf_m), .frac_m(frac_m), .zero_m(zero_m), .nar_m(nar_m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_q <= '0;
    else        s2_q <= '{valid: s1_q.valid, acc: s1_q.acc, sub: s1_q.sub,
                          sign: sign_m, sf: sf_m, frac: frac_m, nar: nar_m,
                          c: s1_q.c};
  end

  // ---------------- stage 3: accumulate ----------------
  logic [AW-1:0]         acc_value;
  logic signed [SCW-1:0] acc_scale;
  logic                  acc_nar;
  logic                  s3_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= s2_q.valid;
  end

  if (ACC == ACC_QUIRE) begin : g_quire
    quire_acc #(.N(N), .ES(ES), .CG(CG)) u_quire (
      .clk(clk), .rst_n(rst_n), .en(s2_q.valid), .acc(s2_q.acc), .sub(s2_q.sub),
      .sign_m(s2_q.sign), .sf_m(s2_q.sf), .frac_m(s2_q.frac), .nar_m(s2_q.nar),
      .sign_c(s2_q.c.sign), .sf_c(s2_q.c.sf), .frac_c(s2_q.c.frac), .nar_c(s2_q.c.nar),
      .quire(acc_value), .nar(acc_nar));
    assign acc_scale = '0;
    assign adjusted  = 1'b0;
  end else begin : g_scaled
    sacc_acc #(.N(N), .ES(ES)) u_sacc (
      .clk(clk), .rst_n(rst_n), .en(s2_q.valid), .acc(s2_q.acc), .sub(s2_q.sub),
      .sign_m(s2_q.sign), .sf_m(s2_q.sf), .frac_m(s2_q.frac), .nar_m(s2_q.nar),
      .sign_c(s2_q.c.sign), .sf_c(s2_q.c.sf), .frac_c(s2_q.c.frac), .nar_c(s2_q.c.nar),
      .base(acc_value), .scale(acc_scale), .nar(acc_nar), .adjusted(adjusted));
  end

  // ---------------- stage 4: normalize ----------------
  logic                  n_sign, n_zero, n_sticky;
  logic signed [SOW-1:0] n_sf;
  logic [FRW-1:0]        n_frac;
  s4_t                   s4_q;

  posit_normalize #(.W(AW), .FP(AF), .SIW(SCW), .SOW(SOW), .FRW(FRW)) u_norm (
    .value(acc_value), .scale(acc_scale), .sign(n_sign), .zero(n_zero),
    .sf(n_sf), .frac(n_frac), .sticky(n_sticky));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s4_q <= '0;
    else        s4_q <= '{valid: s3_valid, sign: n_sign, zero: n_zero, nar: acc_nar,
                          sf: n_sf, frac: n_frac, sticky: n_sticky};
  end

  // ---------------- stage 5: encode ----------------
  posit_encode #(.N(N), .ES(ES), .SW(SOW), .FRW(FRW)) u_enc (
    .sign(s4_q.sign), .zero(s4_q.zero), .nar(s4_q.nar), .sf(s4_q.sf),
    .frac(s4_q.frac), .sticky(s4_q.sticky), .posit(posit_r));

  assign out_valid = s4_q.valid;

endmodule
