// posit_decode: posit<N,ES> to sign / scale factor / fraction.
//
// Purely combinational, one per operand in the decode stage of the MAC.
// Steps: take the 2's complement of the input when its sign bit is set;
// invert the body when it starts with '1' so that a leading-zero counter
// measures the regime run length m; k = m-1 for a run of ones, -m for a run
// of zeros; shift the regime and its terminating bit out, leaving exponent
// and fraction at the top; sf = k*2^ES + exp; prepend the hidden '1' to the
// fraction. This follows the decoding scheme the design is based on. Missing
// (truncated) exponent bits read as zero.
//
// Outputs: sign, sf (signed, clog2(N)+ES+1 bits), frac (N-2-ES bits, hidden
// one at the MSB, '0' for zero/NaR), zero and nar flags. The zero and NaR
// flags and the zeroed fraction of those two encodings are this design's own
// choice; the scheme itself does not treat them.
module posit_decode
  import posit_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned ES  = 2,
  parameter int unsigned SFW = sf_width(N, ES),
  parameter int unsigned FW  = frac_width(N, ES)
) (
  input  logic [N-1:0]          posit,
  output logic                  sign,
  output logic signed [SFW-1:0] sf,
  output logic [FW-1:0]         frac,
  output logic                  zero,
  output logic                  nar
);
  localparam int unsigned BW = N - 1;           // body: regime+exp+fraction
  localparam int unsigned CW = $clog2(BW + 1);

  logic [N-1:0]  mag;   // mag[N-1] is only set for NaR
  logic [BW-1:0] body, run_bits, rest;
  logic [CW-1:0] run;
  logic          r0;
  logic signed [SFW-1:0] k;
  logic [ES:0]   exp_val;
  logic [FW-2:0] frac_bits;

  initial begin
    assert (N >= ES + 4) else $fatal(1, "posit_decode: N must be at least ES+4");
  end

  assign sign = posit[N-1];
  assign zero = (posit == '0);
  assign nar  = (posit == {1'b1, {(N-1){1'b0}}});
  assign mag  = sign ? (~posit + 1'b1) : posit;
  assign body = mag[BW-1:0];
  assign r0   = body[BW-1];
  assign run_bits = r0 ? ~body : body;

  lzc #(.W(BW)) u_lzc (.in(run_bits), .cnt(run));

  always_comb begin
    // Regime value.
    if (r0) k = SFW'(run) - SFW'(1);
    else    k = -SFW'(run);
    // Drop regime bits and the terminating bit (the left shift may push
    // everything out when the regime fills the body).
    rest      = (body << run) << 1;
    exp_val   = (ES+1)'(rest >> (BW - ES));
    frac_bits = (FW-1)'(rest >> 2);
    if (zero || nar) begin
      sf   = '0;
      frac = '0;
    end else begin
      sf   = (k <<< ES) + SFW'(exp_val);
      frac = {1'b1, frac_bits};
    end
  end
endmodule
