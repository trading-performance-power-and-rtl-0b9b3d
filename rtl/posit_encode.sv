// posit_encode: sign / scale factor / fraction to posit<N,ES>.
//
// Purely combinational; the last stage of the MAC unit. The scale factor is
// split into regime value k = sf >> ES (arithmetic) and exponent
// e = sf mod 2^ES. The regime is built by arithmetically right-shifting the
// pattern "10" (k >= 0, shift by k) or "01" (k < 0, shift by -k-1), with the
// exponent and fraction appended behind it, so the shift produces the run of
// ones or zeros and its terminating bit. The top N-1 bits form the posit
// body; the next bit is the guard and everything below (plus the incoming
// sticky bit) the sticky. The body is rounded to nearest, ties to even, and
// the 2's complement is taken for negative values.
//
// Posits neither overflow nor underflow: a scale beyond maxpos gives maxpos
// and a non-zero value that would round to zero gives minpos (the posit
// standard's rule; the saturating comparisons themselves are this design's
// own). zero and nar inputs force the two special encodings.
module posit_encode #(
  parameter int unsigned N   = 8,
  parameter int unsigned ES  = 2,
  parameter int unsigned SW  = 16,
  parameter int unsigned FRW = 8
) (
  input  logic                 sign,
  input  logic                 zero,
  input  logic                 nar,
  input  logic signed [SW-1:0] sf,
  input  logic [FRW-1:0]       frac,
  input  logic                 sticky,
  output logic [N-1:0]         posit
);
  // pattern (2) + exponent (ES) + fraction (FRW), then room for the shift
  localparam int unsigned EW = 2 + ES + FRW + N;

  logic signed [SW-1:0] k, e;
  logic [SW-1:0]        shamt;
  logic signed [EW-1:0] pat, shifted;
  logic [N-2:0]         body;
  logic                 guard, stk, rnd, k_pos;
  logic [N-1:0]         rounded;
  logic [N-2:0]         mag;

  always_comb begin
    k     = sf >>> ES;
    e     = sf - (k <<< ES);
    k_pos = (k >= 0);
    if (k_pos) shamt = k;
    else       shamt = ~k;
    pat = (EW'(k_pos ? 2'b10 : 2'b01) << (ES + FRW + N))
        | (EW'(e) << (FRW + N))
        | (EW'(frac) << N);
    shifted = pat >>> shamt[$clog2(N):0];
    body    = shifted[EW-1 -: N-1];
    guard   = shifted[EW-N];
    stk     = (|shifted[EW-N-1:0]) | sticky;
    rnd     = guard & (body[0] | stk);
    rounded = {1'b0, body} + N'(rnd);
    // saturation
    if (k >= $signed(SW'(N - 1)))      mag = '1;              // above maxpos
    else if (k < -$signed(SW'(N - 1))) mag = (N-1)'(1);       // below minpos
    else if (rounded[N-1])             mag = '1;
    else if (rounded[N-2:0] == '0)     mag = (N-1)'(1);
    else                               mag = rounded[N-2:0];
    if (nar)       posit = {1'b1, {(N-1){1'b0}}};
    else if (zero) posit = '0;
    else           posit = sign ? (~{1'b0, mag} + 1'b1) : {1'b0, mag};
  end
endmodule
