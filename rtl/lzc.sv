// lzc: leading-zero counter.
//
// Counts the zero bits above the most significant one of `in`; an all-zero
// input gives W. Written as a priority scan from the LSB upwards so that the
// last (highest) one found wins; synthesis turns it into a priority encoder.
// The leading-zero counter is the block the datapath names; the scan form
// is this implementation's choice. Purely combinational. Used by the posit decoder (regime run length) and by
// the normalize stage (alignment of the accumulator).
module lzc #(
  parameter int unsigned W  = 8,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  in,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = CW'(W);
    for (int unsigned i = 0; i < W; i++) begin
      if (in[i]) cnt = CW'(W - 1 - i);
    end
  end
endmodule
