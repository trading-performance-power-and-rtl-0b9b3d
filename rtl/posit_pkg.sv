// posit_pkg: constants and width rules shared by the posit FMA/MAC datapath.
//
// A posit<n,es> holds a sign, a run-length coded regime k, up to es exponent
// bits and a fraction. Its scale factor is sf = k*2^es + exp and its value
// (-1)^s * 2^sf * 1.f. The functions below give the widths that every stage
// derives from n and es, so that all modules agree on them:
//   * decoded scale factor: signed, clog2(n)+es+1 bits (|sf| <= (n-2)*2^es);
//   * decoded fraction: n-2-es bits including the hidden one;
//   * product scale factor and scaled-accumulator scale field: clog2(n)+es+2;
//   * standard quire: 1 + cg + 2^(es+2)*(n-2) bits, 2^(es+1)*(n-2) of them
//     fraction bits;
//   * scaled accumulator base: 4n bits = sign, 7-bit accumulation guard and
//     4n-8 fraction bits.
// The quire and scaled-accumulator sizes are the published formulas; the
// decoded widths are the smallest that hold every posit<n,es> value.
package posit_pkg;

  // Which accumulator the MAC unit is built with.
  typedef enum logic [0:0] {
    ACC_SCALED = 1'b0,  // scaled accumulator (4n-bit base + scale factor)
    ACC_QUIRE  = 1'b1   // exact fixed-point quire of the posit standard
  } acc_mode_e;

  // Accumulation guard of the scaled accumulator, fixed at 7 bits.
  localparam int unsigned SA_GUARD = 7;

  function automatic int sf_width(input int n, input int es);
    return $clog2(n) + es + 1;
  endfunction

  function automatic int frac_width(input int n, input int es);
    return n - 2 - es;
  endfunction

  function automatic int scale_width(input int n, input int es);
    return $clog2(n) + es + 2;
  endfunction

  function automatic int quire_frac(input int n, input int es);
    return (2 ** (es + 1)) * (n - 2);
  endfunction

  function automatic int quire_width(input int n, input int es, input int cg);
    return 1 + cg + (2 ** (es + 2)) * (n - 2);
  endfunction

  function automatic int sa_width(input int n);
    return 4 * n;
  endfunction

  function automatic int sa_frac(input int n);
    return 4 * n - 1 - SA_GUARD;
  endfunction

endpackage
