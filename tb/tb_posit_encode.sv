// tb_posit_encode: check of the posit<8,2> encoder and its rounding.
//
// 1. Every posit<9,2> value is encoded into posit<8,2>. Dropping one bit of
//    a 9-bit pattern is a pure rounding of the bit string, so the expected
//    result is the 9-bit pattern rounded to nearest even on its last bit
//    (with the never-zero / never-NaR rules), computed here on the pattern.
// 2. Every posit<12,2> value, which also exercises the sticky bit, and
// 3. random scale factors far outside the posit<8,2> range (saturation to
//    maxpos/minpos) with random fractions and sticky bits
// are compared with the bit-serial reference encoder. Rounding up, ties,
// and both saturations are counted and must each occur.
module tb_posit_encode;
  import posit_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_round_up = 0, n_tie = 0, n_sat_max = 0, n_sat_min = 0;

  logic sign, zero, nar, sticky;
  logic signed [15:0] sf;
  logic [7:0] frac;
  logic [7:0] posit;

  posit_encode #(.N(8), .ES(2), .SW(16), .FRW(8)) dut (
    .sign(sign), .zero(zero), .nar(nar), .sf(sf), .frac(frac), .sticky(sticky), .posit(posit));

  task automatic apply(input int n, input logic [31:0] p);
    bit z, nr, s; int psf, fb; longint m;
    ref_decode(n, 2, p, z, nr, s, psf, m, fb);
    sign = s; zero = z; nar = nr; sf = 16'(psf); sticky = 0;
    // bits below the hidden one, MSB-aligned in 8 bits
    frac = (fb == 0) ? 8'h0 : 8'((m & ((64'd1 << fb) - 1)) << (8 - fb));
    #1;
  endtask

  task automatic compare(input string tag, input logic [7:0] want, input logic [31:0] p);
    checks++;
    if (posit !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s in=%h got=%h want=%h", tag, p, posit, want);
    end
  endtask

  initial begin
    logic [7:0] body, want;
    logic [8:0] x;
    bit g;
    // 1. posit<9,2> patterns, expected by rounding the pattern
    for (int i = 0; i < 512; i++) begin
      apply(9, 32'(i));
      x = 9'(i);
      if (x == 9'h000)      want = 8'h00;
      else if (x == 9'h100) want = 8'h80;
      else begin
        if (x[8]) x = -x;
        body = {1'b0, x[7:1]};
        g = x[0];
        if (g && body[0]) n_round_up++;
        if (g) n_tie++;
        body = body + 8'(g & body[0]);
        if (body[7]) begin body = 8'h7f; n_sat_max++; end
        if (body == 0) begin body = 8'h01; n_sat_min++; end
        want = (i >= 256) ? -body : body;
      end
      compare("p9", want, 32'(i));
    end
    // 2. posit<12,2> patterns against the reference encoder
    for (int i = 0; i < 4096; i++) begin
      apply(12, 32'(i));
      if (i == 0)         want = 8'h00;
      else if (i == 2048) want = 8'h80;
      else                want = 8'(ref_encode(8, 2, ref_value(12, 2, 32'(i))));
      compare("p12", want, 32'(i));
    end
    // 3. out-of-range and random scale factors with sticky bits
    for (int i = 0; i < 4000; i++) begin
      fx_t v;
      sign = 1'($urandom); zero = 0; nar = 0;
      sf = 16'($urandom_range(0, 100) - 50);
      frac = 8'($urandom); sticky = 1'($urandom);
      #1;
      // value = 1.frac (+ a bit below for sticky) * 2^sf
      v = to_fx(sign, longint'({1'b1, frac, sticky}), int'(sf) - 9);
      want = 8'(ref_encode(8, 2, v));
      if (int'(sf) > 24) n_sat_max++;
      if (int'(sf) < -25) n_sat_min++;
      compare("rand", want, {16'(sf), 7'd0, sign, frac});
    end
    checks++;
    if (n_round_up == 0 || n_tie == 0 || n_sat_max == 0 || n_sat_min == 0) begin
      failures++;
      $display("FAIL: a rounding case was not exercised");
    end
    $display("round_up=%0d guard_set=%0d sat_max=%0d sat_min=%0d", n_round_up, n_tie, n_sat_max, n_sat_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
