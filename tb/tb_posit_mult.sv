// tb_posit_mult: random check of the multiply stage.
//
// Decodes random posit<8,2> pairs with two decoder instances, multiplies
// them and checks that (-1)^sign * frac_m * 2^(sf_m - 7) equals the exact
// product computed by the reference model, that the hidden one sits in the
// product's MSB, and that zero/NaR flags combine correctly. Both product
// ranges (fraction product below and above 2) are counted and must occur.
module tb_posit_mult;
  import posit_ref_pkg::*;

  int checks = 0, failures = 0, n_ovf = 0, n_noovf = 0;

  logic [7:0] pa, pb;
  logic sa, sb, za, zb, na, nb, sm, zm, nm;
  logic signed [5:0] sfa, sfb;
  logic signed [6:0] sfm;
  logic [3:0] fa, fb;
  logic [7:0] fm;

  posit_decode #(.N(8), .ES(2)) da (.posit(pa), .sign(sa), .sf(sfa), .frac(fa), .zero(za), .nar(na));
  posit_decode #(.N(8), .ES(2)) db (.posit(pb), .sign(sb), .sf(sfb), .frac(fb), .zero(zb), .nar(nb));
  posit_mult #(.N(8), .ES(2)) dut (
    .sign_a(sa), .sf_a(sfa), .frac_a(fa), .zero_a(za), .nar_a(na),
    .sign_b(sb), .sf_b(sfb), .frac_b(fb), .zero_b(zb), .nar_b(nb),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .zero_m(zm), .nar_m(nm));

  initial begin
    fx_t want, got;
    bit wz, wn;
    for (int i = 0; i < 20000; i++) begin
      pa = 8'(rand_posit(8)); pb = 8'(rand_posit(8)); #1;
      wn = (pa == 8'h80) || (pb == 8'h80);
      wz = !wn && ((pa == 0) || (pb == 0));
      checks++;
      if (nm !== wn || (!wn && zm !== wz)) begin
        failures++;
        $display("FAIL flags a=%h b=%h z=%0d n=%0d", pa, pb, zm, nm);
      end else if (!wn && !wz) begin
        want = ref_value(8, 2, 32'(pa)) * ref_value(8, 2, 32'(pb));
        want = want >>> FX_F;
        got  = to_fx(sm, longint'(fm), int'(sfm) - 7);
        checks++;
        if (got != want || fm[7] != 1'b1) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h sf=%0d f=%h", pa, pb, sfm, fm);
        end
        if (longint'(fa) * longint'(fb) >= 128) n_ovf++; else n_noovf++;
      end
    end
    checks++;
    if (n_ovf == 0 || n_noovf == 0) begin
      failures++;
      $display("FAIL: product overflow case not exercised (%0d/%0d)", n_ovf, n_noovf);
    end
    $display("products with ovf=%0d without=%0d", n_ovf, n_noovf);
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
