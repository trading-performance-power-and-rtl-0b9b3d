// tb_quire_acc: check of the quire stage for posit<8,2>.
//
// Two instances share the stimulus: the current-standard quire (cg = 31,
// 128 bits) and the older one (cg = n-1 = 7, 104 bits). Operands are random
// posits, decoded and multiplied by the (separately verified) decode and
// multiply stages. Each cycle performs either c + a*b or quire + a*b, with
// the product optionally negated; a reference keeps the exact running value
// as a wide fixed-point number and the registered quire must equal it bit
// for bit, including the sticky NaR flag. Fused adds, accumulations,
// subtractions and NaR results are counted and must all occur.
module tb_quire_acc;
  import posit_ref_pkg::*;

  localparam int QF = 48;
  int checks = 0, failures = 0;
  int n_fma = 0, n_acc = 0, n_sub = 0, n_nar = 0;

  logic clk = 0, rst_n = 0, en = 0, acc = 0, sub = 0;
  logic [7:0] pa, pb, pc;
  logic sa, sb, sc, za, zb, zc, na, nb, nc, sm, zm, nm;
  logic signed [5:0] sfa, sfb, sfc;
  logic signed [6:0] sfm;
  logic [3:0] fa, fb, fc;
  logic [7:0] fm;
  logic [127:0] q_new;
  logic [103:0] q_old;
  logic nar_new, nar_old;

  always #5 clk = ~clk;

  posit_decode #(.N(8), .ES(2)) da (.posit(pa), .sign(sa), .sf(sfa), .frac(fa), .zero(za), .nar(na));
  posit_decode #(.N(8), .ES(2)) db (.posit(pb), .sign(sb), .sf(sfb), .frac(fb), .zero(zb), .nar(nb));
  posit_decode #(.N(8), .ES(2)) dc (.posit(pc), .sign(sc), .sf(sfc), .frac(fc), .zero(zc), .nar(nc));
  posit_mult #(.N(8), .ES(2)) mu (
    .sign_a(sa), .sf_a(sfa), .frac_a(fa), .zero_a(za), .nar_a(na),
    .sign_b(sb), .sf_b(sfb), .frac_b(fb), .zero_b(zb), .nar_b(nb),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .zero_m(zm), .nar_m(nm));

  quire_acc #(.N(8), .ES(2), .CG(31)) dut_new (
    .clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .sub(sub),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .nar_m(nm),
    .sign_c(sc), .sf_c(sfc), .frac_c(fc), .nar_c(nc), .quire(q_new), .nar(nar_new));
  quire_acc #(.N(8), .ES(2), .CG(7)) dut_old (
    .clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .sub(sub),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .nar_m(nm),
    .sign_c(sc), .sf_c(sfc), .frac_c(fc), .nar_c(nc), .quire(q_old), .nar(nar_old));

  initial begin
    fx_t model, prod, want;
    bit model_nar, op_nar;
    model = 0; model_nar = 0;
    pa = 0; pb = 0; pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      pa = 8'(rand_posit(8)); pb = 8'(rand_posit(8)); pc = 8'(rand_posit(8));
      // keep NaR rare so that accumulation chains stay long
      if (pa == 8'h80 && $urandom_range(0, 3) != 0) pa = 8'h40;
      if (pc == 8'h80 && $urandom_range(0, 3) != 0) pc = 8'h00;
      acc = ($urandom_range(0, 3) != 0);
      sub = 1'($urandom);
      en  = ($urandom_range(0, 9) != 0);
      #1;
      if (en) begin
        prod = ref_product(8, 2, 32'(pa), 32'(pb));
        if (sub) prod = -prod;
        op_nar = (pa == 8'h80) || (pb == 8'h80);
        if (acc) begin model = model + prod; model_nar = model_nar | op_nar; n_acc++; end
        else begin
          model = ref_value(8, 2, 32'(pc)) + prod;
          model_nar = op_nar | (pc == 8'h80);
          n_fma++;
        end
        if (sub) n_sub++;
        if (model_nar) n_nar++;
      end
      @(posedge clk); #1;
      want = model >>> (FX_F - QF);
      checks++;
      if (q_new !== want[127:0] || q_old !== want[103:0] ||
          nar_new !== model_nar || nar_old !== model_nar) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: q=%h want=%h nar=%0d/%0d", i, q_new, want[127:0], nar_new, model_nar);
      end
    end
    checks++;
    if (n_fma == 0 || n_acc == 0 || n_sub == 0 || n_nar == 0) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("fma=%0d acc=%0d sub=%0d nar=%0d", n_fma, n_acc, n_sub, n_nar);
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
