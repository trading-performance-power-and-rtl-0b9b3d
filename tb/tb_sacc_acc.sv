// tb_sacc_acc: check of the scaled-accumulator stage for posit<8,2>.
//
// Operands are random posits, decoded and multiplied by the (separately
// verified) decode and multiply stages. A reference model written with
// plain integer arithmetic keeps the 32-bit base and the 7-bit scale:
// operands enter with their hidden one at bit 24, the smaller-scale base is
// shifted right arithmetically by the scale difference, the bases are
// added, and a sum that reaches the guard's MSB is halved with the scale
// incremented. The registered base, scale, NaR flag and the adjust pulse
// must match the model every cycle. A phase of accumulating equal positive
// products forces guard overflows; fused adds, accumulations, subtractions,
// alignments by a non-zero shift and adjust steps are counted and must
// all occur.
module tb_sacc_acc;
  import posit_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_fma = 0, n_acc = 0, n_sub = 0, n_adj = 0, n_align = 0;

  logic clk = 0, rst_n = 0, en = 0, acc = 0, sub = 0;
  logic [7:0] pa, pb, pc;
  logic sa, sb, sc, za, zb, zc, na, nb, nc, sm, zm, nm;
  logic signed [5:0] sfa, sfb, sfc;
  logic signed [6:0] sfm;
  logic [3:0] fa, fb, fc;
  logic [7:0] fm;
  logic signed [31:0] base;
  logic signed [6:0] scale;
  logic nar, adjusted;

  always #5 clk = ~clk;

  posit_decode #(.N(8), .ES(2)) da (.posit(pa), .sign(sa), .sf(sfa), .frac(fa), .zero(za), .nar(na));
  posit_decode #(.N(8), .ES(2)) db (.posit(pb), .sign(sb), .sf(sfb), .frac(fb), .zero(zb), .nar(nb));
  posit_decode #(.N(8), .ES(2)) dc (.posit(pc), .sign(sc), .sf(sfc), .frac(fc), .zero(zc), .nar(nc));
  posit_mult #(.N(8), .ES(2)) mu (
    .sign_a(sa), .sf_a(sfa), .frac_a(fa), .zero_a(za), .nar_a(na),
    .sign_b(sb), .sf_b(sfb), .frac_b(fb), .zero_b(zb), .nar_b(nb),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .zero_m(zm), .nar_m(nm));

  sacc_acc #(.N(8), .ES(2)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .acc(acc), .sub(sub),
    .sign_m(sm), .sf_m(sfm), .frac_m(fm), .nar_m(nm),
    .sign_c(sc), .sf_c(sfc), .frac_c(fc), .nar_c(nc),
    .base(base), .scale(scale), .nar(nar), .adjusted(adjusted));

  // operand in base/scale form from its posit encoding(s)
  task automatic operand(input logic [7:0] p, output longint b, output int s);
    bit z, nr, sg; int sf, fbits; longint m;
    ref_decode(8, 2, 32'(p), z, nr, sg, sf, m, fbits);
    if (z || nr) begin b = 0; s = 0; return; end
    b = m << (24 - fbits); s = sf;
    if (sg) b = -b;
  endtask

  initial begin
    longint mb, ma, bb, bc, bo, b_big, b_small, sum, m_base, model_base;
    int sa_, sb_, sc_, so, s_m, big_s, diff, model_scale, q;
    bit model_nar, model_adj, op_nar, neg;
    model_base = 0; model_scale = -64; model_nar = 0; model_adj = 0;
    pa = 0; pb = 0; pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if ((i / 500) % 3 == 2) begin
        // overflow phase: accumulate one large positive product repeatedly
        pa = 8'h70; pb = 8'h68; pc = 8'h00; acc = (i % 500 != 0); sub = 0; en = 1;
      end else begin
        pa = 8'(rand_posit(8)); pb = 8'(rand_posit(8)); pc = 8'(rand_posit(8));
        if (pa == 8'h80 && $urandom_range(0, 3) != 0) pa = 8'h40;
        if (pc == 8'h80 && $urandom_range(0, 3) != 0) pc = 8'h00;
        acc = ($urandom_range(0, 3) != 0);
        sub = 1'($urandom);
        en  = ($urandom_range(0, 9) != 0);
      end
      #1;
      model_adj = 0;
      if (en) begin
        // product: exact fraction product renormalised so its leading one
        // lands on bit 24
        operand(pa, ma, sa_);
        operand(pb, mb, sb_);
        neg = ((ma < 0) ^ (mb < 0)) ^ sub;
        if (ma == 0 || mb == 0) begin m_base = 0; s_m = 0; end
        else begin
          m_base = (ma < 0 ? -ma : ma) * (mb < 0 ? -mb : mb);  // 48 fraction bits
          q = 63;
          while (!m_base[q]) q--;
          s_m = sa_ + sb_ + (q - 48);
          m_base = m_base >>> (q - 24);
          if (neg) m_base = -m_base;
        end
        operand(pc, bc, sc_);
        op_nar = (pa == 8'h80) || (pb == 8'h80);
        bo = acc ? model_base : bc;
        so = acc ? model_scale : sc_;
        if (m_base == 0) s_m = -64;
        if (bo == 0) so = -64;
        if (s_m >= so) begin b_big = m_base; big_s = s_m; b_small = bo; diff = s_m - so; end
        else begin b_big = bo; big_s = so; b_small = m_base; diff = so - s_m; end
        if (diff > 0 && b_small != 0) n_align++;
        if (diff > 31) diff = 31;
        sum = b_big + (b_small >>> diff);
        if (sum >= (64'sd1 <<< 30) || sum < -(64'sd1 <<< 30)) begin
          sum = sum >>> 1;
          big_s = (big_s == 63) ? 63 : big_s + 1;
          model_adj = 1;
          n_adj++;
        end
        model_base = sum; model_scale = big_s;
        model_nar = op_nar | (acc ? model_nar : (pc == 8'h80));
        if (acc) n_acc++; else n_fma++;
        if (sub) n_sub++;
      end
      @(posedge clk); #1;
      checks++;
      if (base !== 32'(model_base) || int'(scale) != model_scale || nar !== model_nar ||
          adjusted !== model_adj) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: base=%h scale=%0d adj=%0d want base=%h scale=%0d adj=%0d",
                   i, base, scale, adjusted, 32'(model_base), model_scale, model_adj);
      end
    end
    checks++;
    if (n_fma == 0 || n_acc == 0 || n_sub == 0 || n_adj == 0 || n_align == 0) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("fma=%0d acc=%0d sub=%0d align=%0d adjust=%0d", n_fma, n_acc, n_sub, n_align, n_adj);
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
