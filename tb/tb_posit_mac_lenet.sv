// tb_posit_mac_lenet: two LeNet-5 style layers computed in posit<8,2> by two
// MAC units side by side: the default scaled-accumulator unit and a unit with
// the standard quire (carry guard 31).
//
//   layer 0: one output channel of the first convolution, 5x5 kernel over a
//            32x32 input, 28x28 = 784 outputs of 25 terms each;
//   layer 1: a fully connected layer of 120 outputs over 400 inputs.
//
// Each output is a chain: a fused multiply-add of the first term with the
// bias as third operand, then accumulations. Operations stream one per cycle
// without gaps, so every accumulation depends on the previous cycle's.
// Activations lie in [0,1); convolution weights in (-1/4, 1/4) and fully
// connected weights in (-1/16, 1/16), generated from a fixed seed. Every
// result of both units is checked against the reference models (integer
// model of the scaled accumulator; exact sum with reference rounding for the
// quire). For each layer the test also reports how many final outputs of the
// scaled accumulator differ from the exactly accumulated ones, and by how
// many posit steps at most.
module tb_posit_mac_lenet;
  import posit_pkg::*;
  import posit_ref_pkg::*;

  localparam int IMG = 32, K = 5, OUT = IMG - K + 1;
  localparam int FC_IN = 400, FC_OUT = 120;
  localparam int OPS = OUT * OUT * K * K + FC_IN * FC_OUT;

  logic clk = 0, rst_n = 0, in_valid = 0, acc = 0, sub = 0;
  logic [7:0] a, b, c, r_sa, r_q;
  logic ov_sa, ov_q, adj_sa, adj_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  posit_mac u_sa (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc(acc), .sub(sub),
    .posit_a(a), .posit_b(b), .posit_c(c), .out_valid(ov_sa), .posit_r(r_sa), .adjusted(adj_sa));
  posit_mac #(.ACC(ACC_QUIRE), .CG(31)) u_q (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .acc(acc), .sub(sub), .posit_a(a), .posit_b(b), .posit_c(c), .out_valid(ov_q),
    .posit_r(r_q), .adjusted(adj_q));

  typedef struct { logic [7:0] want_sa, want_q; int layer; bit last; } exp_t;
  exp_t queue [$];

  logic [7:0] img [IMG][IMG];
  logic [7:0] w [K][K];
  logic [7:0] fc_x [FC_IN];
  logic [7:0] fc_w [FC_OUT][FC_IN];
  logic [7:0] bias;
  int n_out [2] = '{0, 0}, n_diff [2] = '{0, 0}, max_dist [2] = '{0, 0};
  int n_ops = 0;

  longint sa_base;
  int     sa_scale;
  fx_t    q_exact;

  function automatic int pdist(input logic [7:0] x, input logic [7:0] y);
    int d;
    d = int'($signed(x)) - int'($signed(y));
    return d < 0 ? -d : d;
  endfunction

  // results
  always @(posedge clk) begin
    if (rst_n && ov_sa) begin
      exp_t e;
      e = queue.pop_front();
      checks += 2;
      if (!ov_q) begin failures++; $display("FAIL: valid mismatch"); end
      if (r_sa !== e.want_sa) begin
        failures++;
        if (failures < 10) $display("FAIL scaled: got %h want %h", r_sa, e.want_sa);
      end
      if (r_q !== e.want_q) begin
        failures++;
        if (failures < 10) $display("FAIL quire: got %h want %h", r_q, e.want_q);
      end
      if (e.last) begin
        n_out[e.layer]++;
        if (r_sa != r_q) n_diff[e.layer]++;
        if (pdist(r_sa, r_q) > max_dist[e.layer]) max_dist[e.layer] = pdist(r_sa, r_q);
      end
    end
  end

  // issue one operation and record what both units must return
  task automatic issue(input logic [7:0] pa, input logic [7:0] pb, input logic [7:0] pc,
                       input bit is_acc, input int layer, input bit last);
    fx_t prod;
    exp_t e;
    @(negedge clk);
    in_valid = 1; a = pa; b = pb; c = pc; acc = is_acc; sub = 0;
    void'(sa_step(8, 2, sa_base, sa_scale, 32'(pa), 32'(pb), 32'(pc), is_acc, 0));
    prod = ref_product(8, 2, 32'(pa), 32'(pb));
    q_exact = (is_acc ? q_exact : ref_value(8, 2, 32'(pc))) + prod;
    e.want_q  = 8'(ref_encode(8, 2, q_exact));
    e.want_sa = (sa_base == 0) ? 8'h00 :
      8'(ref_encode(8, 2, to_fx(sa_base < 0, sa_base < 0 ? -sa_base : sa_base, sa_scale - 24)));
    e.layer = layer;
    e.last  = last;
    queue.push_back(e);
    n_ops++;
  endtask

  function automatic logic [7:0] rnd(input bit neg, input int lsb_exp);
    return 8'(ref_encode(8, 2, to_fx(neg, longint'($urandom_range(1, 255)), lsb_exp)));
  endfunction

  initial begin
    void'($urandom(12345));
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) img[y][x] = rnd(0, -8);
    for (int y = 0; y < K; y++)
      for (int x = 0; x < K; x++) w[y][x] = rnd(1'($urandom), -10);
    for (int i = 0; i < FC_IN; i++) fc_x[i] = rnd(0, -8);
    for (int o = 0; o < FC_OUT; o++)
      for (int i = 0; i < FC_IN; i++) fc_w[o][i] = rnd(1'($urandom), -12);
    bias = 8'(ref_encode(8, 2, to_fx(1, 3, -5)));
    sa_base = 0; sa_scale = -64; q_exact = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int oy = 0; oy < OUT; oy++)
      for (int ox = 0; ox < OUT; ox++)
        for (int t = 0; t < K * K; t++)
          issue(img[oy + t / K][ox + t % K], w[t / K][t % K], bias, t != 0, 0, t == K * K - 1);
    for (int o = 0; o < FC_OUT; o++)
      for (int i = 0; i < FC_IN; i++)
        issue(fc_x[i], fc_w[o][i], bias, i != 0, 1, i == FC_IN - 1);
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (queue.size() != 0 || n_out[0] != OUT * OUT || n_out[1] != FC_OUT) begin
      failures++;
      $display("FAIL: outputs %0d/%0d seen, %0d results missing", n_out[0], n_out[1], queue.size());
    end
    $display("%0d MAC operations", n_ops);
    $display("conv 5x5 over %0dx%0d: %0d outputs; scaled accumulator differs from exact in %0d, by at most %0d posit step(s)",
             IMG, IMG, n_out[0], n_diff[0], max_dist[0]);
    $display("fully connected %0d->%0d: %0d outputs; scaled accumulator differs from exact in %0d, by at most %0d posit step(s)",
             FC_IN, FC_OUT, n_out[1], n_diff[1], max_dist[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (OPS + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
