// mac_checker: stimulus and scoreboard for one posit_mac instance.
//
// Drives a random stream of fused multiply-add and multiply-accumulate
// operations (with subtraction, NaR, zero, idle cycles and back-to-back
// accumulations) into a posit_mac built with the same N/ES/ACC/CG, then
// checks every result against a reference: the exact running sum (wrapped
// at the quire's width) rounded by the bit-serial reference encoder for the
// quire, or the integer model of
// the scaled accumulator for ACC_SCALED. Each result must appear exactly
// LATENCY cycles after its operands. Phases of repeated large products
// force guard overflows (scaled accumulator) and saturation to maxpos;
// products of minpos force rounding up to minpos, and
// an exact cancellation forces a zero result. Every mechanism is
// counted and one that never happened counts as a failure. `done` rises
// when the stream has drained.
module mac_checker
  import posit_pkg::*;
  import posit_ref_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned ES      = 2,
  parameter acc_mode_e   ACC     = ACC_SCALED,
  parameter int unsigned CG      = 31,
  parameter int          OPS     = 4000,
  parameter int          LATENCY = 4,
  parameter string       NAME    = "mac"
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         in_valid,
  output logic         acc,
  output logic         sub,
  output logic [N-1:0] posit_a,
  output logic [N-1:0] posit_b,
  output logic [N-1:0] posit_c,
  input  logic         out_valid,
  input  logic [N-1:0] posit_r,
  input  logic         adjusted,
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam logic [N-1:0] NAR    = {1'b1, {(N-1){1'b0}}};
  localparam logic [N-1:0] MAXPOS = {1'b0, {(N-1){1'b1}}};
  localparam logic [N-1:0] MINPOS = N'(1);
  localparam logic [N-1:0] ONE    = {2'b01, {(N-2){1'b0}}};

  typedef struct { logic [N-1:0] want; longint cycle; } exp_t;
  exp_t queue [$];

  longint cycle = 0;
  int n_fma = 0, n_acc = 0, n_sub = 0, n_b2b = 0, n_nar = 0, n_zero = 0;
  int n_sat_max = 0, n_sat_min = 0, n_adj = 0, n_idle = 0, n_lat = 0, n_res = 0;

  // reference state
  fx_t    q_exact = 0;      // quire: exact running value
  localparam int Q_WRAP = $bits(fx_t) - FX_F
                        - int'(quire_width(N, ES, CG) - quire_frac(N, ES));
  longint sa_base = 0;      // scaled accumulator: base and scale
  int     sa_scale = -(1 << ($clog2(N) + ES + 1));
  bit     st_nar = 0;
  int     sa_adj_pending = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // results
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      n_res++;
      if (queue.size() == 0) begin
        failures++;
        $display("%s FAIL: unexpected result %h", NAME, posit_r);
      end else begin
        e = queue.pop_front();
        if (posit_r !== e.want) begin
          failures++;
          if (failures < 10) $display("%s FAIL: got %h want %h (issued cycle %0d)", NAME, posit_r, e.want, e.cycle);
        end
        checks++;
        if (cycle - e.cycle != longint'(LATENCY)) begin
          failures++;
          if (failures < 10) $display("%s FAIL: latency %0d", NAME, cycle - e.cycle);
        end else n_lat++;
        if (e.want == NAR) n_nar++;
        if (e.want == 0) n_zero++;
      end
    end
    if (rst_n && adjusted) n_adj++;
  end

  function automatic logic [N-1:0] expected();
    fx_t v;
    if (st_nar) return NAR;
    if (ACC == ACC_QUIRE) v = q_exact;
    else begin
      if (sa_base == 0) return '0;
      v = to_fx(sa_base < 0, sa_base < 0 ? -sa_base : sa_base, sa_scale - (4 * N - 8));
    end
    return N'(ref_encode(N, ES, v));
  endfunction

  function automatic logic [N-1:0] pick(input int phase, input int which);
    case (phase)
      1: return (which == 2) ? MAXPOS : MAXPOS;                 // huge products
      2: return (which == 2) ? '0 : MINPOS;                     // tiny products
      3: return (which == 2) ? '0 : (which == 0 ? ONE + N'(3) : ONE + N'(5));
      default: begin
        logic [N-1:0] p;
        p = N'(rand_posit(N));
        if (p == NAR && $urandom_range(0, 3) != 0) p = ONE;
        return p;
      end
    endcase
  endfunction

  initial begin
    bit prev_acc;
    int phase;
    fx_t prod, v;
    checks = 0; failures = 0; done = 0;
    rst_n = 0; in_valid = 0; acc = 0; sub = 0;
    posit_a = '0; posit_b = '0; posit_c = '0;
    prev_acc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < OPS; i++) begin
      @(negedge clk);
      phase = (i % 400 < 300) ? 0 : 1 + ((i / 400) % 3);
      in_valid = (phase != 0) || ($urandom_range(0, 7) != 0);
      if (!in_valid) begin
        n_idle++; prev_acc = 0;
        posit_a = N'($urandom); posit_b = N'($urandom); posit_c = N'($urandom);
        acc = 1'($urandom); sub = 1'($urandom);
        continue;
      end
      posit_a = pick(phase, 0);
      posit_b = pick(phase, 1);
      posit_c = pick(phase, 2);
      acc = (phase != 0) ? (i % 400 != 300) : ($urandom_range(0, 3) != 0);
      sub = (phase != 0) ? 1'b0 : 1'($urandom);
      if (i % 400 == 150) begin
        // exact cancellation: 1*1 + (-1) = 0
        posit_a = ONE; posit_b = ONE; posit_c = -ONE; acc = 0; sub = 0;
      end
      // reference update
      if (ACC == ACC_QUIRE) begin
        prod = ref_product(N, ES, 32'(posit_a), 32'(posit_b));
        if (sub) prod = -prod;
        q_exact = (acc ? q_exact : ref_value(N, ES, 32'(posit_c))) + prod;
        // the quire register keeps QW - QF integer bits (sign included) and
        // wraps beyond them, like any 2's complement register
        q_exact = (q_exact <<< Q_WRAP) >>> Q_WRAP;
      end else begin
        void'(sa_step(N, ES, sa_base, sa_scale, 32'(posit_a), 32'(posit_b), 32'(posit_c), acc, sub));
      end
      st_nar = (posit_a == NAR) || (posit_b == NAR) || (acc ? st_nar : (posit_c == NAR));
      if (acc) n_acc++; else n_fma++;
      if (sub) n_sub++;
      if (acc && prev_acc) n_b2b++;
      prev_acc = acc;
      queue.push_back('{want: expected(), cycle: cycle});
      if (!st_nar) begin
        v = (ACC == ACC_QUIRE) ? q_exact :
            to_fx(sa_base < 0, sa_base < 0 ? -sa_base : sa_base, sa_scale - (4 * N - 8));
        if (v > ref_value(N, ES, 32'(MAXPOS))) n_sat_max++;
        if (v != 0 && v > 0 && v < ref_value(N, ES, 32'(MINPOS))) n_sat_min++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (queue.size() != 0 || n_res == 0) begin
      failures++;
      $display("%s FAIL: %0d results missing", NAME, queue.size());
    end
    checks++;
    if (n_fma == 0 || n_acc == 0 || n_sub == 0 || n_b2b == 0 || n_nar == 0 || n_zero == 0 ||
        n_sat_max == 0 || n_sat_min == 0 || n_idle == 0 || (ACC == ACC_SCALED && n_adj == 0)) begin
      failures++;
      $display("%s FAIL: a mechanism never happened", NAME);
    end
    $display("%s<%0d,%0d> %s: results=%0d fma=%0d mac=%0d sub=%0d back_to_back=%0d idle=%0d nar=%0d zero=%0d sat_maxpos=%0d sat_minpos=%0d adjust=%0d latency_ok=%0d",
             NAME, N, ES, ACC == ACC_QUIRE ? "quire" : "scaled-acc", n_res, n_fma, n_acc, n_sub,
             n_b2b, n_idle, n_nar, n_zero, n_sat_max, n_sat_min, n_adj, n_lat);
    done = 1;
  end
endmodule
