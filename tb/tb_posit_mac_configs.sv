// tb_posit_mac_configs: the posit MAC unit in every configuration of the
// design-space sweep.
//
// Precisions n = 6, 8, 10, 12 and 16 with es = 1 and 2, plus posit<8,0> and
// posit<8,3>, each with the scaled accumulator (SA), the current-standard
// quire (Q, carry guard 31) and the older quire (QO, carry guard n-1): 36
// units side by side. Every unit gets its own mac_checker, which streams
// random FMA/MAC operations through it, plus saturating, cancelling and
// guard-overflowing sequences, and compares each result and its latency with
// the reference model. The test ends when all checkers have drained; their
// check and failure counts are summed. A mechanism that a checker never saw
// is counted as a failure inside that checker.
module tb_posit_mac_configs;
  import posit_pkg::*;

  localparam int NU = 36;
  logic clk = 0;
  logic [NU-1:0] done;
  int checks [NU];
  int failures [NU];

  always #5 clk = ~clk;

  // sa6e1: posit<6,1>, scaled accumulator
  logic sa6e1_rst_n, sa6e1_iv, sa6e1_acc, sa6e1_sub, sa6e1_ov, sa6e1_adj;
  logic [5:0] sa6e1_a, sa6e1_b, sa6e1_c, sa6e1_r;
  posit_mac #(.N(6), .ES(1), .ACC(ACC_SCALED), .CG(31)) u_sa6e1 (
    .clk(clk), .rst_n(sa6e1_rst_n), .in_valid(sa6e1_iv), .acc(sa6e1_acc), .sub(sa6e1_sub),
    .posit_a(sa6e1_a), .posit_b(sa6e1_b), .posit_c(sa6e1_c),
    .out_valid(sa6e1_ov), .posit_r(sa6e1_r), .adjusted(sa6e1_adj));
  mac_checker #(.N(6), .ES(1), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa6e1")) c_sa6e1 (
    .clk(clk), .rst_n(sa6e1_rst_n), .in_valid(sa6e1_iv), .acc(sa6e1_acc), .sub(sa6e1_sub),
    .posit_a(sa6e1_a), .posit_b(sa6e1_b), .posit_c(sa6e1_c),
    .out_valid(sa6e1_ov), .posit_r(sa6e1_r), .adjusted(sa6e1_adj),
    .done(done[0]), .checks(checks[0]), .failures(failures[0]));

  // q6e1: posit<6,1>, quire, cg = 31
  logic q6e1_rst_n, q6e1_iv, q6e1_acc, q6e1_sub, q6e1_ov, q6e1_adj;
  logic [5:0] q6e1_a, q6e1_b, q6e1_c, q6e1_r;
  posit_mac #(.N(6), .ES(1), .ACC(ACC_QUIRE), .CG(31)) u_q6e1 (
    .clk(clk), .rst_n(q6e1_rst_n), .in_valid(q6e1_iv), .acc(q6e1_acc), .sub(q6e1_sub),
    .posit_a(q6e1_a), .posit_b(q6e1_b), .posit_c(q6e1_c),
    .out_valid(q6e1_ov), .posit_r(q6e1_r), .adjusted(q6e1_adj));
  mac_checker #(.N(6), .ES(1), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q6e1")) c_q6e1 (
    .clk(clk), .rst_n(q6e1_rst_n), .in_valid(q6e1_iv), .acc(q6e1_acc), .sub(q6e1_sub),
    .posit_a(q6e1_a), .posit_b(q6e1_b), .posit_c(q6e1_c),
    .out_valid(q6e1_ov), .posit_r(q6e1_r), .adjusted(q6e1_adj),
    .done(done[1]), .checks(checks[1]), .failures(failures[1]));

  // qo6e1: posit<6,1>, quire, cg = 5
  logic qo6e1_rst_n, qo6e1_iv, qo6e1_acc, qo6e1_sub, qo6e1_ov, qo6e1_adj;
  logic [5:0] qo6e1_a, qo6e1_b, qo6e1_c, qo6e1_r;
  posit_mac #(.N(6), .ES(1), .ACC(ACC_QUIRE), .CG(5)) u_qo6e1 (
    .clk(clk), .rst_n(qo6e1_rst_n), .in_valid(qo6e1_iv), .acc(qo6e1_acc), .sub(qo6e1_sub),
    .posit_a(qo6e1_a), .posit_b(qo6e1_b), .posit_c(qo6e1_c),
    .out_valid(qo6e1_ov), .posit_r(qo6e1_r), .adjusted(qo6e1_adj));
  mac_checker #(.N(6), .ES(1), .ACC(ACC_QUIRE), .CG(5), .OPS(2000), .NAME("qo6e1")) c_qo6e1 (
    .clk(clk), .rst_n(qo6e1_rst_n), .in_valid(qo6e1_iv), .acc(qo6e1_acc), .sub(qo6e1_sub),
    .posit_a(qo6e1_a), .posit_b(qo6e1_b), .posit_c(qo6e1_c),
    .out_valid(qo6e1_ov), .posit_r(qo6e1_r), .adjusted(qo6e1_adj),
    .done(done[2]), .checks(checks[2]), .failures(failures[2]));

  // sa6e2: posit<6,2>, scaled accumulator
  logic sa6e2_rst_n, sa6e2_iv, sa6e2_acc, sa6e2_sub, sa6e2_ov, sa6e2_adj;
  logic [5:0] sa6e2_a, sa6e2_b, sa6e2_c, sa6e2_r;
  posit_mac #(.N(6), .ES(2), .ACC(ACC_SCALED), .CG(31)) u_sa6e2 (
    .clk(clk), .rst_n(sa6e2_rst_n), .in_valid(sa6e2_iv), .acc(sa6e2_acc), .sub(sa6e2_sub),
    .posit_a(sa6e2_a), .posit_b(sa6e2_b), .posit_c(sa6e2_c),
    .out_valid(sa6e2_ov), .posit_r(sa6e2_r), .adjusted(sa6e2_adj));
  mac_checker #(.N(6), .ES(2), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa6e2")) c_sa6e2 (
    .clk(clk), .rst_n(sa6e2_rst_n), .in_valid(sa6e2_iv), .acc(sa6e2_acc), .sub(sa6e2_sub),
    .posit_a(sa6e2_a), .posit_b(sa6e2_b), .posit_c(sa6e2_c),
    .out_valid(sa6e2_ov), .posit_r(sa6e2_r), .adjusted(sa6e2_adj),
    .done(done[3]), .checks(checks[3]), .failures(failures[3]));

  // q6e2: posit<6,2>, quire, cg = 31
  logic q6e2_rst_n, q6e2_iv, q6e2_acc, q6e2_sub, q6e2_ov, q6e2_adj;
  logic [5:0] q6e2_a, q6e2_b, q6e2_c, q6e2_r;
  posit_mac #(.N(6), .ES(2), .ACC(ACC_QUIRE), .CG(31)) u_q6e2 (
    .clk(clk), .rst_n(q6e2_rst_n), .in_valid(q6e2_iv), .acc(q6e2_acc), .sub(q6e2_sub),
    .posit_a(q6e2_a), .posit_b(q6e2_b), .posit_c(q6e2_c),
    .out_valid(q6e2_ov), .posit_r(q6e2_r), .adjusted(q6e2_adj));
  mac_checker #(.N(6), .ES(2), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q6e2")) c_q6e2 (
    .clk(clk), .rst_n(q6e2_rst_n), .in_valid(q6e2_iv), .acc(q6e2_acc), .sub(q6e2_sub),
    .posit_a(q6e2_a), .posit_b(q6e2_b), .posit_c(q6e2_c),
    .out_valid(q6e2_ov), .posit_r(q6e2_r), .adjusted(q6e2_adj),
    .done(done[4]), .checks(checks[4]), .failures(failures[4]));

  // qo6e2: posit<6,2>, quire, cg = 5
  logic qo6e2_rst_n, qo6e2_iv, qo6e2_acc, qo6e2_sub, qo6e2_ov, qo6e2_adj;
  logic [5:0] qo6e2_a, qo6e2_b, qo6e2_c, qo6e2_r;
  posit_mac #(.N(6), .ES(2), .ACC(ACC_QUIRE), .CG(5)) u_qo6e2 (
    .clk(clk), .rst_n(qo6e2_rst_n), .in_valid(qo6e2_iv), .acc(qo6e2_acc), .sub(qo6e2_sub),
    .posit_a(qo6e2_a), .posit_b(qo6e2_b), .posit_c(qo6e2_c),
    .out_valid(qo6e2_ov), .posit_r(qo6e2_r), .adjusted(qo6e2_adj));
  mac_checker #(.N(6), .ES(2), .ACC(ACC_QUIRE), .CG(5), .OPS(2000), .NAME("qo6e2")) c_qo6e2 (
    .clk(clk), .rst_n(qo6e2_rst_n), .in_valid(qo6e2_iv), .acc(qo6e2_acc), .sub(qo6e2_sub),
    .posit_a(qo6e2_a), .posit_b(qo6e2_b), .posit_c(qo6e2_c),
    .out_valid(qo6e2_ov), .posit_r(qo6e2_r), .adjusted(qo6e2_adj),
    .done(done[5]), .checks(checks[5]), .failures(failures[5]));

  // sa8e1: posit<8,1>, scaled accumulator
  logic sa8e1_rst_n, sa8e1_iv, sa8e1_acc, sa8e1_sub, sa8e1_ov, sa8e1_adj;
  logic [7:0] sa8e1_a, sa8e1_b, sa8e1_c, sa8e1_r;
  posit_mac #(.N(8), .ES(1), .ACC(ACC_SCALED), .CG(31)) u_sa8e1 (
    .clk(clk), .rst_n(sa8e1_rst_n), .in_valid(sa8e1_iv), .acc(sa8e1_acc), .sub(sa8e1_sub),
    .posit_a(sa8e1_a), .posit_b(sa8e1_b), .posit_c(sa8e1_c),
    .out_valid(sa8e1_ov), .posit_r(sa8e1_r), .adjusted(sa8e1_adj));
  mac_checker #(.N(8), .ES(1), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa8e1")) c_sa8e1 (
    .clk(clk), .rst_n(sa8e1_rst_n), .in_valid(sa8e1_iv), .acc(sa8e1_acc), .sub(sa8e1_sub),
    .posit_a(sa8e1_a), .posit_b(sa8e1_b), .posit_c(sa8e1_c),
    .out_valid(sa8e1_ov), .posit_r(sa8e1_r), .adjusted(sa8e1_adj),
    .done(done[6]), .checks(checks[6]), .failures(failures[6]));

  // q8e1: posit<8,1>, quire, cg = 31
  logic q8e1_rst_n, q8e1_iv, q8e1_acc, q8e1_sub, q8e1_ov, q8e1_adj;
  logic [7:0] q8e1_a, q8e1_b, q8e1_c, q8e1_r;
  posit_mac #(.N(8), .ES(1), .ACC(ACC_QUIRE), .CG(31)) u_q8e1 (
    .clk(clk), .rst_n(q8e1_rst_n), .in_valid(q8e1_iv), .acc(q8e1_acc), .sub(q8e1_sub),
    .posit_a(q8e1_a), .posit_b(q8e1_b), .posit_c(q8e1_c),
    .out_valid(q8e1_ov), .posit_r(q8e1_r), .adjusted(q8e1_adj));
  mac_checker #(.N(8), .ES(1), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q8e1")) c_q8e1 (
    .clk(clk), .rst_n(q8e1_rst_n), .in_valid(q8e1_iv), .acc(q8e1_acc), .sub(q8e1_sub),
    .posit_a(q8e1_a), .posit_b(q8e1_b), .posit_c(q8e1_c),
    .out_valid(q8e1_ov), .posit_r(q8e1_r), .adjusted(q8e1_adj),
    .done(done[7]), .checks(checks[7]), .failures(failures[7]));

  // qo8e1: posit<8,1>, quire, cg = 7
  logic qo8e1_rst_n, qo8e1_iv, qo8e1_acc, qo8e1_sub, qo8e1_ov, qo8e1_adj;
  logic [7:0] qo8e1_a, qo8e1_b, qo8e1_c, qo8e1_r;
  posit_mac #(.N(8), .ES(1), .ACC(ACC_QUIRE), .CG(7)) u_qo8e1 (
    .clk(clk), .rst_n(qo8e1_rst_n), .in_valid(qo8e1_iv), .acc(qo8e1_acc), .sub(qo8e1_sub),
    .posit_a(qo8e1_a), .posit_b(qo8e1_b), .posit_c(qo8e1_c),
    .out_valid(qo8e1_ov), .posit_r(qo8e1_r), .adjusted(qo8e1_adj));
  mac_checker #(.N(8), .ES(1), .ACC(ACC_QUIRE), .CG(7), .OPS(2000), .NAME("qo8e1")) c_qo8e1 (
    .clk(clk), .rst_n(qo8e1_rst_n), .in_valid(qo8e1_iv), .acc(qo8e1_acc), .sub(qo8e1_sub),
    .posit_a(qo8e1_a), .posit_b(qo8e1_b), .posit_c(qo8e1_c),
    .out_valid(qo8e1_ov), .posit_r(qo8e1_r), .adjusted(qo8e1_adj),
    .done(done[8]), .checks(checks[8]), .failures(failures[8]));

  // sa8e2: posit<8,2>, scaled accumulator
  logic sa8e2_rst_n, sa8e2_iv, sa8e2_acc, sa8e2_sub, sa8e2_ov, sa8e2_adj;
  logic [7:0] sa8e2_a, sa8e2_b, sa8e2_c, sa8e2_r;
  posit_mac #(.N(8), .ES(2), .ACC(ACC_SCALED), .CG(31)) u_sa8e2 (
    .clk(clk), .rst_n(sa8e2_rst_n), .in_valid(sa8e2_iv), .acc(sa8e2_acc), .sub(sa8e2_sub),
    .posit_a(sa8e2_a), .posit_b(sa8e2_b), .posit_c(sa8e2_c),
    .out_valid(sa8e2_ov), .posit_r(sa8e2_r), .adjusted(sa8e2_adj));
  mac_checker #(.N(8), .ES(2), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa8e2")) c_sa8e2 (
    .clk(clk), .rst_n(sa8e2_rst_n), .in_valid(sa8e2_iv), .acc(sa8e2_acc), .sub(sa8e2_sub),
    .posit_a(sa8e2_a), .posit_b(sa8e2_b), .posit_c(sa8e2_c),
    .out_valid(sa8e2_ov), .posit_r(sa8e2_r), .adjusted(sa8e2_adj),
    .done(done[9]), .checks(checks[9]), .failures(failures[9]));

  // q8e2: posit<8,2>, quire, cg = 31
  logic q8e2_rst_n, q8e2_iv, q8e2_acc, q8e2_sub, q8e2_ov, q8e2_adj;
  logic [7:0] q8e2_a, q8e2_b, q8e2_c, q8e2_r;
  posit_mac #(.N(8), .ES(2), .ACC(ACC_QUIRE), .CG(31)) u_q8e2 (
    .clk(clk), .rst_n(q8e2_rst_n), .in_valid(q8e2_iv), .acc(q8e2_acc), .sub(q8e2_sub),
    .posit_a(q8e2_a), .posit_b(q8e2_b), .posit_c(q8e2_c),
    .out_valid(q8e2_ov), .posit_r(q8e2_r), .adjusted(q8e2_adj));
  mac_checker #(.N(8), .ES(2), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q8e2")) c_q8e2 (
    .clk(clk), .rst_n(q8e2_rst_n), .in_valid(q8e2_iv), .acc(q8e2_acc), .sub(q8e2_sub),
    .posit_a(q8e2_a), .posit_b(q8e2_b), .posit_c(q8e2_c),
    .out_valid(q8e2_ov), .posit_r(q8e2_r), .adjusted(q8e2_adj),
    .done(done[10]), .checks(checks[10]), .failures(failures[10]));

  // qo8e2: posit<8,2>, quire, cg = 7
  logic qo8e2_rst_n, qo8e2_iv, qo8e2_acc, qo8e2_sub, qo8e2_ov, qo8e2_adj;
  logic [7:0] qo8e2_a, qo8e2_b, qo8e2_c, qo8e2_r;
  posit_mac #(.N(8), .ES(2), .ACC(ACC_QUIRE), .CG(7)) u_qo8e2 (
    .clk(clk), .rst_n(qo8e2_rst_n), .in_valid(qo8e2_iv), .acc(qo8e2_acc), .sub(qo8e2_sub),
    .posit_a(qo8e2_a), .posit_b(qo8e2_b), .posit_c(qo8e2_c),
    .out_valid(qo8e2_ov), .posit_r(qo8e2_r), .adjusted(qo8e2_adj));
  mac_checker #(.N(8), .ES(2), .ACC(ACC_QUIRE), .CG(7), .OPS(2000), .NAME("qo8e2")) c_qo8e2 (
    .clk(clk), .rst_n(qo8e2_rst_n), .in_valid(qo8e2_iv), .acc(qo8e2_acc), .sub(qo8e2_sub),
    .posit_a(qo8e2_a), .posit_b(qo8e2_b), .posit_c(qo8e2_c),
    .out_valid(qo8e2_ov), .posit_r(qo8e2_r), .adjusted(qo8e2_adj),
    .done(done[11]), .checks(checks[11]), .failures(failures[11]));

  // sa10e1: posit<10,1>, scaled accumulator
  logic sa10e1_rst_n, sa10e1_iv, sa10e1_acc, sa10e1_sub, sa10e1_ov, sa10e1_adj;
  logic [9:0] sa10e1_a, sa10e1_b, sa10e1_c, sa10e1_r;
  posit_mac #(.N(10), .ES(1), .ACC(ACC_SCALED), .CG(31)) u_sa10e1 (
    .clk(clk), .rst_n(sa10e1_rst_n), .in_valid(sa10e1_iv), .acc(sa10e1_acc), .sub(sa10e1_sub),
    .posit_a(sa10e1_a), .posit_b(sa10e1_b), .posit_c(sa10e1_c),
    .out_valid(sa10e1_ov), .posit_r(sa10e1_r), .adjusted(sa10e1_adj));
  mac_checker #(.N(10), .ES(1), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa10e1")) c_sa10e1 (
    .clk(clk), .rst_n(sa10e1_rst_n), .in_valid(sa10e1_iv), .acc(sa10e1_acc), .sub(sa10e1_sub),
    .posit_a(sa10e1_a), .posit_b(sa10e1_b), .posit_c(sa10e1_c),
    .out_valid(sa10e1_ov), .posit_r(sa10e1_r), .adjusted(sa10e1_adj),
    .done(done[12]), .checks(checks[12]), .failures(failures[12]));

  // q10e1: posit<10,1>, quire, cg = 31
  logic q10e1_rst_n, q10e1_iv, q10e1_acc, q10e1_sub, q10e1_ov, q10e1_adj;
  logic [9:0] q10e1_a, q10e1_b, q10e1_c, q10e1_r;
  posit_mac #(.N(10), .ES(1), .ACC(ACC_QUIRE), .CG(31)) u_q10e1 (
    .clk(clk), .rst_n(q10e1_rst_n), .in_valid(q10e1_iv), .acc(q10e1_acc), .sub(q10e1_sub),
    .posit_a(q10e1_a), .posit_b(q10e1_b), .posit_c(q10e1_c),
    .out_valid(q10e1_ov), .posit_r(q10e1_r), .adjusted(q10e1_adj));
  mac_checker #(.N(10), .ES(1), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q10e1")) c_q10e1 (
    .clk(clk), .rst_n(q10e1_rst_n), .in_valid(q10e1_iv), .acc(q10e1_acc), .sub(q10e1_sub),
    .posit_a(q10e1_a), .posit_b(q10e1_b), .posit_c(q10e1_c),
    .out_valid(q10e1_ov), .posit_r(q10e1_r), .adjusted(q10e1_adj),
    .done(done[13]), .checks(checks[13]), .failures(failures[13]));

  // qo10e1: posit<10,1>, quire, cg = 9
  logic qo10e1_rst_n, qo10e1_iv, qo10e1_acc, qo10e1_sub, qo10e1_ov, qo10e1_adj;
  logic [9:0] qo10e1_a, qo10e1_b, qo10e1_c, qo10e1_r;
  posit_mac #(.N(10), .ES(1), .ACC(ACC_QUIRE), .CG(9)) u_qo10e1 (
    .clk(clk), .rst_n(qo10e1_rst_n), .in_valid(qo10e1_iv), .acc(qo10e1_acc), .sub(qo10e1_sub),
    .posit_a(qo10e1_a), .posit_b(qo10e1_b), .posit_c(qo10e1_c),
    .out_valid(qo10e1_ov), .posit_r(qo10e1_r), .adjusted(qo10e1_adj));
  mac_checker #(.N(10), .ES(1), .ACC(ACC_QUIRE), .CG(9), .OPS(2000), .NAME("qo10e1")) c_qo10e1 (
    .clk(clk), .rst_n(qo10e1_rst_n), .in_valid(qo10e1_iv), .acc(qo10e1_acc), .sub(qo10e1_sub),
    .posit_a(qo10e1_a), .posit_b(qo10e1_b), .posit_c(qo10e1_c),
    .out_valid(qo10e1_ov), .posit_r(qo10e1_r), .adjusted(qo10e1_adj),
    .done(done[14]), .checks(checks[14]), .failures(failures[14]));

  // sa10e2: posit<10,2>, scaled accumulator
  logic sa10e2_rst_n, sa10e2_iv, sa10e2_acc, sa10e2_sub, sa10e2_ov, sa10e2_adj;
  logic [9:0] sa10e2_a, sa10e2_b, sa10e2_c, sa10e2_r;
  posit_mac #(.N(10), .ES(2), .ACC(ACC_SCALED), .CG(31)) u_sa10e2 (
    .clk(clk), .rst_n(sa10e2_rst_n), .in_valid(sa10e2_iv), .acc(sa10e2_acc), .sub(sa10e2_sub),
    .posit_a(sa10e2_a), .posit_b(sa10e2_b), .posit_c(sa10e2_c),
    .out_valid(sa10e2_ov), .posit_r(sa10e2_r), .adjusted(sa10e2_adj));
  mac_checker #(.N(10), .ES(2), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa10e2")) c_sa10e2 (
    .clk(clk), .rst_n(sa10e2_rst_n), .in_valid(sa10e2_iv), .acc(sa10e2_acc), .sub(sa10e2_sub),
    .posit_a(sa10e2_a), .posit_b(sa10e2_b), .posit_c(sa10e2_c),
    .out_valid(sa10e2_ov), .posit_r(sa10e2_r), .adjusted(sa10e2_adj),
    .done(done[15]), .checks(checks[15]), .failures(failures[15]));

  // q10e2: posit<10,2>, quire, cg = 31
  logic q10e2_rst_n, q10e2_iv, q10e2_acc, q10e2_sub, q10e2_ov, q10e2_adj;
  logic [9:0] q10e2_a, q10e2_b, q10e2_c, q10e2_r;
  posit_mac #(.N(10), .ES(2), .ACC(ACC_QUIRE), .CG(31)) u_q10e2 (
    .clk(clk), .rst_n(q10e2_rst_n), .in_valid(q10e2_iv), .acc(q10e2_acc), .sub(q10e2_sub),
    .posit_a(q10e2_a), .posit_b(q10e2_b), .posit_c(q10e2_c),
    .out_valid(q10e2_ov), .posit_r(q10e2_r), .adjusted(q10e2_adj));
  mac_checker #(.N(10), .ES(2), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q10e2")) c_q10e2 (
    .clk(clk), .rst_n(q10e2_rst_n), .in_valid(q10e2_iv), .acc(q10e2_acc), .sub(q10e2_sub),
    .posit_a(q10e2_a), .posit_b(q10e2_b), .posit_c(q10e2_c),
    .out_valid(q10e2_ov), .posit_r(q10e2_r), .adjusted(q10e2_adj),
    .done(done[16]), .checks(checks[16]), .failures(failures[16]));

  // qo10e2: posit<10,2>, quire, cg = 9
  logic qo10e2_rst_n, qo10e2_iv, qo10e2_acc, qo10e2_sub, qo10e2_ov, qo10e2_adj;
  logic [9:0] qo10e2_a, qo10e2_b, qo10e2_c, qo10e2_r;
  posit_mac #(.N(10), .ES(2), .ACC(ACC_QUIRE), .CG(9)) u_qo10e2 (
    .clk(clk), .rst_n(qo10e2_rst_n), .in_valid(qo10e2_iv), .acc(qo10e2_acc), .sub(qo10e2_sub),
    .posit_a(qo10e2_a), .posit_b(qo10e2_b), .posit_c(qo10e2_c),
    .out_valid(qo10e2_ov), .posit_r(qo10e2_r), .adjusted(qo10e2_adj));
  mac_checker #(.N(10), .ES(2), .ACC(ACC_QUIRE), .CG(9), .OPS(2000), .NAME("qo10e2")) c_qo10e2 (
    .clk(clk), .rst_n(qo10e2_rst_n), .in_valid(qo10e2_iv), .acc(qo10e2_acc), .sub(qo10e2_sub),
    .posit_a(qo10e2_a), .posit_b(qo10e2_b), .posit_c(qo10e2_c),
    .out_valid(qo10e2_ov), .posit_r(qo10e2_r), .adjusted(qo10e2_adj),
    .done(done[17]), .checks(checks[17]), .failures(failures[17]));

  // sa12e1: posit<12,1>, scaled accumulator
  logic sa12e1_rst_n, sa12e1_iv, sa12e1_acc, sa12e1_sub, sa12e1_ov, sa12e1_adj;
  logic [11:0] sa12e1_a, sa12e1_b, sa12e1_c, sa12e1_r;
  posit_mac #(.N(12), .ES(1), .ACC(ACC_SCALED), .CG(31)) u_sa12e1 (
    .clk(clk), .rst_n(sa12e1_rst_n), .in_valid(sa12e1_iv), .acc(sa12e1_acc), .sub(sa12e1_sub),
    .posit_a(sa12e1_a), .posit_b(sa12e1_b), .posit_c(sa12e1_c),
    .out_valid(sa12e1_ov), .posit_r(sa12e1_r), .adjusted(sa12e1_adj));
  mac_checker #(.N(12), .ES(1), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa12e1")) c_sa12e1 (
    .clk(clk), .rst_n(sa12e1_rst_n), .in_valid(sa12e1_iv), .acc(sa12e1_acc), .sub(sa12e1_sub),
    .posit_a(sa12e1_a), .posit_b(sa12e1_b), .posit_c(sa12e1_c),
    .out_valid(sa12e1_ov), .posit_r(sa12e1_r), .adjusted(sa12e1_adj),
    .done(done[18]), .checks(checks[18]), .failures(failures[18]));

  // q12e1: posit<12,1>, quire, cg = 31
  logic q12e1_rst_n, q12e1_iv, q12e1_acc, q12e1_sub, q12e1_ov, q12e1_adj;
  logic [11:0] q12e1_a, q12e1_b, q12e1_c, q12e1_r;
  posit_mac #(.N(12), .ES(1), .ACC(ACC_QUIRE), .CG(31)) u_q12e1 (
    .clk(clk), .rst_n(q12e1_rst_n), .in_valid(q12e1_iv), .acc(q12e1_acc), .sub(q12e1_sub),
    .posit_a(q12e1_a), .posit_b(q12e1_b), .posit_c(q12e1_c),
    .out_valid(q12e1_ov), .posit_r(q12e1_r), .adjusted(q12e1_adj));
  mac_checker #(.N(12), .ES(1), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q12e1")) c_q12e1 (
    .clk(clk), .rst_n(q12e1_rst_n), .in_valid(q12e1_iv), .acc(q12e1_acc), .sub(q12e1_sub),
    .posit_a(q12e1_a), .posit_b(q12e1_b), .posit_c(q12e1_c),
    .out_valid(q12e1_ov), .posit_r(q12e1_r), .adjusted(q12e1_adj),
    .done(done[19]), .checks(checks[19]), .failures(failures[19]));

  // qo12e1: posit<12,1>, quire, cg = 11
  logic qo12e1_rst_n, qo12e1_iv, qo12e1_acc, qo12e1_sub, qo12e1_ov, qo12e1_adj;
  logic [11:0] qo12e1_a, qo12e1_b, qo12e1_c, qo12e1_r;
  posit_mac #(.N(12), .ES(1), .ACC(ACC_QUIRE), .CG(11)) u_qo12e1 (
    .clk(clk), .rst_n(qo12e1_rst_n), .in_valid(qo12e1_iv), .acc(qo12e1_acc), .sub(qo12e1_sub),
    .posit_a(qo12e1_a), .posit_b(qo12e1_b), .posit_c(qo12e1_c),
    .out_valid(qo12e1_ov), .posit_r(qo12e1_r), .adjusted(qo12e1_adj));
  mac_checker #(.N(12), .ES(1), .ACC(ACC_QUIRE), .CG(11), .OPS(2000), .NAME("qo12e1")) c_qo12e1 (
    .clk(clk), .rst_n(qo12e1_rst_n), .in_valid(qo12e1_iv), .acc(qo12e1_acc), .sub(qo12e1_sub),
    .posit_a(qo12e1_a), .posit_b(qo12e1_b), .posit_c(qo12e1_c),
    .out_valid(qo12e1_ov), .posit_r(qo12e1_r), .adjusted(qo12e1_adj),
    .done(done[20]), .checks(checks[20]), .failures(failures[20]));

  // sa12e2: posit<12,2>, scaled accumulator
  logic sa12e2_rst_n, sa12e2_iv, sa12e2_acc, sa12e2_sub, sa12e2_ov, sa12e2_adj;
  logic [11:0] sa12e2_a, sa12e2_b, sa12e2_c, sa12e2_r;
  posit_mac #(.N(12), .ES(2), .ACC(ACC_SCALED), .CG(31)) u_sa12e2 (
    .clk(clk), .rst_n(sa12e2_rst_n), .in_valid(sa12e2_iv), .acc(sa12e2_acc), .sub(sa12e2_sub),
    .posit_a(sa12e2_a), .posit_b(sa12e2_b), .posit_c(sa12e2_c),
    .out_valid(sa12e2_ov), .posit_r(sa12e2_r), .adjusted(sa12e2_adj));
  mac_checker #(.N(12), .ES(2), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa12e2")) c_sa12e2 (
    .clk(clk), .rst_n(sa12e2_rst_n), .in_valid(sa12e2_iv), .acc(sa12e2_acc), .sub(sa12e2_sub),
    .posit_a(sa12e2_a), .posit_b(sa12e2_b), .posit_c(sa12e2_c),
    .out_valid(sa12e2_ov), .posit_r(sa12e2_r), .adjusted(sa12e2_adj),
    .done(done[21]), .checks(checks[21]), .failures(failures[21]));

  // q12e2: posit<12,2>, quire, cg = 31
  logic q12e2_rst_n, q12e2_iv, q12e2_acc, q12e2_sub, q12e2_ov, q12e2_adj;
  logic [11:0] q12e2_a, q12e2_b, q12e2_c, q12e2_r;
  posit_mac #(.N(12), .ES(2), .ACC(ACC_QUIRE), .CG(31)) u_q12e2 (
    .clk(clk), .rst_n(q12e2_rst_n), .in_valid(q12e2_iv), .acc(q12e2_acc), .sub(q12e2_sub),
    .posit_a(q12e2_a), .posit_b(q12e2_b), .posit_c(q12e2_c),
    .out_valid(q12e2_ov), .posit_r(q12e2_r), .adjusted(q12e2_adj));
  mac_checker #(.N(12), .ES(2), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q12e2")) c_q12e2 (
    .clk(clk), .rst_n(q12e2_rst_n), .in_valid(q12e2_iv), .acc(q12e2_acc), .sub(q12e2_sub),
    .posit_a(q12e2_a), .posit_b(q12e2_b), .posit_c(q12e2_c),
    .out_valid(q12e2_ov), .posit_r(q12e2_r), .adjusted(q12e2_adj),
    .done(done[22]), .checks(checks[22]), .failures(failures[22]));

  // qo12e2: posit<12,2>, quire, cg = 11
  logic qo12e2_rst_n, qo12e2_iv, qo12e2_acc, qo12e2_sub, qo12e2_ov, qo12e2_adj;
  logic [11:0] qo12e2_a, qo12e2_b, qo12e2_c, qo12e2_r;
  posit_mac #(.N(12), .ES(2), .ACC(ACC_QUIRE), .CG(11)) u_qo12e2 (
    .clk(clk), .rst_n(qo12e2_rst_n), .in_valid(qo12e2_iv), .acc(qo12e2_acc), .sub(qo12e2_sub),
    .posit_a(qo12e2_a), .posit_b(qo12e2_b), .posit_c(qo12e2_c),
    .out_valid(qo12e2_ov), .posit_r(qo12e2_r), .adjusted(qo12e2_adj));
  mac_checker #(.N(12), .ES(2), .ACC(ACC_QUIRE), .CG(11), .OPS(2000), .NAME("qo12e2")) c_qo12e2 (
    .clk(clk), .rst_n(qo12e2_rst_n), .in_valid(qo12e2_iv), .acc(qo12e2_acc), .sub(qo12e2_sub),
    .posit_a(qo12e2_a), .posit_b(qo12e2_b), .posit_c(qo12e2_c),
    .out_valid(qo12e2_ov), .posit_r(qo12e2_r), .adjusted(qo12e2_adj),
    .done(done[23]), .checks(checks[23]), .failures(failures[23]));

  // sa16e1: posit<16,1>, scaled accumulator
  logic sa16e1_rst_n, sa16e1_iv, sa16e1_acc, sa16e1_sub, sa16e1_ov, sa16e1_adj;
  logic [15:0] sa16e1_a, sa16e1_b, sa16e1_c, sa16e1_r;
  posit_mac #(.N(16), .ES(1), .ACC(ACC_SCALED), .CG(31)) u_sa16e1 (
    .clk(clk), .rst_n(sa16e1_rst_n), .in_valid(sa16e1_iv), .acc(sa16e1_acc), .sub(sa16e1_sub),
    .posit_a(sa16e1_a), .posit_b(sa16e1_b), .posit_c(sa16e1_c),
    .out_valid(sa16e1_ov), .posit_r(sa16e1_r), .adjusted(sa16e1_adj));
  mac_checker #(.N(16), .ES(1), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa16e1")) c_sa16e1 (
    .clk(clk), .rst_n(sa16e1_rst_n), .in_valid(sa16e1_iv), .acc(sa16e1_acc), .sub(sa16e1_sub),
    .posit_a(sa16e1_a), .posit_b(sa16e1_b), .posit_c(sa16e1_c),
    .out_valid(sa16e1_ov), .posit_r(sa16e1_r), .adjusted(sa16e1_adj),
    .done(done[24]), .checks(checks[24]), .failures(failures[24]));

  // q16e1: posit<16,1>, quire, cg = 31
  logic q16e1_rst_n, q16e1_iv, q16e1_acc, q16e1_sub, q16e1_ov, q16e1_adj;
  logic [15:0] q16e1_a, q16e1_b, q16e1_c, q16e1_r;
  posit_mac #(.N(16), .ES(1), .ACC(ACC_QUIRE), .CG(31)) u_q16e1 (
    .clk(clk), .rst_n(q16e1_rst_n), .in_valid(q16e1_iv), .acc(q16e1_acc), .sub(q16e1_sub),
    .posit_a(q16e1_a), .posit_b(q16e1_b), .posit_c(q16e1_c),
    .out_valid(q16e1_ov), .posit_r(q16e1_r), .adjusted(q16e1_adj));
  mac_checker #(.N(16), .ES(1), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q16e1")) c_q16e1 (
    .clk(clk), .rst_n(q16e1_rst_n), .in_valid(q16e1_iv), .acc(q16e1_acc), .sub(q16e1_sub),
    .posit_a(q16e1_a), .posit_b(q16e1_b), .posit_c(q16e1_c),
    .out_valid(q16e1_ov), .posit_r(q16e1_r), .adjusted(q16e1_adj),
    .done(done[25]), .checks(checks[25]), .failures(failures[25]));

  // qo16e1: posit<16,1>, quire, cg = 15
  logic qo16e1_rst_n, qo16e1_iv, qo16e1_acc, qo16e1_sub, qo16e1_ov, qo16e1_adj;
  logic [15:0] qo16e1_a, qo16e1_b, qo16e1_c, qo16e1_r;
  posit_mac #(.N(16), .ES(1), .ACC(ACC_QUIRE), .CG(15)) u_qo16e1 (
    .clk(clk), .rst_n(qo16e1_rst_n), .in_valid(qo16e1_iv), .acc(qo16e1_acc), .sub(qo16e1_sub),
    .posit_a(qo16e1_a), .posit_b(qo16e1_b), .posit_c(qo16e1_c),
    .out_valid(qo16e1_ov), .posit_r(qo16e1_r), .adjusted(qo16e1_adj));
  mac_checker #(.N(16), .ES(1), .ACC(ACC_QUIRE), .CG(15), .OPS(2000), .NAME("qo16e1")) c_qo16e1 (
    .clk(clk), .rst_n(qo16e1_rst_n), .in_valid(qo16e1_iv), .acc(qo16e1_acc), .sub(qo16e1_sub),
    .posit_a(qo16e1_a), .posit_b(qo16e1_b), .posit_c(qo16e1_c),
    .out_valid(qo16e1_ov), .posit_r(qo16e1_r), .adjusted(qo16e1_adj),
    .done(done[26]), .checks(checks[26]), .failures(failures[26]));

  // sa16e2: posit<16,2>, scaled accumulator
  logic sa16e2_rst_n, sa16e2_iv, sa16e2_acc, sa16e2_sub, sa16e2_ov, sa16e2_adj;
  logic [15:0] sa16e2_a, sa16e2_b, sa16e2_c, sa16e2_r;
  posit_mac #(.N(16), .ES(2), .ACC(ACC_SCALED), .CG(31)) u_sa16e2 (
    .clk(clk), .rst_n(sa16e2_rst_n), .in_valid(sa16e2_iv), .acc(sa16e2_acc), .sub(sa16e2_sub),
    .posit_a(sa16e2_a), .posit_b(sa16e2_b), .posit_c(sa16e2_c),
    .out_valid(sa16e2_ov), .posit_r(sa16e2_r), .adjusted(sa16e2_adj));
  mac_checker #(.N(16), .ES(2), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa16e2")) c_sa16e2 (
    .clk(clk), .rst_n(sa16e2_rst_n), .in_valid(sa16e2_iv), .acc(sa16e2_acc), .sub(sa16e2_sub),
    .posit_a(sa16e2_a), .posit_b(sa16e2_b), .posit_c(sa16e2_c),
    .out_valid(sa16e2_ov), .posit_r(sa16e2_r), .adjusted(sa16e2_adj),
    .done(done[27]), .checks(checks[27]), .failures(failures[27]));

  // q16e2: posit<16,2>, quire, cg = 31
  logic q16e2_rst_n, q16e2_iv, q16e2_acc, q16e2_sub, q16e2_ov, q16e2_adj;
  logic [15:0] q16e2_a, q16e2_b, q16e2_c, q16e2_r;
  posit_mac #(.N(16), .ES(2), .ACC(ACC_QUIRE), .CG(31)) u_q16e2 (
    .clk(clk), .rst_n(q16e2_rst_n), .in_valid(q16e2_iv), .acc(q16e2_acc), .sub(q16e2_sub),
    .posit_a(q16e2_a), .posit_b(q16e2_b), .posit_c(q16e2_c),
    .out_valid(q16e2_ov), .posit_r(q16e2_r), .adjusted(q16e2_adj));
  mac_checker #(.N(16), .ES(2), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q16e2")) c_q16e2 (
    .clk(clk), .rst_n(q16e2_rst_n), .in_valid(q16e2_iv), .acc(q16e2_acc), .sub(q16e2_sub),
    .posit_a(q16e2_a), .posit_b(q16e2_b), .posit_c(q16e2_c),
    .out_valid(q16e2_ov), .posit_r(q16e2_r), .adjusted(q16e2_adj),
    .done(done[28]), .checks(checks[28]), .failures(failures[28]));

  // qo16e2: posit<16,2>, quire, cg = 15
  logic qo16e2_rst_n, qo16e2_iv, qo16e2_acc, qo16e2_sub, qo16e2_ov, qo16e2_adj;
  logic [15:0] qo16e2_a, qo16e2_b, qo16e2_c, qo16e2_r;
  posit_mac #(.N(16), .ES(2), .ACC(ACC_QUIRE), .CG(15)) u_qo16e2 (
    .clk(clk), .rst_n(qo16e2_rst_n), .in_valid(qo16e2_iv), .acc(qo16e2_acc), .sub(qo16e2_sub),
    .posit_a(qo16e2_a), .posit_b(qo16e2_b), .posit_c(qo16e2_c),
    .out_valid(qo16e2_ov), .posit_r(qo16e2_r), .adjusted(qo16e2_adj));
  mac_checker #(.N(16), .ES(2), .ACC(ACC_QUIRE), .CG(15), .OPS(2000), .NAME("qo16e2")) c_qo16e2 (
    .clk(clk), .rst_n(qo16e2_rst_n), .in_valid(qo16e2_iv), .acc(qo16e2_acc), .sub(qo16e2_sub),
    .posit_a(qo16e2_a), .posit_b(qo16e2_b), .posit_c(qo16e2_c),
    .out_valid(qo16e2_ov), .posit_r(qo16e2_r), .adjusted(qo16e2_adj),
    .done(done[29]), .checks(checks[29]), .failures(failures[29]));

  // sa8e0: posit<8,0>, scaled accumulator
  logic sa8e0_rst_n, sa8e0_iv, sa8e0_acc, sa8e0_sub, sa8e0_ov, sa8e0_adj;
  logic [7:0] sa8e0_a, sa8e0_b, sa8e0_c, sa8e0_r;
  posit_mac #(.N(8), .ES(0), .ACC(ACC_SCALED), .CG(31)) u_sa8e0 (
    .clk(clk), .rst_n(sa8e0_rst_n), .in_valid(sa8e0_iv), .acc(sa8e0_acc), .sub(sa8e0_sub),
    .posit_a(sa8e0_a), .posit_b(sa8e0_b), .posit_c(sa8e0_c),
    .out_valid(sa8e0_ov), .posit_r(sa8e0_r), .adjusted(sa8e0_adj));
  mac_checker #(.N(8), .ES(0), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa8e0")) c_sa8e0 (
    .clk(clk), .rst_n(sa8e0_rst_n), .in_valid(sa8e0_iv), .acc(sa8e0_acc), .sub(sa8e0_sub),
    .posit_a(sa8e0_a), .posit_b(sa8e0_b), .posit_c(sa8e0_c),
    .out_valid(sa8e0_ov), .posit_r(sa8e0_r), .adjusted(sa8e0_adj),
    .done(done[30]), .checks(checks[30]), .failures(failures[30]));

  // q8e0: posit<8,0>, quire, cg = 31
  logic q8e0_rst_n, q8e0_iv, q8e0_acc, q8e0_sub, q8e0_ov, q8e0_adj;
  logic [7:0] q8e0_a, q8e0_b, q8e0_c, q8e0_r;
  posit_mac #(.N(8), .ES(0), .ACC(ACC_QUIRE), .CG(31)) u_q8e0 (
    .clk(clk), .rst_n(q8e0_rst_n), .in_valid(q8e0_iv), .acc(q8e0_acc), .sub(q8e0_sub),
    .posit_a(q8e0_a), .posit_b(q8e0_b), .posit_c(q8e0_c),
    .out_valid(q8e0_ov), .posit_r(q8e0_r), .adjusted(q8e0_adj));
  mac_checker #(.N(8), .ES(0), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q8e0")) c_q8e0 (
    .clk(clk), .rst_n(q8e0_rst_n), .in_valid(q8e0_iv), .acc(q8e0_acc), .sub(q8e0_sub),
    .posit_a(q8e0_a), .posit_b(q8e0_b), .posit_c(q8e0_c),
    .out_valid(q8e0_ov), .posit_r(q8e0_r), .adjusted(q8e0_adj),
    .done(done[31]), .checks(checks[31]), .failures(failures[31]));

  // qo8e0: posit<8,0>, quire, cg = 7
  logic qo8e0_rst_n, qo8e0_iv, qo8e0_acc, qo8e0_sub, qo8e0_ov, qo8e0_adj;
  logic [7:0] qo8e0_a, qo8e0_b, qo8e0_c, qo8e0_r;
  posit_mac #(.N(8), .ES(0), .ACC(ACC_QUIRE), .CG(7)) u_qo8e0 (
    .clk(clk), .rst_n(qo8e0_rst_n), .in_valid(qo8e0_iv), .acc(qo8e0_acc), .sub(qo8e0_sub),
    .posit_a(qo8e0_a), .posit_b(qo8e0_b), .posit_c(qo8e0_c),
    .out_valid(qo8e0_ov), .posit_r(qo8e0_r), .adjusted(qo8e0_adj));
  mac_checker #(.N(8), .ES(0), .ACC(ACC_QUIRE), .CG(7), .OPS(2000), .NAME("qo8e0")) c_qo8e0 (
    .clk(clk), .rst_n(qo8e0_rst_n), .in_valid(qo8e0_iv), .acc(qo8e0_acc), .sub(qo8e0_sub),
    .posit_a(qo8e0_a), .posit_b(qo8e0_b), .posit_c(qo8e0_c),
    .out_valid(qo8e0_ov), .posit_r(qo8e0_r), .adjusted(qo8e0_adj),
    .done(done[32]), .checks(checks[32]), .failures(failures[32]));

  // sa8e3: posit<8,3>, scaled accumulator
  logic sa8e3_rst_n, sa8e3_iv, sa8e3_acc, sa8e3_sub, sa8e3_ov, sa8e3_adj;
  logic [7:0] sa8e3_a, sa8e3_b, sa8e3_c, sa8e3_r;
  posit_mac #(.N(8), .ES(3), .ACC(ACC_SCALED), .CG(31)) u_sa8e3 (
    .clk(clk), .rst_n(sa8e3_rst_n), .in_valid(sa8e3_iv), .acc(sa8e3_acc), .sub(sa8e3_sub),
    .posit_a(sa8e3_a), .posit_b(sa8e3_b), .posit_c(sa8e3_c),
    .out_valid(sa8e3_ov), .posit_r(sa8e3_r), .adjusted(sa8e3_adj));
  mac_checker #(.N(8), .ES(3), .ACC(ACC_SCALED), .CG(31), .OPS(2000), .NAME("sa8e3")) c_sa8e3 (
    .clk(clk), .rst_n(sa8e3_rst_n), .in_valid(sa8e3_iv), .acc(sa8e3_acc), .sub(sa8e3_sub),
    .posit_a(sa8e3_a), .posit_b(sa8e3_b), .posit_c(sa8e3_c),
    .out_valid(sa8e3_ov), .posit_r(sa8e3_r), .adjusted(sa8e3_adj),
    .done(done[33]), .checks(checks[33]), .failures(failures[33]));

  // q8e3: posit<8,3>, quire, cg = 31
  logic q8e3_rst_n, q8e3_iv, q8e3_acc, q8e3_sub, q8e3_ov, q8e3_adj;
  logic [7:0] q8e3_a, q8e3_b, q8e3_c, q8e3_r;
  posit_mac #(.N(8), .ES(3), .ACC(ACC_QUIRE), .CG(31)) u_q8e3 (
    .clk(clk), .rst_n(q8e3_rst_n), .in_valid(q8e3_iv), .acc(q8e3_acc), .sub(q8e3_sub),
    .posit_a(q8e3_a), .posit_b(q8e3_b), .posit_c(q8e3_c),
    .out_valid(q8e3_ov), .posit_r(q8e3_r), .adjusted(q8e3_adj));
  mac_checker #(.N(8), .ES(3), .ACC(ACC_QUIRE), .CG(31), .OPS(2000), .NAME("q8e3")) c_q8e3 (
    .clk(clk), .rst_n(q8e3_rst_n), .in_valid(q8e3_iv), .acc(q8e3_acc), .sub(q8e3_sub),
    .posit_a(q8e3_a), .posit_b(q8e3_b), .posit_c(q8e3_c),
    .out_valid(q8e3_ov), .posit_r(q8e3_r), .adjusted(q8e3_adj),
    .done(done[34]), .checks(checks[34]), .failures(failures[34]));

  // qo8e3: posit<8,3>, quire, cg = 7
  logic qo8e3_rst_n, qo8e3_iv, qo8e3_acc, qo8e3_sub, qo8e3_ov, qo8e3_adj;
  logic [7:0] qo8e3_a, qo8e3_b, qo8e3_c, qo8e3_r;
  posit_mac #(.N(8), .ES(3), .ACC(ACC_QUIRE), .CG(7)) u_qo8e3 (
    .clk(clk), .rst_n(qo8e3_rst_n), .in_valid(qo8e3_iv), .acc(qo8e3_acc), .sub(qo8e3_sub),
    .posit_a(qo8e3_a), .posit_b(qo8e3_b), .posit_c(qo8e3_c),
    .out_valid(qo8e3_ov), .posit_r(qo8e3_r), .adjusted(qo8e3_adj));
  mac_checker #(.N(8), .ES(3), .ACC(ACC_QUIRE), .CG(7), .OPS(2000), .NAME("qo8e3")) c_qo8e3 (
    .clk(clk), .rst_n(qo8e3_rst_n), .in_valid(qo8e3_iv), .acc(qo8e3_acc), .sub(qo8e3_sub),
    .posit_a(qo8e3_a), .posit_b(qo8e3_b), .posit_c(qo8e3_c),
    .out_valid(qo8e3_ov), .posit_r(qo8e3_r), .adjusted(qo8e3_adj),
    .done(done[35]), .checks(checks[35]), .failures(failures[35]));

  function automatic int total(input int v [NU]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    @(posedge clk);
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule
