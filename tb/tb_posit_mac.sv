// tb_posit_mac: end-to-end test of the posit MAC unit at its default
// configuration (posit<8,2> with the scaled accumulator).
//
// The unit is instantiated without parameter overrides; mac_checker drives
// several thousand operations into it and checks every result and its
// 4-cycle latency against the reference model (see mac_checker).
module tb_posit_mac;
  import posit_pkg::*;

  logic clk = 0;
  logic rst_n, in_valid, acc, sub, out_valid, adjusted, done;
  logic [7:0] posit_a, posit_b, posit_c, posit_r;
  int checks, failures;

  always #5 clk = ~clk;

  posit_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc(acc), .sub(sub),
    .posit_a(posit_a), .posit_b(posit_b), .posit_c(posit_c),
    .out_valid(out_valid), .posit_r(posit_r), .adjusted(adjusted));

  mac_checker #(.N(8), .ES(2), .ACC(ACC_SCALED), .OPS(6000), .NAME("default")) chk (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc(acc), .sub(sub),
    .posit_a(posit_a), .posit_b(posit_b), .posit_c(posit_c),
    .out_valid(out_valid), .posit_r(posit_r), .adjusted(adjusted),
    .done(done), .checks(checks), .failures(failures));

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
