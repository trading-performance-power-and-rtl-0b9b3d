// tb_posit_decode: exhaustive check of the posit decoder.
//
// Applies every posit<8,2> and every posit<16,2> pattern and compares sign,
// scale factor, fraction, zero and NaR flags with the bit-serial reference
// decoder. The fraction is compared after aligning the reference mantissa
// to the decoder's fixed fraction width.
module tb_posit_decode;
  import posit_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  p8;
  logic        s8, z8, n8;
  logic signed [5:0] sf8;
  logic [3:0]  f8;
  logic [15:0] p16;
  logic        s16, z16, n16;
  logic signed [6:0] sf16;
  logic [11:0] f16;

  posit_decode #(.N(8),  .ES(2)) dut8  (.posit(p8),  .sign(s8),  .sf(sf8),  .frac(f8),  .zero(z8),  .nar(n8));
  posit_decode #(.N(16), .ES(2)) dut16 (.posit(p16), .sign(s16), .sf(sf16), .frac(f16), .zero(z16), .nar(n16));

  task automatic check(input string tag, input int n, input logic [31:0] p,
                       input bit s, input int sf, input longint f, input int fw,
                       input bit z, input bit nr);
    bit rz, rn, rs; int rsf, rfb; longint rm, exp_f;
    ref_decode(n, 2, p, rz, rn, rs, rsf, rm, rfb);
    exp_f = (rz || rn) ? 0 : (rm << (fw - 1 - rfb));
    checks++;
    if (z !== rz || nr !== rn || s !== rs || (!rz && !rn && (sf != rsf || f != exp_f))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s p=%h: got s=%0d sf=%0d f=%h z=%0d nar=%0d, want s=%0d sf=%0d f=%h z=%0d nar=%0d",
                 tag, p, s, sf, f, z, nr, rs, rsf, exp_f, rz, rn);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      p8 = 8'(i); #1;
      check("p8", 8, 32'(p8), s8, int'(sf8), longint'(f8), 4, z8, n8);
    end
    for (int i = 0; i < 65536; i++) begin
      p16 = 16'(i); #1;
      check("p16", 16, 32'(p16), s16, int'(sf16), longint'(f16), 12, z16, n16);
    end
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
