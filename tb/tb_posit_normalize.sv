// tb_posit_normalize: random check of the normalize stage.
//
// Uses the scaled-accumulator geometry of posit<8,2> (32-bit value, 24
// fraction bits, 7-bit scale). For random values of varying magnitude and
// random scales, the expected sign, scale factor, fraction bits and sticky
// bit are found by scanning the magnitude bit by bit for its leading one.
module tb_posit_normalize;
  int checks = 0, failures = 0;

  logic [31:0] value;
  logic signed [6:0] scale;
  logic sign, zero, sticky;
  logic signed [15:0] sf;
  logic [7:0] frac;

  posit_normalize #(.W(32), .FP(24), .SIW(7), .SOW(16), .FRW(8)) dut (
    .value(value), .scale(scale), .sign(sign), .zero(zero), .sf(sf), .frac(frac), .sticky(sticky));

  initial begin
    logic [31:0] mag;
    int p, wsf;
    logic [7:0] wfrac;
    bit wst;
    for (int i = 0; i < 20000; i++) begin
      value = $urandom >> $urandom_range(0, 31);
      if ($urandom_range(0, 1)) value = -value;
      if (i == 0) value = 0;
      if (i == 1) value = 32'h8000_0000;
      scale = 7'($urandom);
      #1;
      mag = value[31] ? -value : value;
      checks++;
      if (value == 0) begin
        if (!zero) begin failures++; $display("FAIL zero"); end
        continue;
      end
      p = 31;
      while (!mag[p]) p--;
      wsf = int'(scale) + p - 24;
      wfrac = 0; wst = 0;
      for (int j = 1; j <= p; j++) begin
        if (j <= 8) wfrac[8-j] = mag[p-j];
        else        wst |= mag[p-j];
      end
      if (zero || sign !== value[31] || int'(sf) != wsf || frac !== wfrac || sticky !== wst) begin
        failures++;
        if (failures < 10)
          $display("FAIL v=%h sc=%0d: sf=%0d f=%h st=%0d want sf=%0d f=%h st=%0d",
                   value, scale, sf, frac, sticky, wsf, wfrac, wst);
      end
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
