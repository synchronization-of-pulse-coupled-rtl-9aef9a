// Self-checking testbench for func_gen: sweeps every 8-bit phase value,
// derives cMSB/cMid0/cMid1 from it as the oscillator does, and checks that
// Zp/Zn mark the regions where -sin(phi) is clearly positive/negative
// (outside a band of 1/16 period around each zero crossing), for both signs.
module tb_func_gen;
  localparam int CNT_W = 8, MID_W = 3;
  logic sign, c_msb, c_mid0, c_mid1, zp, zn;
  int checks = 0, failures = 0;

  func_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int p = 0; p < (1 << CNT_W); p++) begin
        real ang, z;
        bit exp_p, exp_n;
        logic [CNT_W-1:0] ph;
        ph = CNT_W'(p);
        sign   = s[0];
        c_msb  = ph[CNT_W-1];
        c_mid0 = |ph[CNT_W-2 -: MID_W];
        c_mid1 = &ph[CNT_W-2 -: MID_W];
        #1;
        ang = 2.0 * 3.14159265358979 * p / (1 << CNT_W);
        z = (s == 0) ? -$sin(ang) : $sin(ang);
        // dead band: within 2*pi/16 of 0, pi or 2*pi
        exp_p = (z >  0.38) && !(p < 16 || (p >= 112 && p < 144) || p >= 240);
        exp_n = (z < -0.38) && !(p < 16 || (p >= 112 && p < 144) || p >= 240);
        checks++;
        if (zp !== exp_p || zn !== exp_n) begin
          failures++;
          $display("FAIL sign=%0d phase=%0d zp=%b zn=%b exp %b %b", s, p, zp, zn, exp_p, exp_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
