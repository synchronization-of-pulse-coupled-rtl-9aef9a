// Self-checking testbench for osc_circuit: compares phase, spike, FIFO
// write enable and the cMSB/cMid0/cMid1 decode clock by clock against a
// reference model, under random update codes and random FIFO back-pressure,
// and checks the free-running period of 2^CNT_W/OMEGA clocks.
module tb_osc_circuit;
  import pco_pkg::*;

  localparam int unsigned CNT_W = 8, OMEGA = 1, K_STEP = 1, SPK_W = 8, MID_W = 3;
  localparam int unsigned INIT = 200;

  logic clk = 1'b0, rst;
  update_e update;
  logic i_enable;
  logic spk_i, o_to_fifo, c_msb, c_mid0, c_mid1;
  logic [CNT_W-1:0] phase;
  int checks = 0, failures = 0;

  osc_circuit #(.CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
                .MID_W(MID_W), .INIT_PHASE(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t phase=%0d ref=%0d upd=%0d", what, $time, phase, ref_phase, update);
    end
  endtask

  int ref_phase, ref_spk, nxt;
  int wraps, last_wrap, period;

  initial begin
    rst = 1'b1; update = UPD_NONE; i_enable = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ref_phase = INIT; ref_spk = 0; wraps = 0; last_wrap = -1;
    // phase 1: free running, measure period
    for (int cyc = 0; cyc < 3000; cyc++) begin
      #1;
      check(phase == CNT_W'(ref_phase), "phase (free run)");
      check(spk_i == (ref_spk != 0), "spike (free run)");
      @(posedge clk);
      nxt = ref_phase + OMEGA;
      if (ref_spk != 0) ref_spk--;
      if (nxt >= (1 << CNT_W)) begin
        ref_phase = 0; ref_spk = SPK_W;
        if (last_wrap >= 0) begin
          period = cyc - last_wrap;
          check(period == (1 << CNT_W) / OMEGA, "free-running period");
        end
        last_wrap = cyc; wraps++;
      end else ref_phase = nxt;
    end
    check(wraps >= 10, "enough wraps");
    #1;
    // phase 2: random updates and back-pressure
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int r;
      r = $urandom_range(0, 9);
      update   = (r == 0) ? UPD_POS : (r == 1) ? UPD_NEG : UPD_NONE;
      i_enable = ($urandom_range(0, 3) != 0);
      #1;
      check(phase == CNT_W'(ref_phase), "phase");
      check(spk_i == (ref_spk != 0), "spike");
      check(o_to_fifo == ((ref_spk != 0) && i_enable), "o_to_fifo");
      check(c_msb == ref_phase[CNT_W-1], "cMSB");
      check(c_mid0 == (((ref_phase >> (CNT_W-1-MID_W)) & ((1 << MID_W) - 1)) != 0), "cMid0");
      check(c_mid1 == (((ref_phase >> (CNT_W-1-MID_W)) & ((1 << MID_W) - 1)) == (1 << MID_W) - 1), "cMid1");
      @(posedge clk);
      nxt = ref_phase + OMEGA + ((update == UPD_POS) ? K_STEP : 0) - ((update == UPD_NEG) ? K_STEP : 0);
      if (ref_spk != 0) ref_spk--;
      if (nxt >= (1 << CNT_W)) begin ref_phase = 0; ref_spk = SPK_W; end
      else ref_phase = nxt;
      #1 update = UPD_NONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
