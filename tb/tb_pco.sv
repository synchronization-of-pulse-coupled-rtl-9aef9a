// Self-checking testbench for pco (one oscillator with its function
// generator and update circuit).
// Part 1, single oscillator driven by test spikes of SPK_W clocks:
//   spike in the second half of the period (Z > 0) -> fires SPK_W*K_STEP
//   clocks early; in the first half (Z < 0) -> fires that much late; inside
//   the dead band near phase 0 -> unchanged. With sign = 1 the first-half
//   spike advances instead.
// Part 2, two oscillators coupled both ways, starting 100 counts apart:
//   they must end up firing within the dead band of each other (in phase).
module tb_pco;
  import pco_pkg::*;

  localparam int unsigned CNT_W = 8, SPK_W = 8, PERIOD = 256;

  logic clk = 1'b0, rst;
  logic sign, spk_j;
  logic spk_i, o_to_fifo;
  logic [CNT_W-1:0] phase;
  update_e update;
  int checks = 0, failures = 0;

  pco #(.CNT_W(CNT_W), .SPK_W(SPK_W), .INIT_PHASE(0)) dut (
    .clk, .rst, .sign, .spk_j, .i_enable(1'b1),
    .spk_i, .o_to_fifo, .phase, .update
  );

  // pair for part 2
  logic spk_x, spk_y, fx, fy;
  logic [CNT_W-1:0] ph_x, ph_y;
  update_e ux, uy;
  pco #(.CNT_W(CNT_W), .SPK_W(SPK_W), .INIT_PHASE(0)) u_x (
    .clk, .rst, .sign(1'b0), .spk_j(spk_y), .i_enable(1'b1),
    .spk_i(spk_x), .o_to_fifo(fx), .phase(ph_x), .update(ux));
  pco #(.CNT_W(CNT_W), .SPK_W(SPK_W), .INIT_PHASE(100)) u_y (
    .clk, .rst, .sign(1'b0), .spk_j(spk_x), .i_enable(1'b1),
    .spk_i(spk_y), .o_to_fifo(fy), .phase(ph_y), .update(uy));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic spk_d, sx_d, sy_d;
  always_ff @(posedge clk) begin spk_d <= spk_i; sx_d <= spk_x; sy_d <= spk_y; end

  // wait for a spike onset, then for the phase to reach p, inject a spike of
  // SPK_W clocks, and return the clocks from that onset to the next onset
  task automatic inject_at(input int p, input bit inject, output int gap, output int n_pos, output int n_neg);
    int n;
    n_pos = 0; n_neg = 0;
    @(posedge clk iff (spk_i && !spk_d));
    n = 1;  // the onset was seen in the clock before this edge
    #1;
    while (phase != CNT_W'(p)) begin @(posedge clk); n++; #1; end
    if (inject) begin
      spk_j = 1'b1;
      for (int k = 0; k < SPK_W; k++) begin
        #1;
        if (update == UPD_POS) n_pos++;
        if (update == UPD_NEG) n_neg++;
        @(posedge clk); n++; #1;
      end
      spk_j = 1'b0;
    end
    while (!(spk_i && !spk_d)) begin @(posedge clk); n++; #1; end
    gap = n;
  endtask

  int gap, np, nn;
  int tx, ty, diff, lastdiff;

  initial begin
    rst = 1'b1; sign = 1'b0; spk_j = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // free-running period
    inject_at(100, 1'b0, gap, np, nn);
    check(gap == PERIOD, "free-running period");
    // Z > 0: advance by SPK_W
    inject_at(180, 1'b1, gap, np, nn);
    check(gap == PERIOD - SPK_W, "positive update advances the spike");
    check(np == SPK_W && nn == 0, "positive update code during the spike");
    // Z < 0: retard by SPK_W
    inject_at(60, 1'b1, gap, np, nn);
    check(gap == PERIOD + SPK_W, "negative update retards the spike");
    check(np == 0 && nn == SPK_W, "negative update code during the spike");
    // dead band near phase 0
    inject_at(2, 1'b1, gap, np, nn);
    check(gap == PERIOD, "no update in the dead band");
    check(np == 0 && nn == 0, "no update code in the dead band");
    // dead band near half period
    inject_at(120, 1'b1, gap, np, nn);
    check(gap == PERIOD, "no update in the dead band at pi");
    // sign = 1 inverts Z
    sign = 1'b1;
    inject_at(60, 1'b1, gap, np, nn);
    check(gap == PERIOD - SPK_W, "sign inverts Z");
    sign = 1'b0;

    // part 2: mutual coupling of two oscillators
    lastdiff = -1;
    for (int per = 0; per < 40; per++) begin
      @(posedge clk iff (spk_x && !sx_d));
      tx = $time;
      @(posedge clk iff (spk_y && !sy_d));
      ty = $time;
      diff = ((ty - tx) / 10) % PERIOD;
      if (diff > PERIOD / 2) diff = PERIOD - diff;
      lastdiff = diff;
    end
    check(lastdiff <= 16, "two coupled oscillators synchronise");
    $display("pair spike offset after 40 periods: %0d clocks", lastdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
