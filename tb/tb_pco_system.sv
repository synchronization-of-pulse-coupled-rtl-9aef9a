// Shared body of the top-level testbenches: pco_multi_fpga_top, the link
// models standing in for the GTX/Aurora channels, stimulus and checks.
// FULL_SIZE = 1 instantiates the top with no parameter overrides; WINDOW
// must then equal the top's default window.
module tb_pco_system #(
  parameter int unsigned WINDOW    = 50_000,
  parameter bit          FULL_SIZE = 1'b0
) ();
  import pco_pkg::*;

  localparam int unsigned CNT_W = 8, PERIOD = 256, LAT = 20, SPK_W = 8;

  logic osc_clk1 = 1'b0, osc_clk2 = 1'b0, gtx_clk = 1'b0;
  logic osc_rst, gtx_rst, lt_rst, sign;
  logic n1_tx_rd_en, n1_tx_ds, n1_tx_valid, n1_tx_emp, n1_rx_wr_en, n1_rx_ds, n1_rx_full;
  logic n2_tx_rd_en, n2_tx_ds, n2_tx_valid, n2_tx_emp, n2_rx_wr_en, n2_rx_ds, n2_rx_full;
  logic [3:0] spk;
  logic [3:0][CNT_W-1:0] phase;
  update_e update [4];
  logic [1:0] tx_full, spk_rx;
  logic [2:0] ring_spk;
  logic [2:0][CNT_W-1:0] ring_phase;
  update_e ring_update [3];
  logic lt_tx_ready, lt_tx_valid, lt_rx_valid, lt_done;
  logic [15:0] lt_tx_data, lt_rx_data, lt_latency;
  logic [31:0] lt_counter, lt_throughput, lt_window_throughput;
  logic channel_up;
  int checks = 0, failures = 0;

  if (FULL_SIZE) begin : g_full
    pco_multi_fpga_top dut (.*,
      .osc_rst1(osc_rst), .osc_rst2(osc_rst), .gtx_rst1(gtx_rst), .gtx_rst2(gtx_rst),
      .gtx_clk1(gtx_clk), .gtx_clk2(gtx_clk));
  end else begin : g_small
    pco_multi_fpga_top #(.WINDOW(WINDOW)) dut (.*,
      .osc_rst1(osc_rst), .osc_rst2(osc_rst), .gtx_rst1(gtx_rst), .gtx_rst2(gtx_rst),
      .gtx_clk1(gtx_clk), .gtx_clk2(gtx_clk));
  end

  // ---- link models
  logic r12, r21, rlt, o12_v, o21_v;
  logic [15:0] o12_d, o21_d;
  aurora_link_model #(.W(16), .LAT(LAT)) u_l12 (
    .clk(gtx_clk), .rst(gtx_rst), .channel_up, .in_ready(r12),
    .in_valid(n1_tx_valid), .in_data({15'b0, n1_tx_ds}), .out_valid(o12_v), .out_data(o12_d));
  aurora_link_model #(.W(16), .LAT(LAT)) u_l21 (
    .clk(gtx_clk), .rst(gtx_rst), .channel_up, .in_ready(r21),
    .in_valid(n2_tx_valid), .in_data({15'b0, n2_tx_ds}), .out_valid(o21_v), .out_data(o21_d));
  aurora_link_model #(.W(16), .LAT(LAT)) u_llt (
    .clk(gtx_clk), .rst(gtx_rst), .channel_up, .in_ready(rlt),
    .in_valid(lt_tx_valid), .in_data(lt_tx_data), .out_valid(lt_rx_valid), .out_data(lt_rx_data));

  assign n1_tx_rd_en = r12 & ~n1_tx_emp;
  assign n2_tx_rd_en = r21 & ~n2_tx_emp;
  assign n2_rx_wr_en = o12_v;
  assign n2_rx_ds    = o12_d[0];
  assign n1_rx_wr_en = o21_v;
  assign n1_rx_ds    = o21_d[0];
  assign lt_tx_ready = rlt;

  // all clocks 10 units (200 MHz); edges of gtx_clk, osc_clk2 and osc_clk1
  // at 2, 3 and 5 units into each half period
  always begin
    #2 gtx_clk = ~gtx_clk;
    #1 osc_clk2 = ~osc_clk2;
    #2 osc_clk1 = ~osc_clk1;
  end

  localparam longint WATCHDOG = 64'(WINDOW) * 10 + 10_000_000;
  initial begin
    #(WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- mechanism counters
  int n_pos = 0, n_neg = 0, n_dead = 0, n_sign_upd = 0, n_full1 = 0, n_full2 = 0;
  int w12 = 0, w21 = 0, cyc = 0, first_spike = -1, rx_on1 = 0, rx_on2 = 0;
  logic [1:0] rx_d = '0;
  int on_t [4][$];
  int ring_on [3];
  logic [3:0] spk_d = '0;
  logic [2:0] ring_d = '0;

  always @(posedge osc_clk1) if (!osc_rst) begin
    cyc++;
    for (int k = 0; k < 4; k++) begin
      if (update[k] == UPD_POS) begin n_pos++; if (sign) n_sign_upd++; end
      if (update[k] == UPD_NEG) begin n_neg++; if (sign) n_sign_upd++; end
    end
    // spike arriving while the receiver sits in the dead band of Z
    if (spk[3] && update[0] == UPD_NONE) n_dead++;
    if (spk_rx[0] && !rx_d[0]) rx_on1++;
    if (spk_rx[1] && !rx_d[1]) rx_on2++;
    rx_d <= spk_rx;
    if (tx_full[0]) n_full1++;
    if (tx_full[1]) n_full2++;
    for (int k = 0; k < 4; k++)
      if (spk[k] && !spk_d[k]) begin
        on_t[k].push_back(cyc);
        if (first_spike < 0) first_spike = cyc;
      end
    for (int k = 0; k < 3; k++)
      if (ring_spk[k] && !ring_d[k]) ring_on[k] = cyc;
    spk_d  <= spk;
    ring_d <= ring_spk;
  end
  always @(posedge gtx_clk) if (!gtx_rst) begin
    if (n1_tx_valid) w12++;
    if (n2_tx_valid) w21++;
  end

  function automatic int ring_spread();
    int mx, mn;
    mx = ring_on[0]; mn = ring_on[0];
    for (int k = 1; k < 3; k++) begin
      if (ring_on[k] > mx) mx = ring_on[k];
      if (ring_on[k] < mn) mn = ring_on[k];
    end
    return mx - mn;
  endfunction

  // signed distance from the back-th last onset of Spk_1 to the nearest
  // onset of oscillator k
  function automatic int offset(int k, int back);
    int a, best;
    a = on_t[0][on_t[0].size() - 1 - back];
    best = PERIOD * 4;
    foreach (on_t[k][i])
      if ((on_t[k][i] - a) * (on_t[k][i] - a) < best * best) best = on_t[k][i] - a;
    return best;
  endfunction

  int off_ref [4];
  initial begin
    osc_rst = 1'b1; gtx_rst = 1'b1; lt_rst = 1'b1; sign = 1'b0; channel_up = 1'b0;
    for (int k = 0; k < 3; k++) ring_on[k] = 0;
    #100;
    osc_rst = 1'b0; gtx_rst = 1'b0;
    // links down: spikes pile up in the tx FIFOs until Full
    #(10 * 4 * PERIOD);
    check(n_full1 > 0, "FPGA-1 tx FIFO reached Full while the link was down");
    check(n_full2 > 0, "FPGA-2 tx FIFO reached Full while the link was down");
    channel_up = 1'b1;
    @(posedge gtx_clk); #1 lt_rst = 1'b0;
    // run the oscillator networks for 80 periods
    #(10 * 80 * PERIOD);
    $display("first spike at clock %0d (%0d ns at 200 MHz)", first_spike, first_spike * 5);
    check(w12 > 0 && w21 > 0, "spike words carried both ways");
    check(rx_on1 > 70 && rx_on2 > 70, "spikes rebuilt on both FPGAs");
    check(n_pos > 0, "positive updates happened");
    check(n_neg > 0, "negative updates happened");
    check(n_dead > 0, "spikes fell in the dead band");
    check(ring_spread() <= 16, "three-oscillator ring in phase");
    // four-oscillator ring over two FPGAs: every onset within the dead band
    // (16 clocks) plus one spike width (8) of Spk_1 for the last 10 periods;
    // the newest Spk_1 onset is skipped, its followers may not have fired yet
    for (int k = 1; k < 4; k++) off_ref[k] = offset(k, 1);
    for (int back = 1; back < 11; back++) begin
      for (int k = 1; k < 4; k++)
        check(offset(k, back) <= 24 && offset(k, back) >= -24,
              "four oscillators in phase over the link");
    end
    // time from which every later Spk_1 onset has all others within 24 clocks
    begin
      int last_bad;
      last_bad = -1;
      for (int back = 1; back < on_t[0].size() - 1; back++)
        for (int k = 1; k < 4; k++)
          if (offset(k, back) > 24 || offset(k, back) < -24)
            if (last_bad < 0) last_bad = back;
      if (last_bad >= 0)
        $display("four-oscillator ring in phase from clock %0d (%0d ns at 200 MHz)",
                 on_t[0][on_t[0].size() - last_bad], on_t[0][on_t[0].size() - last_bad] * 5);
      // links come up after 4 periods; allow 20 more to lock
      check(last_bad >= 0 && on_t[0][on_t[0].size() - last_bad] < 24 * PERIOD,
            "four-oscillator ring in phase within 20 periods of link-up");
    end
    $display("last onsets after Spk_1: Spk_2 %0d, Spk_3 %0d, Spk_4 %0d clocks",
             off_ref[1], off_ref[2], off_ref[3]);
    // period of Spk_1 while locked
    begin
      int p;
      p = on_t[0][on_t[0].size() - 1] - on_t[0][on_t[0].size() - 2];
      $display("locked period %0d clocks (free-running %0d)", p, PERIOD);
    end
    // throughput window
    wait (lt_done);
    #1;
    $display("window %0d clocks: %0d words received (%0d bits/s at 200 MHz), latency %0d",
             lt_counter, lt_window_throughput,
             longint'(lt_window_throughput) * 16 * 200_000_000 / WINDOW, lt_latency);
    check(lt_done, "throughput window completed");
    check(lt_latency == 16'(LAT), "latency counter equals the link latency");
    check(lt_window_throughput + 32'(LAT) + 4 >= 32'(WINDOW) && lt_window_throughput < 32'(WINDOW),
          "one word per clock over the window");
    // flip the coupling sign
    sign = 1'b1;
    #(10 * 8 * PERIOD);
    check(n_sign_upd > 0, "updates under sign = 1");
    $display("mechanisms: pos %0d neg %0d dead %0d full %0d/%0d words %0d/%0d sign %0d",
             n_pos, n_neg, n_dead, n_full1, n_full2, w12, w21, n_sign_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
