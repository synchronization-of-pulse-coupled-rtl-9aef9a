// Self-checking testbench for fpga_node. The node's transmit FIFO is looped
// back into its own receive FIFO through a 20-clock link model, so the two
// oscillators form a ring A -> B -> link -> A across both FIFOs and both
// clock domains (oscillator clock 10 units, GTX clock 9 units).
// Checks: every spike clock written to the tx FIFO arrives at oscillator A;
// received spikes keep their SPK_W-clock width; the delay from a spike of B
// to the rebuilt spike at A is the link latency plus the FIFO crossing;
// while the link is down the tx FIFO fills, Full drops iEnable and spike
// clocks are not written; after start-up the two oscillators lock.
module tb_fpga_node;
  import pco_pkg::*;

  localparam int unsigned CNT_W = 8, SPK_W = 8, LAT = 20, PERIOD = 256;

  logic osc_clk = 1'b0, gtx_clk = 1'b0, osc_rst, gtx_rst;
  logic tx_rd_en, tx_ds, tx_valid, tx_emp, rx_wr_en, rx_ds, rx_full, tx_full;
  logic spk_a, spk_b, spk_rx;
  logic [CNT_W-1:0] phase_a, phase_b;
  update_e upd_a, upd_b;
  logic channel_up;
  logic link_ready, link_out_valid;
  logic [15:0] link_out_data;
  int checks = 0, failures = 0;

  fpga_node #(.CNT_W(CNT_W), .SPK_W(SPK_W), .INIT_A(0), .INIT_B(130)) dut (
    .osc_clk, .osc_rst, .gtx_clk, .gtx_rst, .sign(1'b0),
    .tx_rd_en, .tx_ds, .tx_valid, .tx_emp, .rx_wr_en, .rx_ds, .rx_full,
    .spk_a, .spk_b, .spk_rx, .phase_a, .phase_b, .upd_a, .upd_b, .tx_full
  );

  aurora_link_model #(.W(16), .LAT(LAT)) u_link (
    .clk(gtx_clk), .rst(gtx_rst), .channel_up, .in_ready(link_ready),
    .in_valid(tx_valid), .in_data({15'b0, tx_ds}),
    .out_valid(link_out_valid), .out_data(link_out_data)
  );

  assign tx_rd_en = link_ready & ~tx_emp;
  assign rx_wr_en = link_out_valid;
  assign rx_ds    = link_out_data[0];

  always #5 osc_clk = ~osc_clk;
  always #4.5 gtx_clk = ~gtx_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // counters in the oscillator domain
  int b_clocks = 0, b_written = 0, b_dropped = 0, a_in_clocks = 0, full_clocks = 0;
  int in_width = 0, pulses_in = 0, bad_width = 0;
  int b_onset_t [$];
  int delays [$];
  logic spk_b_d = 1'b0, spk_in_d = 1'b0;
  logic spk_a_d = 1'b0;
  int t_a [$], t_b [$];
  int cyc = 0;
  bit measure_width = 1'b0;

  int link_words = 0;
  always @(posedge gtx_clk) if (!gtx_rst && tx_valid) link_words++;

  always @(posedge osc_clk) if (!osc_rst) begin
    cyc++;
    if (spk_b) begin
      b_clocks++;
      if (!tx_full) b_written++; else b_dropped++;
    end
    if (tx_full) full_clocks++;
    if (spk_rx) begin a_in_clocks++; in_width++; end
    if (spk_in_d && !spk_rx) begin
      pulses_in++;
      if (measure_width && in_width != SPK_W) begin
        bad_width++;
        $display("received spike of %0d clocks at clock %0d", in_width, cyc);
      end
      in_width = 0;
    end
    if (spk_b && !spk_b_d) b_onset_t.push_back(cyc);
    if (spk_rx && !spk_in_d && b_onset_t.size() > 0) delays.push_back(cyc - b_onset_t.pop_front());
    if (spk_a && !spk_a_d) t_a.push_back(cyc);
    if (spk_b && !spk_b_d) t_b.push_back(cyc);
    spk_b_d  <= spk_b;
    spk_in_d <= spk_rx;
    spk_a_d  <= spk_a;
  end

  int d_a, d_b;
  initial begin
    osc_rst = 1'b1; gtx_rst = 1'b1; channel_up = 1'b0;
    #100;
    osc_rst = 1'b0; gtx_rst = 1'b0;
    // link down for three periods: the tx FIFO must fill up
    #(10 * 3 * PERIOD);
    check(full_clocks > 0, "tx FIFO reached Full while the link was down");
    check(b_dropped > 0, "spike clocks not written while Full");
    check(b_written >= 16 && b_written <= 18, "tx FIFO held its depth of words");
    channel_up = 1'b1;
    #(10 * 2 * PERIOD);
    b_onset_t.delete(); delays.delete();
    measure_width = 1'b1;
    #(10 * 40 * PERIOD);
    measure_width = 1'b0;
    channel_up = 1'b0;   // stop sending new words, let the pipe drain
    #(10 * 2 * PERIOD);
    $display("spike clocks written %0d dropped %0d, received at A %0d, full clocks %0d",
             b_written, b_dropped, a_in_clocks, full_clocks);
    check(b_written > 40 * SPK_W - 2 * SPK_W, "spikes were sent");
    check(a_in_clocks == link_words, "every word sent over the link arrived as a spike clock");
    check(b_written - link_words >= 0 && b_written - link_words <= 16, "words not sent are still in the tx FIFO");
    check(bad_width == 0, "received spikes keep their width");
    foreach (delays[i]) begin
      check(delays[i] >= LAT && delays[i] <= LAT + 16, "link + FIFO delay");
      if (i == 0) $display("spike delay B -> A input: %0d oscillator clocks", delays[i]);
    end
    // lock: during the last 10 periods of sending the A-B offset is constant
    d_a = t_a.size(); d_b = t_b.size();
    check(d_a > 30 && d_b > 30, "both oscillators fire");
    begin
      int off0, offk, ia, ib;
      ia = d_a - 12; ib = d_b - 12;
      off0 = (t_b[ib] - t_a[ia] + 10 * PERIOD) % PERIOD;
      for (int k = 1; k < 8; k++) begin
        offk = (t_b[ib - k] - t_a[ia - k] + 10 * PERIOD) % PERIOD;
        check((offk - off0) <= 2 && (off0 - offk) <= 2, "A and B locked");
      end
      $display("locked offset B after A: %0d clocks", off0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
