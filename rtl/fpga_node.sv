// Logic of one FPGA in the two-FPGA oscillator network.
//
// Each FPGA holds a chain of two oscillators between a receive FIFO and a
// transmit FIFO:
//   GTX -> rx FIFO -> oscillator A -> spk_a -> oscillator B -> tx FIFO -> GTX
// On FPGA-1 oscillator A is phi_4 and B is phi_1; on FPGA-2 A is phi_2 and
// B is phi_3, so the two nodes together close the ring 1->2->3->4->1.
// Transmit: every clock that spk_b is high, oscillator B writes a 1 into
// the tx FIFO (oToFIFO -> WrEn, oSpike -> iDS), unless the FIFO is full
// (Full -> not iEnable). The GTX/Aurora side reads it with tx_rd_en and gets
// tx_ds one gtx_clk later with tx_valid.
// Receive: the GTX/Aurora side writes received spike words with
// rx_wr_en/rx_ds in gtx_clk. A word read as 1 is one clock of the spike
// that drives oscillator A, so a spike of SPK_W clocks is rebuilt with its
// width if its words are read back to back. Words arrive with the jitter of
// two clock crossings, so the reader acts as a small jitter buffer: once the
// FIFO turns non-empty it waits RX_HOLD oscillator clocks, letting a few
// words collect, then reads one word per clock until the FIFO is empty.
// This adds RX_HOLD clocks to the spike delay.
// spk_rx is the rebuilt received spike, the input of oscillator A.
// The chain and the FIFO channels follow the source design; the receive
// jitter buffer is this design's choice.
module fpga_node #(
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned OMEGA   = 1,
  parameter int unsigned K_STEP  = 1,
  parameter int unsigned SPK_W   = 8,
  parameter int unsigned MID_W   = 3,
  parameter int unsigned INIT_A  = 0,
  parameter int unsigned INIT_B  = 0,
  parameter int unsigned FIFO_AW = 4,
  parameter int unsigned RX_HOLD = 4
) (
  input  logic             osc_clk,
  input  logic             osc_rst,
  input  logic             gtx_clk,
  input  logic             gtx_rst,
  input  logic             sign,
  // transmit FIFO, read side (GTX clock)
  input  logic             tx_rd_en,
  output logic             tx_ds,
  output logic             tx_valid,
  output logic             tx_emp,
  // receive FIFO, write side (GTX clock)
  input  logic             rx_wr_en,
  input  logic             rx_ds,
  output logic             rx_full,
  // observation
  output logic             spk_a,
  output logic             spk_b,
  output logic             spk_rx,
  output logic [CNT_W-1:0] phase_a,
  output logic [CNT_W-1:0] phase_b,
  output pco_pkg::update_e upd_a,
  output pco_pkg::update_e upd_b,
  output logic             tx_full
);

  logic to_fifo_b, full_b;
  logic rx_emp, rx_rd_ds, rx_rd_valid, spk_in;
  logic to_fifo_a_unused;

  localparam int unsigned HW = $clog2(RX_HOLD + 1);
  logic          rx_reading;
  logic [HW-1:0] rx_hold_cnt;

  // jitter buffer: hold off reading for RX_HOLD clocks after non-empty
  always_ff @(posedge osc_clk) begin
    if (osc_rst) begin
      rx_reading  <= 1'b0;
      rx_hold_cnt <= '0;
    end else if (!rx_reading) begin
      if (rx_emp) begin
        rx_hold_cnt <= '0;
      end else if (rx_hold_cnt == HW'(RX_HOLD)) begin
        rx_reading  <= 1'b1;
      end else begin
        rx_hold_cnt <= rx_hold_cnt + 1'b1;
      end
    end else if (rx_emp) begin
      rx_reading  <= 1'b0;
      rx_hold_cnt <= '0;
    end
  end

  // receive FIFO: GTX clock -> oscillator clock
  async_fifo #(.DATA_W(1), .ADDR_W(FIFO_AW)) u_rx_fifo (
    .wclk(gtx_clk), .wrst(gtx_rst), .wr_en(rx_wr_en), .i_ds(rx_ds), .full(rx_full),
    .rclk(osc_clk), .rrst(osc_rst), .rd_en(rx_reading & ~rx_emp),
    .o_ds(rx_rd_ds), .o_emp(rx_emp), .o_valid(rx_rd_valid)
  );

  assign spk_in = rx_rd_valid & rx_rd_ds;
  assign spk_rx = spk_in;

  pco #(
    .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
    .MID_W(MID_W), .INIT_PHASE(INIT_A)
  ) u_osc_a (
    .clk(osc_clk), .rst(osc_rst), .sign, .spk_j(spk_in), .i_enable(1'b1),
    .spk_i(spk_a), .o_to_fifo(to_fifo_a_unused), .phase(phase_a), .update(upd_a)
  );

  pco #(
    .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
    .MID_W(MID_W), .INIT_PHASE(INIT_B)
  ) u_osc_b (
    .clk(osc_clk), .rst(osc_rst), .sign, .spk_j(spk_a), .i_enable(~full_b),
    .spk_i(spk_b), .o_to_fifo(to_fifo_b), .phase(phase_b), .update(upd_b)
  );

  assign tx_full = full_b;

  // transmit FIFO: oscillator clock -> GTX clock
  async_fifo #(.DATA_W(1), .ADDR_W(FIFO_AW)) u_tx_fifo (
    .wclk(osc_clk), .wrst(osc_rst), .wr_en(to_fifo_b), .i_ds(spk_b), .full(full_b),
    .rclk(gtx_clk), .rrst(gtx_rst), .rd_en(tx_rd_en),
    .o_ds(tx_ds), .o_emp(tx_emp), .o_valid(tx_valid)
  );

endmodule
