// Pulse-coupled phase oscillators over a two-FPGA link: top level.
//
// Three independent parts stand side by side, as they would be loaded on
// the boards for the three experiments:
//  1. The four-oscillator ring split over two FPGAs. Node 1 (FPGA-1) holds
//     phi_4 -> phi_1, node 2 (FPGA-2) holds phi_2 -> phi_3; spikes of phi_1
//     travel FPGA-1 -> FPGA-2 and spikes of phi_3 travel back, each through
//     a tx FIFO, the GTX/Aurora channel and an rx FIFO. The GTX/Aurora cores
//     are not part of this RTL: the FIFO ports they would drive (n*_tx_*,
//     n*_rx_*) are top-level ports, in each node's GTX clock domain.
//  2. A ring of three oscillators inside one FPGA (ring_*).
//  3. The link test: an incremental 16-bit data generator (lt_tx_*) whose
//     words are sent over the link and looped back by the far FPGA, and a
//     meter (lt_rx_* in, lt_counter... out) counting clocks, received words
//     and the round-trip difference. It runs in gtx_clk1.
// spk[0..3] are Spk_1..Spk_4 and phase[0..3] phi_1..phi_4; spk_rx[0] is
// Spk_3 as rebuilt on FPGA-1 and spk_rx[1] Spk_1 as rebuilt on FPGA-2.
// Start phases (INIT1..INIT4, RING_INIT) are this design's choice.
module pco_multi_fpga_top
  import pco_pkg::*;
#(
  parameter int unsigned CNT_W     = 8,
  parameter int unsigned OMEGA     = 1,
  parameter int unsigned K_STEP    = 1,
  parameter int unsigned SPK_W     = 8,
  parameter int unsigned MID_W     = 3,
  parameter int unsigned FIFO_AW   = 4,
  parameter int unsigned INIT1     = 0,
  parameter int unsigned INIT2     = 90,
  parameter int unsigned INIT3     = 150,
  parameter int unsigned INIT4     = 40,
  parameter int unsigned RING_INIT [3] = '{0, 60, 120},
  parameter int unsigned WINDOW    = 200_000_000,
  parameter int unsigned LT_W      = 16
) (
  // ---- clocks and resets of the two FPGAs
  input  logic                    osc_clk1,
  input  logic                    osc_rst1,
  input  logic                    gtx_clk1,
  input  logic                    gtx_rst1,
  input  logic                    osc_clk2,
  input  logic                    osc_rst2,
  input  logic                    gtx_clk2,
  input  logic                    gtx_rst2,
  input  logic                    sign,
  // ---- node 1 <-> its GTX/Aurora channel (gtx_clk1)
  input  logic                    n1_tx_rd_en,
  output logic                    n1_tx_ds,
  output logic                    n1_tx_valid,
  output logic                    n1_tx_emp,
  input  logic                    n1_rx_wr_en,
  input  logic                    n1_rx_ds,
  output logic                    n1_rx_full,
  // ---- node 2 <-> its GTX/Aurora channel (gtx_clk2)
  input  logic                    n2_tx_rd_en,
  output logic                    n2_tx_ds,
  output logic                    n2_tx_valid,
  output logic                    n2_tx_emp,
  input  logic                    n2_rx_wr_en,
  input  logic                    n2_rx_ds,
  output logic                    n2_rx_full,
  // ---- observation of the four-oscillator ring
  output logic [3:0]              spk,
  output logic [3:0][CNT_W-1:0]   phase,
  output update_e                 update [4],
  output logic [1:0]              tx_full,
  output logic [1:0]              spk_rx,
  // ---- single-FPGA ring of three (osc_clk1)
  output logic [2:0]              ring_spk,
  output logic [2:0][CNT_W-1:0]   ring_phase,
  output update_e                 ring_update [3],
  // ---- link throughput/latency test (gtx_clk1)
  input  logic                    lt_rst,
  input  logic                    lt_tx_ready,
  output logic [LT_W-1:0]         lt_tx_data,
  output logic                    lt_tx_valid,
  input  logic                    lt_rx_valid,
  input  logic [LT_W-1:0]         lt_rx_data,
  output logic [31:0]             lt_counter,
  output logic [31:0]             lt_throughput,
  output logic [31:0]             lt_window_throughput,
  output logic                    lt_done,
  output logic [LT_W-1:0]         lt_latency
);

  // FPGA-1: phi_4 (A) -> phi_1 (B) -> link
  fpga_node #(
    .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W), .MID_W(MID_W),
    .INIT_A(INIT4), .INIT_B(INIT1), .FIFO_AW(FIFO_AW)
  ) u_node1 (
    .osc_clk(osc_clk1), .osc_rst(osc_rst1), .gtx_clk(gtx_clk1), .gtx_rst(gtx_rst1),
    .sign,
    .tx_rd_en(n1_tx_rd_en), .tx_ds(n1_tx_ds), .tx_valid(n1_tx_valid), .tx_emp(n1_tx_emp),
    .rx_wr_en(n1_rx_wr_en), .rx_ds(n1_rx_ds), .rx_full(n1_rx_full),
    .spk_a(spk[3]), .spk_b(spk[0]), .spk_rx(spk_rx[0]), .phase_a(phase[3]), .phase_b(phase[0]),
    .upd_a(update[3]), .upd_b(update[0]), .tx_full(tx_full[0])
  );

  // FPGA-2: link -> phi_2 (A) -> phi_3 (B) -> link
  fpga_node #(
    .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W), .MID_W(MID_W),
    .INIT_A(INIT2), .INIT_B(INIT3), .FIFO_AW(FIFO_AW)
  ) u_node2 (
    .osc_clk(osc_clk2), .osc_rst(osc_rst2), .gtx_clk(gtx_clk2), .gtx_rst(gtx_rst2),
    .sign,
    .tx_rd_en(n2_tx_rd_en), .tx_ds(n2_tx_ds), .tx_valid(n2_tx_valid), .tx_emp(n2_tx_emp),
    .rx_wr_en(n2_rx_wr_en), .rx_ds(n2_rx_ds), .rx_full(n2_rx_full),
    .spk_a(spk[1]), .spk_b(spk[2]), .spk_rx(spk_rx[1]), .phase_a(phase[1]), .phase_b(phase[2]),
    .upd_a(update[1]), .upd_b(update[2]), .tx_full(tx_full[1])
  );

  pco_ring #(
    .N(3), .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
    .MID_W(MID_W), .INIT_PHASES(RING_INIT)
  ) u_ring (
    .clk(osc_clk1), .rst(osc_rst1), .sign,
    .spk(ring_spk), .phase(ring_phase), .update(ring_update)
  );

  data_gen #(.DATA_W(LT_W)) u_gen (
    .clk(gtx_clk1), .rst(lt_rst), .tx_ready(lt_tx_ready),
    .tx_data(lt_tx_data), .tx_valid(lt_tx_valid)
  );

  link_monitor #(.WINDOW(WINDOW), .DATA_W(LT_W)) u_mon (
    .clk(gtx_clk1), .rst(lt_rst), .tx_data(lt_tx_data),
    .rx_valid(lt_rx_valid), .rx_data(lt_rx_data),
    .counter(lt_counter), .throughput(lt_throughput),
    .window_throughput(lt_window_throughput), .done(lt_done), .latency(lt_latency)
  );

endmodule
