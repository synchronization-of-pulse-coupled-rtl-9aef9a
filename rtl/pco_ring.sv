// Rotary network of N pulse-coupled oscillators inside one FPGA.
//
// Oscillator k (k = 0..N-1) receives the spike of oscillator k-1 and
// oscillator 0 that of oscillator N-1: a unidirectional ring
// 1 -> 2 -> ... -> N -> 1. With Z = -sin (sign = 0) the ring pulls all
// oscillators into in-phase firing. INIT_PHASES gives each oscillator's
// reset phase so that they start apart. The ring of three is the source
// design's single-FPGA demonstration; the start phases are this design's
// choice. Spikes leave on spk, phases on phase, update codes on update.
module pco_ring
  import pco_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned OMEGA  = 1,
  parameter int unsigned K_STEP = 1,
  parameter int unsigned SPK_W  = 8,
  parameter int unsigned MID_W  = 3,
  parameter int unsigned INIT_PHASES [N] = '{default: 0}
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sign,
  output logic [N-1:0]          spk,
  output logic [N-1:0][CNT_W-1:0] phase,
  output update_e               update [N]
);

  logic [N-1:0] to_fifo_unused;

  for (genvar k = 0; k < N; k++) begin : g_osc
    pco #(
      .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
      .MID_W(MID_W), .INIT_PHASE(INIT_PHASES[k])
    ) u_osc (
      .clk, .rst, .sign,
      .spk_j(spk[(k + N - 1) % N]),
      .i_enable(1'b1),
      .spk_i(spk[k]), .o_to_fifo(to_fifo_unused[k]),
      .phase(phase[k]), .update(update[k])
    );
  end

endmodule
