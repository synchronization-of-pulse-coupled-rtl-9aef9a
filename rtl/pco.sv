// Pulse-coupled phase oscillator (one network node).
//
// Oscillator circuit, function generator and update circuit wired as in the
// source design: the counter decode (c_msb, c_mid0, c_mid1) shapes Z(phi),
// the update circuit combines Z with the received spike spk_j, and the
// resulting update code steers the phase counter in the next clock edge.
// spk_i is the oscillator's spike (oSpike); o_to_fifo is the matching
// write enable for a FIFO toward another FPGA, gated by i_enable (the
// inverse of that FIFO's Full flag).
// Timing: a spike arriving in clock t changes the phase at the edge ending
// clock t; spk_i rises the clock after the phase crosses its threshold.
module pco
  import pco_pkg::*;
#(
  parameter int unsigned CNT_W      = 8,
  parameter int unsigned OMEGA      = 1,
  parameter int unsigned K_STEP     = 1,
  parameter int unsigned SPK_W      = 8,
  parameter int unsigned MID_W      = 3,
  parameter int unsigned INIT_PHASE = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sign,
  input  logic             spk_j,
  input  logic             i_enable,
  output logic             spk_i,
  output logic             o_to_fifo,
  output logic [CNT_W-1:0] phase,
  output update_e          update
);

  logic c_msb, c_mid0, c_mid1;
  logic zp, zn;

  osc_circuit #(
    .CNT_W(CNT_W), .OMEGA(OMEGA), .K_STEP(K_STEP), .SPK_W(SPK_W),
    .MID_W(MID_W), .INIT_PHASE(INIT_PHASE)
  ) u_osc (
    .clk, .rst, .update, .i_enable,
    .spk_i, .o_to_fifo, .c_msb, .c_mid0, .c_mid1, .phase
  );

  func_gen u_fgen (
    .sign, .c_msb, .c_mid0, .c_mid1, .zp, .zn
  );

  update_circuit u_upd (
    .spk_j, .zp, .zn, .update
  );

endmodule
