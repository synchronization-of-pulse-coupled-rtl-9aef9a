// Oscillator circuit of one pulse-coupled phase oscillator.
//
// A CNT_W-bit counter holds the phase phi. Every clock (one time step of the
// discretised Winfree model) it adds OMEGA, plus or minus K_STEP when the
// update code asks for a positive or negative update. When the sum reaches
// the threshold 2^CNT_W the phase is reset to 0 and the spike generator
// raises spk_i for SPK_W clocks, starting the clock after the wrap.
// o_to_fifo (the FIFO write enable) is high together with spk_i while the
// FIFO signals that it can accept data (i_enable).
//
// The counter also provides the three signals that shape Z(phi):
//   c_msb  : MSB of the phase (phase in the second half of the period)
//   c_mid0 : OR of the MID_W bits below the MSB  (past the first
//            1/2^MID_W of the current half period)
//   c_mid1 : AND of the same bits (in the last 1/2^MID_W of the half period)
// The existence and names of these signals, the 2-bit update input, the
// counter and the spike generator follow the source design; which bits feed
// cMid0/cMid1, the update step sizes, the spike width and the synchronous
// reset to INIT_PHASE are this design's choices.
module osc_circuit
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
  input  update_e          update,
  input  logic             i_enable,
  output logic             spk_i,
  output logic             o_to_fifo,
  output logic             c_msb,
  output logic             c_mid0,
  output logic             c_mid1,
  output logic [CNT_W-1:0] phase
);

  localparam int unsigned SW = (SPK_W > 1) ? $clog2(SPK_W + 1) : 1;

  logic [CNT_W:0]  next_sum;   // one extra bit to detect the threshold
  logic            wrap;
  logic [SW-1:0]   spk_cnt;    // spike clocks still to emit

  // Phase increment for this clock, Eq. (3) with one input.
  always_comb begin
    unique case (update)
      UPD_POS: next_sum = {1'b0, phase} + (CNT_W+1)'(OMEGA + K_STEP);
      UPD_NEG: next_sum = {1'b0, phase} + (CNT_W+1)'(OMEGA - K_STEP);
      default: next_sum = {1'b0, phase} + (CNT_W+1)'(OMEGA);
    endcase
  end

  assign wrap = next_sum[CNT_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= CNT_W'(INIT_PHASE);
      spk_cnt <= '0;
    end else begin
      phase <= wrap ? '0 : next_sum[CNT_W-1:0];
      if (wrap)
        spk_cnt <= SW'(SPK_W);
      else if (spk_cnt != '0)
        spk_cnt <= spk_cnt - 1'b1;
    end
  end

  assign spk_i     = (spk_cnt != '0);
  assign o_to_fifo = spk_i & i_enable;

  assign c_msb  = phase[CNT_W-1];
  assign c_mid0 = |phase[CNT_W-2 -: MID_W];
  assign c_mid1 = &phase[CNT_W-2 -: MID_W];

  initial begin
    assert (K_STEP <= OMEGA) else $error("K_STEP must not exceed OMEGA");
    assert (MID_W + 1 <= CNT_W) else $error("MID_W too large for CNT_W");
  end

endmodule
