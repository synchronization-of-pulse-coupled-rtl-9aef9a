// Update circuit: turns a received spike into a phase update.
//
// While the incoming spike spk_j is high, the current sign of Z(phi) picks
// the update: zp gives a positive update (the oscillator will fire earlier,
// the "leading" case), zn a negative update (it fires later, the "lagging"
// case). Without a spike, or inside the dead band of Z, the code is
// UPD_NONE. Combinational; applied in every clock of the spike pulse.
// The inputs and output follow the source design; the gating is this
// design's choice.
module update_circuit
  import pco_pkg::*;
(
  input  logic    spk_j,
  input  logic    zp,
  input  logic    zn,
  output update_e update
);

  always_comb begin
    if (spk_j && zp)      update = UPD_POS;
    else if (spk_j && zn) update = UPD_NEG;
    else                  update = UPD_NONE;
  end

  // Z cannot be positive and negative at once.
  always_comb assert (!(zp && zn));

endmodule
