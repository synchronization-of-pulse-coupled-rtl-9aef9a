// Self-checking testbench for update_circuit: all legal combinations of the
// received spike and the Z flags, against the expected update code.
module tb_update_circuit;
  import pco_pkg::*;
  logic spk_j, zp, zn;
  update_e update;
  int checks = 0, failures = 0;

  update_circuit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        update_e exp;
        logic [2:0] vec;
        vec = 3'(v);
        if (vec[1] && vec[0]) continue;
        {spk_j, zp, zn} = vec;
        #1;
        exp = !spk_j ? UPD_NONE : zp ? UPD_POS : zn ? UPD_NEG : UPD_NONE;
        checks++;
        if (update != exp) begin
          failures++;
          $display("FAIL spk=%b zp=%b zn=%b update=%b exp=%b", spk_j, zp, zn, update, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
