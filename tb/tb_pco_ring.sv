// Self-checking testbench for pco_ring: three oscillators in a rotary ring
// starting at phases 0, 60 and 120 of 256. Checks that every oscillator
// fires with the free-running period before coupling acts, that positive
// and negative updates both occur, that the ring ends in-phase (all three
// spike onsets within the dead band of one another, 16 clocks) and stays
// there, and reports when the first spike and synchrony happened.
module tb_pco_ring;
  import pco_pkg::*;

  localparam int unsigned N = 3, CNT_W = 8, SPK_W = 8, PERIOD = 256;

  logic clk = 1'b0, rst, sign;
  logic [N-1:0] spk;
  logic [N-1:0][CNT_W-1:0] phase;
  update_e update [N];
  int checks = 0, failures = 0;

  pco_ring #(.N(N), .CNT_W(CNT_W), .SPK_W(SPK_W), .INIT_PHASES('{0, 60, 120})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0, n_pos = 0, n_neg = 0, first_spike = -1, sync_at = -1;
  int last_on [N];
  logic [N-1:0] spk_d = '0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    for (int k = 0; k < N; k++) begin
      if (update[k] == UPD_POS) n_pos++;
      if (update[k] == UPD_NEG) n_neg++;
      if (spk[k] && !spk_d[k]) begin
        last_on[k] = cyc;
        if (first_spike < 0) first_spike = cyc;
      end
    end
    spk_d <= spk;
  end

  function automatic int spread();
    int mx, mn;
    mx = last_on[0]; mn = last_on[0];
    for (int k = 1; k < N; k++) begin
      if (last_on[k] > mx) mx = last_on[k];
      if (last_on[k] < mn) mn = last_on[k];
    end
    return mx - mn;
  endfunction

  initial begin
    rst = 1'b1; sign = 1'b0;
    for (int k = 0; k < N; k++) last_on[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // first spikes follow from the start phases: 256-120 = 136 clocks first
    repeat (PERIOD) @(posedge clk);
    check(first_spike == PERIOD - 120 + 1, "first spike time from the start phase");
    for (int per = 0; per < 60; per++) begin
      repeat (PERIOD) @(posedge clk);
      if (sync_at < 0 && spread() <= 16 && spread() >= 0) sync_at = cyc;
    end
    check(n_pos > 0, "positive updates occurred");
    check(n_neg > 0, "negative updates occurred");
    check(sync_at > 0, "ring synchronised");
    for (int per = 0; per < 10; per++) begin
      repeat (PERIOD) @(posedge clk);
      check(spread() <= 16, "ring stays in phase");
    end
    $display("first spike at clock %0d, in phase by clock %0d, pos %0d neg %0d",
             first_spike, sync_at, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
