// End-to-end testbench for pco_multi_fpga_top with its default parameters
// except a 50,000-clock throughput window (1 s = 200,000,000 clocks in the
// full-size run, tb_pco_full_size).
// The GTX/Aurora channels are three link models of 20 user clocks each:
// FPGA-1 -> FPGA-2 carrying Spk_1, FPGA-2 -> FPGA-1 carrying Spk_3, and the
// throughput-test loop (generator -> link -> loop-back -> meter).
// All clocks are 200 MHz (10 time units) with different phases.
// Sequence: links down for 4 oscillator periods (tx FIFOs fill, Full stops
// spike writes), links up, the four-oscillator ring and the three-oscillator
// ring run until they lock, the throughput window completes, and finally the
// coupling sign is flipped for a few periods.
// Mechanisms counted (each must occur): positive updates, negative updates,
// spikes in the dead band, spike words carried each way and rebuilt on
// both FPGAs, Full on each tx
// FIFO, updates under sign = 1, completed throughput window.
module tb_pco_multi_fpga_top;
  tb_pco_system #(.WINDOW(50_000), .FULL_SIZE(1'b0)) u_sys ();
endmodule
