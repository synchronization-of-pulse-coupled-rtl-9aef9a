// Full-size run of pco_multi_fpga_top: every parameter of the top at its
// default, so the throughput window is one second of 200 MHz clocks
// (200,000,000 cycles). Same stimulus and checks as tb_pco_multi_fpga_top.
module tb_pco_full_size;
  tb_pco_system #(.WINDOW(200_000_000), .FULL_SIZE(1'b1)) u_sys ();
endmodule
