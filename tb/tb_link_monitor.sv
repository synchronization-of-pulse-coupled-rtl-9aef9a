// Self-checking testbench for link_monitor with a 1000-clock window.
// A data generator's words return after a fixed 20-clock delay, with gaps;
// the testbench counts the returned words itself and checks the clock
// counter, the running and windowed word counts, done, and the latency
// (difference of sent and returned data = 20 while words flow each clock).
module tb_link_monitor;
  localparam int unsigned WINDOW = 1000, LAT = 20;

  logic clk = 1'b0, rst;
  logic [15:0] tx_data, rx_data;
  logic rx_valid;
  logic [31:0] counter, throughput, window_throughput;
  logic done;
  logic [15:0] latency;
  int checks = 0, failures = 0;

  link_monitor #(.WINDOW(WINDOW), .DATA_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // delay line standing in for the link
  logic [15:0] dly_d [LAT];
  logic        dly_v [LAT];
  logic        send;
  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin dly_d[i] <= dly_d[i-1]; dly_v[i] <= dly_v[i-1]; end
    dly_d[0] <= tx_data; dly_v[0] <= send;
    if (send) tx_data <= tx_data + 1'b1;
  end
  assign rx_valid = dly_v[LAT-1];
  assign rx_data  = dly_d[LAT-1];

  int cyc, got, got_win;
  initial begin
    rst = 1'b1; send = 1'b0; tx_data = '0;
    for (int i = 0; i < LAT; i++) begin dly_v[i] = 1'b0; dly_d[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0; got = 0; got_win = 0;
    for (int i = 0; i < 3000; i++) begin
      send = (i < 300 || i > 600) ? 1'b1 : ($urandom_range(0, 1) == 1);
      @(posedge clk);
      cyc++;
      if (rx_valid) got++;
      if (cyc == WINDOW) got_win = got;
      #1;
      check(counter == 32'(cyc), "clock counter");
      check(throughput == 32'(got), "received word count");
      check(done == (cyc >= WINDOW), "done at the end of the window");
      if (cyc >= WINDOW) check(window_throughput == 32'(got_win), "window throughput");
      if (i > 2000) check(latency == 16'(LAT), "latency while streaming");
    end
    $display("window: %0d of %0d clocks carried a word", got_win, WINDOW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
