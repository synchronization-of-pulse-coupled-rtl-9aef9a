// Throughput and latency meter for the multi-FPGA link.
//
// counter counts clocks since reset. throughput counts the valid words that
// came back over the link. When counter reaches WINDOW (one second at
// 200 MHz by default) the count of words received in that window is held in
// window_throughput and done is raised; data rate = DATA_W * window_throughput
// per window. latency is the difference between the generator's current
// value and the value of the word just received (modulo 2^DATA_W), i.e. the
// round-trip delay in words while the generator sends one word per clock.
// Both counters saturate at 2^32-1. The measured quantities follow the source
// design; counter widths and the registered outputs are this design's choices.
module link_monitor #(
  parameter int unsigned WINDOW = 200_000_000,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] tx_data,
  input  logic              rx_valid,
  input  logic [DATA_W-1:0] rx_data,
  output logic [31:0]       counter,
  output logic [31:0]       throughput,
  output logic [31:0]       window_throughput,
  output logic              done,
  output logic [DATA_W-1:0] latency
);

  always_ff @(posedge clk) begin
    if (rst) begin
      counter           <= '0;
      throughput        <= '0;
      window_throughput <= '0;
      done              <= 1'b0;
      latency           <= '0;
    end else begin
      if (counter != '1) counter <= counter + 1'b1;
      if (rx_valid) begin
        if (throughput != '1) throughput <= throughput + 1'b1;
        latency <= tx_data - rx_data;
      end
      // the word arriving in clock WINDOW-1 still counts
      if (!done && counter == 32'(WINDOW - 1)) begin
        window_throughput <= throughput + 32'(rx_valid);
        done              <= 1'b1;
      end
    end
  end

endmodule
