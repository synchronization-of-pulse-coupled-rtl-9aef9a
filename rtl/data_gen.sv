// Incremental data generator for the link throughput test.
//
// Streams a DATA_W-bit counter: tx_data is valid every clock after reset and
// steps by one each clock the link accepts it (tx_valid & tx_ready). The
// receiver can then count the words that arrive and, by subtracting the
// received value from the current one, measure the link latency in words.
// The 16-bit counter follows the source design; the valid/ready handshake is
// this design's choice.
module data_gen #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_ready,
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_data  <= '0;
      tx_valid <= 1'b0;
    end else begin
      tx_valid <= 1'b1;
      if (tx_valid && tx_ready) tx_data <= tx_data + 1'b1;
    end
  end

endmodule
