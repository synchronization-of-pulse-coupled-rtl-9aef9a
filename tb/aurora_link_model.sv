// Behavioural model of one direction of a GTX/Aurora channel (not
// synthesizable intent; used only by testbenches).
//
// A word presented with in_valid appears LAT clocks later on out_valid /
// out_data, one word per clock, in order: the user-side view of a streaming
// serial link with a fixed latency of 20 user clocks (0.1 us at 200 MHz).
// channel_up low models a channel that is not yet (or no longer) up: the
// model then signals not ready, so the sender must hold its data.
module aurora_link_model #(
  parameter int unsigned W   = 16,
  parameter int unsigned LAT = 20
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         channel_up,
  output logic         in_ready,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [LAT-1:0]      vpipe;
  logic [W-1:0]        dpipe [LAT];

  assign in_ready  = channel_up;
  assign out_valid = vpipe[LAT-1];
  assign out_data  = dpipe[LAT-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      vpipe <= '0;
      for (int i = 0; i < LAT; i++) dpipe[i] <= '0;
    end else begin
      vpipe[0] <= in_valid;   // the sender only reads its FIFO while in_ready
      dpipe[0] <= in_data;
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        dpipe[i] <= dpipe[i-1];
      end
    end
  end

endmodule
