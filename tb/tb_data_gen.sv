// Self-checking testbench for data_gen: under random ready, the data must
// step by exactly one per accepted word and hold while not accepted, and
// wrap at 2^16.
module tb_data_gen;
  logic clk = 1'b0, rst, tx_ready, tx_valid;
  logic [15:0] tx_data;
  int checks = 0, failures = 0;

  data_gen #(.DATA_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expv, wraps = 0;
  initial begin
    rst = 1'b1; tx_ready = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    checks++; if (!tx_valid || tx_data != 16'd0) failures++;
    expv = 0;
    for (int i = 0; i < 80000; i++) begin
      tx_ready = (i < 70000) ? ($urandom_range(0, 7) != 0) : 1'b1;
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        expv = (expv + 1) % 65536;
        if (expv == 0) wraps++;
      end
      #1;
      checks++;
      if (tx_data != 16'(expv) || !tx_valid) begin
        failures++;
        if (failures < 5) $display("FAIL data %0d exp %0d", tx_data, expv);
      end
    end
    checks++; if (wraps < 1) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
