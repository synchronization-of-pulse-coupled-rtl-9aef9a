// Self-checking testbench for async_fifo: two unrelated clocks, random
// writes and reads, a scoreboard queue for order and content, and phases
// that force the FIFO full (reader stopped) and empty (writer stopped).
// Checks that full only rises with 2^ADDR_W words stored, that no word is
// lost or duplicated, and that data follows RdEn by one read clock.
module tb_async_fifo;
  localparam int unsigned DATA_W = 8, ADDR_W = 4, DEPTH = 1 << ADDR_W;

  logic wclk = 1'b0, rclk = 1'b0, wrst, rrst;
  logic wr_en, rd_en, full, o_emp, o_valid;
  logic [DATA_W-1:0] i_ds, o_ds;
  int checks = 0, failures = 0;

  async_fifo #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] sb [$];
  int written = 0, read_n = 0, full_seen = 0, emp_seen = 0;
  int wmode = 0, rmode = 0;   // 0 random, 1 stop, 2 always
  logic [DATA_W-1:0] wval = '0;

  // writer
  always @(posedge wclk) begin
    if (!wrst) begin
      if (wr_en && !full) begin
        sb.push_back(i_ds);
        written++;
      end
      if (full) begin
        full_seen++;
        checks++;
        if (sb.size() < DEPTH) begin
          // full may be late, never early: it needs DEPTH unread words
          if (sb.size() + 2 < DEPTH) begin
            failures++; $display("FAIL full with %0d words", sb.size());
          end
        end
      end
    end
    #1;
    wr_en <= (wmode == 2) ? 1'b1 : (wmode == 1) ? 1'b0 : ($urandom_range(0, 1) == 1);
    if (wr_en && !full) wval = wval + 1'b1;
    i_ds <= wval;
  end

  // reader
  logic rd_acc;
  always @(posedge rclk) begin
    if (!rrst) begin
      if (o_valid) begin
        checks++;
        if (sb.size() == 0) begin failures++; $display("FAIL read from empty"); end
        else begin
          logic [DATA_W-1:0] e;
          e = sb.pop_front();
          if (o_ds != e) begin failures++; $display("FAIL data %0h exp %0h", o_ds, e); end
        end
        read_n++;
      end
      checks++;
      if (o_valid != rd_acc) begin failures++; $display("FAIL o_valid timing"); end
      rd_acc = rd_en && !o_emp;
      if (o_emp) emp_seen++;
    end
    #1;
    rd_en <= (rmode == 2) ? 1'b1 : (rmode == 1) ? 1'b0 : ($urandom_range(0, 2) != 0);
  end

  initial begin
    wrst = 1'b1; rrst = 1'b1; wr_en = 1'b0; rd_en = 1'b0; i_ds = '0; rd_acc = 1'b0;
    #100;
    wrst = 1'b0; rrst = 1'b0;
    wmode = 0; rmode = 0; #50000;
    wmode = 2; rmode = 1; #5000;     // fill
    checks++;
    if (!full) begin failures++; $display("FAIL not full after filling"); end
    if (sb.size() != DEPTH) begin failures++; $display("FAIL holds %0d", sb.size()); end
    wmode = 1; rmode = 2; #5000;     // drain
    checks++;
    if (!o_emp || sb.size() != 0) begin failures++; $display("FAIL not empty after draining"); end
    wmode = 2; rmode = 2; #50000;
    wmode = 1; rmode = 2; #5000;
    checks++;
    if (written != read_n || written < 1000) begin
      failures++; $display("FAIL written %0d read %0d", written, read_n);
    end
    $display("words %0d, clocks full %0d, clocks empty %0d", written, full_seen, emp_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
