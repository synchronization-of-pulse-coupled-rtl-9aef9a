// Dual-clock FIFO between the oscillator clock and the GTX user clock.
//
// Write side (wclk): a word on i_ds is stored when wr_en is high and the
// FIFO is not full; full is the Full flag the oscillator sees (its iEnable
// is the inverse). Read side (rclk): when rd_en is high and o_emp is low the
// oldest word is read; it appears on o_ds the next clock, marked by o_valid
// (standard, not first-word-fall-through, read). Depth is 2^ADDR_W.
// Pointers are Gray-coded and cross the clock boundary through two-flop
// synchronisers, so full and o_emp are conservative: they may stay set a
// few clocks after the other side has moved, never the reverse.
// The port set (iDS, WrEn, Full, RdEn, oDS, oEmp) follows the source design;
// depth, width, the Gray-pointer method and o_valid are this design's
// choices.
module async_fifo #(
  parameter int unsigned DATA_W = 1,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              wclk,
  input  logic              wrst,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] i_ds,
  output logic              full,
  input  logic              rclk,
  input  logic              rrst,
  input  logic              rd_en,
  output logic [DATA_W-1:0] o_ds,
  output logic              o_emp,
  output logic              o_valid
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] wq1_rgray, wq2_rgray;  // read pointer in the write domain
  logic [ADDR_W:0] rq1_wgray, rq2_wgray;  // write pointer in the read domain
  logic [ADDR_W:0] wbin_next, rbin_next;
  logic            do_wr, do_rd;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  assign do_wr     = wr_en & ~full;
  assign wbin_next = wbin + (ADDR_W+1)'(do_wr);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_next;
      wgray     <= bin2gray(wbin_next);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  always_ff @(posedge wclk)
    if (do_wr) mem[wbin[ADDR_W-1:0]] <= i_ds;

  // Full when the write pointer is one lap ahead of the read pointer:
  // in Gray code the two top bits differ and the rest are equal.
  assign full = (wgray == {~wq2_rgray[ADDR_W:ADDR_W-1], wq2_rgray[ADDR_W-2:0]});

  // ---------------- read domain ----------------
  assign do_rd     = rd_en & ~o_emp;
  assign rbin_next = rbin + (ADDR_W+1)'(do_rd);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
      o_ds      <= '0;
      o_valid   <= 1'b0;
    end else begin
      rbin      <= rbin_next;
      rgray     <= bin2gray(rbin_next);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      o_valid   <= do_rd;
      if (do_rd) o_ds <= mem[rbin[ADDR_W-1:0]];
    end
  end

  assign o_emp = (rgray == rq2_wgray);

  initial assert (ADDR_W >= 2) else $error("ADDR_W must be at least 2");

endmodule
