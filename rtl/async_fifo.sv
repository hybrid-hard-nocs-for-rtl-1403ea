// async_fifo: dual-clock FIFO that carries a core-port lane across the
// boundary between the NoC clock and the FPGA core clock.
//
// Classic Gray-code design: each side keeps a binary pointer one bit wider
// than the address, sends its Gray-coded form through a two-flop synchronizer
// to the other side, and compares it there for `wr_full` or `rd_empty`.
// DEPTH must be a power of two. The read side is first-word-fall-through:
// `rd_data` shows the oldest entry while `rd_empty` is low, and `rd_en`
// removes it on the next rclk edge. The write side also exposes the
// synchronized read pointer in binary (`wr_rd_ptr`), so a writer can tell
// how many entries the reader has freed (the read core port turns that into
// credits for the router).
//
// The document asks for a FIFO per lane for clock-domain synchronization; the
// Gray-code structure and the two-flop synchronizers are this design's.
module async_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  output logic [AW:0]  wr_rd_ptr,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_s1, rgray_s2, wgray_s1, wgray_s2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write side ----
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  assign wr_full   = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wr_rd_ptr = gray2bin(rgray_s2);

  // ---- read side ----
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign rd_empty = (rgray == wgray_s2);
  assign rd_data  = mem[rbin[AW-1:0]];

endmodule
