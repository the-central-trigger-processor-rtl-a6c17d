// sync_fifo: single-clock FIFO, used as the small FIFO inside each Core FPGA.
//
// DEPTH words of W bits are kept in a memory addressed by a read and a write pointer
// that wrap at DEPTH (which need not be a power of two) and a word count. wr adds
// wdata at the edge unless the FIFO is full, in which case the word is dropped and
// the sticky overflow flag is set. rd takes the oldest word; it appears on rdata in
// the next cycle and stays there until the next read. Reading an empty FIFO does
// nothing. The 12k depth follows the original module; the rest is this design's.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 12288,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count,
  output logic         overflow
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
    if (do_rd) rdata <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr && full) overflow <= 1'b1;
    end
  end

endmodule
