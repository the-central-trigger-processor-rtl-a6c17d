// idt_fifo_model: behavioural model of the external 131,072 x 40 synchronous FIFO
// that each Core FPGA fills and the VME interface empties.
//
// Both ports run on the bunch clock here. A low wen_n at a rising edge stores d
// unless the FIFO is full; a low ren_n at a rising edge moves the oldest word to q
// (standard, not first-word-fall-through, mode) unless it is empty. The flags are
// derived from the word count after the edge: ef_n low when empty, ff_n low when
// full, paf_n low when at most PAF_OFFSET words are free. It also counts words
// written into a full FIFO (lost) so a testbench can check that none were.
module idt_fifo_model #(
  parameter int unsigned W          = 40,
  parameter int unsigned DEPTH      = 131072,
  parameter int unsigned PAF_OFFSET = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wen_n,
  input  logic [W-1:0] d,
  output logic         ff_n,
  output logic         paf_n,
  input  logic         ren_n,
  output logic [W-1:0] q,
  output logic         ef_n,
  output int unsigned  count,
  output int unsigned  lost
);
  logic [W-1:0] mem [DEPTH];
  int unsigned  wp, rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= 0;
      rp    <= 0;
      count <= 0;
      lost  <= 0;
      q     <= '0;
    end else begin
      automatic bit do_w = !wen_n && count < DEPTH;
      automatic bit do_r = !ren_n && count > 0;
      if (!wen_n && count >= DEPTH) lost <= lost + 1;
      if (do_w) begin
        mem[wp] <= d;
        wp <= (wp == DEPTH - 1) ? 0 : wp + 1;
      end
      if (do_r) begin
        q  <= mem[rp];
        rp <= (rp == DEPTH - 1) ? 0 : rp + 1;
      end
      count <= count + (do_w ? 1 : 0) - (do_r ? 1 : 0);
    end
  end

  assign ef_n  = (count != 0);
  assign ff_n  = (count < DEPTH);
  assign paf_n = (count + PAF_OFFSET < DEPTH);

endmodule
