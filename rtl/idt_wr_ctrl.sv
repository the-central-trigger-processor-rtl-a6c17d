// idt_wr_ctrl: moves words from the Core FIFO into the external FIFO and drives the
// external FIFO's write enable.
//
// This is the second registered-output state machine of the readout. In STREAM it
// pops the Core FIFO every cycle (40 Mwords/s) while the external FIFO reports more
// than its almost-full offset of free words. Because a popped word reaches the
// external FIFO two cycles later, its flags answer one cycle after that and the
// state follows them a cycle later, up to four words are in flight; near full (THROTTLE) it therefore pops only when its
// last two cycles popped nothing and the full flag is clear, so no word is ever
// written into a full FIFO. The external FIFO samples idt_wen_n and idt_d on the same
// bunch clock. The two registered-output machines and the 40 MHz write rate follow
// the original module; the flow-control rule is this design's. The external
// FIFO's almost-full offset must be at least 4.
//
// The external FIFO is 40 bits wide; the 32-bit words go to bits 31..0 and bits
// 39..32 are always written as 0 (spare).
//
// Timing: a pop at edge k drives idt_wen_n low with the word from edge k+1 to k+2.
module idt_wr_ctrl #(
  parameter int unsigned W     = 32,
  parameter int unsigned IDT_W = 40
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             fifo_empty,
  output logic             fifo_rd,
  input  logic [W-1:0]     fifo_rdata,   // valid the cycle after fifo_rd
  input  logic             idt_ff_n,     // external FIFO full (active low)
  input  logic             idt_paf_n,    // external FIFO almost full (active low)
  output logic             idt_wen_n,
  output logic [IDT_W-1:0] idt_d
);
  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_THROTTLE} state_e;
  state_e state, state_nx;

  logic pop_q1, pop_q2;   // pops one and two cycles ago

  always_comb begin
    unique case (state)
      S_IDLE:     fifo_rd = 1'b0;
      S_STREAM:   fifo_rd = !fifo_empty;
      S_THROTTLE: fifo_rd = !fifo_empty && idt_ff_n && !pop_q1 && !pop_q2;
      default:    fifo_rd = 1'b0;
    endcase
  end

  always_comb begin
    if (fifo_empty)     state_nx = S_IDLE;
    else if (idt_paf_n) state_nx = S_STREAM;
    else                state_nx = S_THROTTLE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pop_q1    <= 1'b0;
      pop_q2    <= 1'b0;
      idt_wen_n <= 1'b1;
      idt_d     <= '0;
    end else begin
      state     <= state_nx;
      pop_q1    <= fifo_rd;
      pop_q2    <= pop_q1;
      idt_wen_n <= !pop_q1;
      if (pop_q1) idt_d <= IDT_W'(fifo_rdata);
    end
  end

endmodule
