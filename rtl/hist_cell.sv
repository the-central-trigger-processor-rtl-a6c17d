// hist_cell: one histogramming channel, one 30-bit counter per bunch position.
//
// Every bunch clock the counter of bunch "addr" is read from a dual-port memory,
// incremented by the bit the three-input multiplexer selects (the decoded trigger
// input ptc, constant 0 or constant 1) in a 4-stage pipelined incrementer, and
// written back through the second port five cycles later. Reads and writes use
// different addresses in the same cycle, so a bunch is counted every cycle with no
// dead time. Each word holds the counter P (30 bits) and a sticky overflow bit above
// it, set when P wraps. While "clear" accompanies an address, zero is written back
// instead, which clears the memory in one turn.
//
// Timing, for the inputs of cycle t: rd_data = {ov, P} of bunch addr before this
// update in cycle t+1 (rd_addr tells which bunch), and the new value is written in
// cycle t+5 (wr_valid, wr_p). Since the word for a bunch returns one turn later, a
// turn must be at least 6 bunches long (bcid_max >= 5). The multiplexer, the dual-port
// memory, the 30-bit width and the 4-cycle adder follow the original module; the
// sticky overflow bit and the clear-by-writing-zero are this design's choices.
module hist_cell
  import ctp_mon_pkg::*;
#(
  parameter int unsigned DEPTH = N_BC,
  parameter int unsigned AW    = BCID_W
) (
  input  logic           clk,
  input  logic           rst,        // synchronous; resets the pipeline, not the memory
  input  logic [AW-1:0]  addr,       // bunch to update (the Core BCID)
  input  in_sel_e        sel,        // multiplexer select
  input  logic           ptc,        // decoded trigger input of this bunch
  input  logic           clear,      // write zero instead of the incremented value
  output logic [P_W:0]   rd_data,    // {ov, P} read this cycle
  output logic [AW-1:0]  rd_addr,    // bunch of rd_data
  output logic           wr_valid,   // a word is written this cycle
  output logic [P_W-1:0] wr_p        // counter value written this cycle
);
  localparam int unsigned ADD_LAT = 4;

  logic cin;
  always_comb begin
    unique case (sel)
      SEL_PTC:  cin = ptc;
      SEL_ONE:  cin = 1'b1;
      default:  cin = 1'b0;
    endcase
  end

  // side band travelling with the read and the adder
  logic [AW-1:0] a_pipe   [ADD_LAT+1];
  logic          clr_pipe [ADD_LAT+1];
  logic          v_pipe   [ADD_LAT+1];
  logic          cin_q;

  always_ff @(posedge clk) begin
    a_pipe[0]   <= addr;
    clr_pipe[0] <= clear;
    cin_q       <= cin;
    for (int i = 1; i <= ADD_LAT; i++) begin
      a_pipe[i]   <= a_pipe[i-1];
      clr_pipe[i] <= clr_pipe[i-1];
    end
    if (rst) begin
      for (int i = 0; i <= ADD_LAT; i++) v_pipe[i] <= 1'b0;
    end else begin
      v_pipe[0] <= 1'b1;
      for (int i = 1; i <= ADD_LAT; i++) v_pipe[i] <= v_pipe[i-1];
    end
  end

  logic [P_W:0]   mem_q;
  logic [P_W-1:0] sum;
  logic           ov_new;
  logic           we;
  logic [P_W:0]   wdata;

  dp_ram #(.W(P_W + 1), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk   (clk),
    .we    (we),
    .waddr (a_pipe[ADD_LAT]),
    .wdata (wdata),
    .raddr (addr),
    .rdata (mem_q)
  );

  pipe_incrementer #(.W(P_W), .STAGES(ADD_LAT)) u_add (
    .clk    (clk),
    .a      (mem_q[P_W-1:0]),
    .ov_in  (mem_q[P_W]),
    .cin    (cin_q),
    .sum    (sum),
    .ov_out (ov_new)
  );

  assign we       = v_pipe[ADD_LAT];
  assign wdata    = clr_pipe[ADD_LAT] ? '0 : {ov_new, sum};
  assign rd_data  = mem_q;
  assign rd_addr  = a_pipe[0];
  assign wr_valid = we;
  assign wr_p     = wdata[P_W-1:0];

endmodule
