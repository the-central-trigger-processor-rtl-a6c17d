// integration_ctrl: the integration window in whole LHC turns, and the turn counter.
//
// NORMAL mode: a start command arms the window, which opens at the next BCID 0 and
// closes at the first BCID 0 after a stop command. WINDOW mode: the window opens at
// the next BCID 0 after start and closes after num_turns turns (1 to 2^30-1; a start
// with num_turns = 0 is ignored); a stop command also ends it early. turn_count is
// cleared when the window opens and counts the turns completed inside it, so after
// the window it holds the number of turns integrated. bc0 is the Control FPGA's BCID
// 0 indication; integ rises and falls in the cycle after a bc0 cycle and is high for
// a whole number of turns. Modes, BCID 0 alignment and the 30-bit turn limit follow
// the original module; the 32-bit counter and stop-in-WINDOW are this design's.
module integration_ctrl
  import ctp_mon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  input  integ_mode_e mode,
  input  logic [29:0] num_turns,
  input  logic        start,      // pulse
  input  logic        stop,       // pulse
  output logic        integ,      // window open
  output logic        armed,      // start seen, waiting for BCID 0
  output logic        done,       // window closed since the last start
  output logic [31:0] turn_count
);
  logic        stop_pend;
  logic [31:0] tc_next;
  logic        window_end;

  assign tc_next    = turn_count + 32'd1;
  assign window_end = stop_pend || stop ||
                      (mode == MODE_WINDOW && tc_next >= {2'b00, num_turns});

  always_ff @(posedge clk) begin
    if (rst) begin
      integ      <= 1'b0;
      armed      <= 1'b0;
      done       <= 1'b0;
      stop_pend  <= 1'b0;
      turn_count <= '0;
    end else begin
      if (start && !integ && !(mode == MODE_WINDOW && num_turns == '0)) begin
        armed <= 1'b1;
        done  <= 1'b0;
      end
      if (stop) begin
        if (integ) stop_pend <= 1'b1;
        else       armed     <= 1'b0;
      end
      if (bc0) begin
        if (integ) begin
          turn_count <= tc_next;
          if (window_end) begin
            integ     <= 1'b0;
            done      <= 1'b1;
            stop_pend <= 1'b0;
          end
        end else if (armed && !stop) begin
          integ      <= 1'b1;
          armed      <= 1'b0;
          turn_count <= '0;
        end
      end
    end
  end

endmodule
