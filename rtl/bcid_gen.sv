// bcid_gen: local bunch-crossing identifier (BCID) generator.
//
// A 12-bit counter advances once per bunch clock and wraps from bcid_max to 0, so one
// wrap is one LHC turn (bcid_max = 3563 for the LHC, smaller for short tests). The
// ORBIT pulse, once per turn, resynchronises it: the cycle after orbit is sampled
// high the counter holds (bcid_max + 1 - offset) mod (bcid_max + 1). The offset
// therefore moves BCID 0 "offset" cycles later than the cycle after ORBIT, which
// compensates the latency between the ORBIT reception and the point where the
// BCID is used (4 cycles of input decoding in front of the histograms). bc0 is high
// in every cycle whose BCID is 0. The 12-bit counter, the comparators and the
// programmable offset follow the original module; the exact offset arithmetic is
// this design's choice. offset must be at most bcid_max.
module bcid_gen
  import ctp_mon_pkg::*;
(
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              orbit,      // one pulse per turn
  input  logic [BCID_W-1:0] bcid_max,   // last BCID of a turn
  input  logic [BCID_W-1:0] offset,     // latency compensation in bunch clocks
  output logic [BCID_W-1:0] bcid,
  output logic              bc0
);
  logic [BCID_W-1:0] load_val;

  always_comb begin
    if (offset == '0) load_val = '0;
    else              load_val = bcid_max - offset + BCID_W'(1);
  end

  always_ff @(posedge clk) begin
    if (rst)                    bcid <= '0;
    else if (orbit)             bcid <= load_val;
    else if (bcid >= bcid_max)  bcid <= '0;
    else                        bcid <= bcid + BCID_W'(1);
  end

  assign bc0 = (bcid == '0);

endmodule
