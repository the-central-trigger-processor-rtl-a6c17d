// readout_ctrl: copies the histograms of one Core FPGA into the Core FIFO as
// formatted 32-bit words, without stopping the histogramming.
//
// The histogram memories are read at every bunch clock for the increment anyway, so
// this block taps that read stream (rd_data, one {ov, P} word per channel, for bunch
// rd_bcid) instead of using a port of its own. After start it walks the channels in
// order. For each channel it writes Header 1 (PIT code of the channel, BCID of the
// first P word that follows), Header 2 and Header 3 (turn count, low and high 16
// bits, latched at start), then the P words of bcid_max+1 consecutive bunches taken
// from the read stream as they pass, beginning wherever the turn happens to be. One
// channel thus takes bcid_max+4 cycles and the next channel's first BCID is three
// higher. The selected channel reaches the FIFO through a 31-bit N_CH-to-1
// multiplexer of three registered stages (5:1, 4:1, 2:1 for 40 channels); the
// headers travel alongside it in the same pipeline so the word order is kept.
//
// Interface: start is a one-cycle pulse, ignored while busy; busy is high from the
// cycle after start until the last word has entered the multiplexer; done rises
// then and stays high until the next start. Timing: a word selected in cycle t is
// written (fifo_wr) in cycle t+3. The FSM, the 31-bit multiplexer with 3 cycles of
// latency and the word formats follow the original module. Reading from the live
// stream, the word order (channel by channel, headers first) and the latching of
// the turn count are this design's reading of the headers' contents.
module readout_ctrl
  import ctp_mon_pkg::*;
#(
  parameter int unsigned NCH     = N_CH,
  parameter int unsigned CORE_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [BCID_W-1:0]     bcid_max,
  input  logic [BCID_W-1:0]     rd_bcid,     // bunch of rd_data
  input  logic [NCH-1:0][P_W:0] rd_data,     // {ov, P} of every channel
  input  logic [31:0]           turn_count,
  output logic                  fifo_wr,
  output logic [WORD_W-1:0]     fifo_wdata,
  output logic                  busy,
  output logic                  done
);
  localparam int unsigned G1  = 5;                    // first stage: 5 to 1
  localparam int unsigned NG1 = (NCH + G1 - 1) / G1;  // groups after stage 1
  localparam int unsigned NG2 = (NG1 + 3) / 4;        // groups after stage 2
  localparam int unsigned HW  = (NG1 > 1) ? $clog2(NG1) + 2 : 3;

  typedef enum logic [2:0] {S_IDLE, S_H1, S_H2, S_H3, S_PW} state_e;
  state_e state;

  logic [2:0]        ch_lo;     // channel = ch_hi * 5 + ch_lo
  logic [HW-1:0]     ch_hi;
  logic [BCID_W-1:0] cnt;
  logic [31:0]       turns_q;

  logic [P_W:0] padded [NG1*G1];
  always_comb begin
    for (int unsigned i = 0; i < NG1*G1; i++)
      padded[i] = (i < NCH) ? rd_data[i] : '0;
  end

  // PIT code and first BCID for Header 1
  logic [7:0]        pit_code;
  logic [BCID_W:0]   first_sum;
  logic [BCID_W-1:0] first_bcid;
  assign pit_code   = 8'(CORE_ID * NCH) + 8'(ch_hi) * 8'(G1) + 8'(ch_lo);
  assign first_sum  = {1'b0, rd_bcid} + (BCID_W+1)'(3);
  assign first_bcid = (first_sum > {1'b0, bcid_max})
                      ? BCID_W'(first_sum - {1'b0, bcid_max} - (BCID_W+1)'(1))
                      : first_sum[BCID_W-1:0];

  // what the FSM emits this cycle
  logic        emit, emit_hdr;
  logic [31:0] hword;
  always_comb begin
    emit     = 1'b0;
    emit_hdr = 1'b0;
    hword    = '0;
    unique case (state)
      S_H1: begin emit = 1'b1; emit_hdr = 1'b1; hword = make_hdr1(pit_code, first_bcid); end
      S_H2: begin emit = 1'b1; emit_hdr = 1'b1; hword = make_hdr2(turns_q); end
      S_H3: begin emit = 1'b1; emit_hdr = 1'b1; hword = make_hdr3(turns_q); end
      S_PW: emit = 1'b1;
      default: ;
    endcase
  end

  logic last_ch;
  assign last_ch = (32'(ch_hi) * G1 + 32'(ch_lo)) == NCH - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      ch_lo   <= '0;
      ch_hi   <= '0;
      cnt     <= '0;
      turns_q <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_H1;
          ch_lo   <= '0;
          ch_hi   <= '0;
          turns_q <= turn_count;
          done    <= 1'b0;
        end
        S_H1: state <= S_H2;
        S_H2: state <= S_H3;
        S_H3: begin state <= S_PW; cnt <= '0; end
        S_PW: begin
          cnt <= cnt + BCID_W'(1);
          if (cnt >= bcid_max) begin
            if (last_ch) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_H1;
              if (ch_lo == 3'(G1 - 1)) begin
                ch_lo <= '0;
                ch_hi <= ch_hi + HW'(1);
              end else begin
                ch_lo <= ch_lo + 3'd1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // three-stage multiplexer with the header side band
  logic [P_W:0]  m1 [NG1];
  logic [P_W:0]  m2 [NG2];
  logic [P_W:0]  m3;
  logic          v1, v2, v3, h1, h2, h3;
  logic [31:0]   w1, w2, w3;
  logic [HW-1:0] hi1;
  logic [HW-1:0] hi2;

  always_ff @(posedge clk) begin
    for (int unsigned g = 0; g < NG1; g++) m1[g] <= padded[g*G1 + 32'(ch_lo)];
    for (int unsigned g = 0; g < NG2; g++) begin
      int unsigned k;
      k = g*4 + 32'(hi1[1:0]);
      m2[g] <= (k < NG1) ? m1[k] : '0;
    end
    m3 <= m2[32'(hi2 >> 2) % NG2];
    hi1 <= ch_hi;
    hi2 <= hi1;
    w1  <= hword;
    w2  <= w1;
    w3  <= w2;
    h1  <= emit_hdr;
    h2  <= h1;
    h3  <= h2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= emit;
      v2 <= v1;
      v3 <= v2;
    end
  end

  assign fifo_wr    = v3;
  assign fifo_wdata = h3 ? w3 : make_pword(m3[P_W], m3[P_W-1:0]);

endmodule
