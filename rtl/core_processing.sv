// core_processing: one Core FPGA, histogramming NCH decoded trigger inputs per bunch.
//
// A local BCID generator, resynchronised by ORBIT with the programmable offset that
// absorbs the input decoding latency, addresses NCH histogramming cells in
// parallel, so in every bunch clock the counters of that bunch are updated in all
// channels. The integration window from the Control FPGA and the clear-memory
// command are taken at this core's BCID 0 and held for the whole turn, so a turn is
// always integrated (or cleared) completely. Outside the window the cells add 0.
// The almost overflow block watches the values written back. The readout control
// taps the memories' read stream and fills the Core FIFO, and idt_wr_ctrl empties
// that FIFO into the external FIFO.
//
// Interface: ctrl carries the configuration and the command pulses, status the
// flags. ptc must be the decoded input for the bunch this core's BCID names, which
// the offset arranges. Timing: see hist_cell (update 5 cycles after the bunch) and
// readout_ctrl. The partition (BCID generator, histogramming, almost overflow,
// readout control, small FIFO in each Core FPGA) follows the original module; the
// turn-wise sampling of the window and of the clear command is this design's.
module core_processing
  import ctp_mon_pkg::*;
#(
  parameter int unsigned NCH        = N_CH,
  parameter int unsigned CORE_ID    = 0,
  parameter int unsigned DEPTH      = N_BC,
  parameter int unsigned FIFO_DEPTH = CORE_FIFO_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             orbit,
  input  logic [NCH-1:0]   ptc,
  input  core_ctrl_t       ctrl,
  output core_status_t     status,
  output logic [BCID_W-1:0] bcid,
  output logic             idt_wen_n,
  output logic [IDT_W-1:0] idt_d,
  input  logic             idt_ff_n,
  input  logic             idt_paf_n
);
  logic bc0;

  bcid_gen u_bcid (
    .clk      (clk),
    .rst      (rst),
    .orbit    (orbit),
    .bcid_max (ctrl.bcid_max),
    .offset   (ctrl.bc_ofs),
    .bcid     (bcid),
    .bc0      (bc0)
  );

  // turn-wise integration and clear
  logic integ_turn, clear_turn, clear_pend;
  logic integ_now, clear_now;

  assign integ_now = bc0 ? ctrl.integ : integ_turn;
  assign clear_now = bc0 ? (clear_pend | ctrl.clear_mem) : clear_turn;

  always_ff @(posedge clk) begin
    if (rst) begin
      integ_turn <= 1'b0;
      clear_turn <= 1'b0;
      clear_pend <= 1'b0;
    end else begin
      integ_turn <= integ_now;
      clear_turn <= clear_now;
      if (bc0)                 clear_pend <= 1'b0;
      else if (ctrl.clear_mem) clear_pend <= 1'b1;
    end
  end

  in_sel_e sel;
  assign sel = integ_now ? ctrl.in_sel : SEL_ZERO;

  logic [NCH-1:0][P_W:0]   rd_data;
  logic [BCID_W-1:0]       rd_addr [NCH];
  logic [NCH-1:0]          wr_valid;
  logic [NCH-1:0][P_W-1:0] wr_p;
  logic [NCH-1:0][3:0]     wr_msb;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    hist_cell #(.DEPTH(DEPTH), .AW(BCID_W)) u_cell (
      .clk      (clk),
      .rst      (rst),
      .addr     (bcid),
      .sel      (sel),
      .ptc      (ptc[c]),
      .clear    (clear_now),
      .rd_data  (rd_data[c]),
      .rd_addr  (rd_addr[c]),
      .wr_valid (wr_valid[c]),
      .wr_p     (wr_p[c])
    );
    assign wr_msb[c] = wr_p[c][P_W-1 -: 4];
  end

  almost_overflow #(.N(NCH)) u_ao (
    .clk   (clk),
    .rst   (rst),
    .clr   (ctrl.clear_ao),
    .th    (ctrl.ao_th),
    .valid (wr_valid[0]),
    .msb   (wr_msb),
    .ao    (status.ao)
  );

  logic             fifo_wr, fifo_rd;
  logic [WORD_W-1:0] fifo_wdata, fifo_rdata;

  readout_ctrl #(.NCH(NCH), .CORE_ID(CORE_ID)) u_ro (
    .clk        (clk),
    .rst        (rst),
    .start      (ctrl.start_readout),
    .bcid_max   (ctrl.bcid_max),
    .rd_bcid    (rd_addr[0]),
    .rd_data    (rd_data),
    .turn_count (ctrl.turn_count),
    .fifo_wr    (fifo_wr),
    .fifo_wdata (fifo_wdata),
    .busy       (status.ro_busy),
    .done       (status.ro_done)
  );

  sync_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst      (rst),
    .wr       (fifo_wr),
    .wdata    (fifo_wdata),
    .rd       (fifo_rd),
    .rdata    (fifo_rdata),
    .empty    (status.fifo_empty),
    .full     (status.fifo_full),
    .count    (),
    .overflow (status.fifo_ovf)
  );

  idt_wr_ctrl #(.W(WORD_W), .IDT_W(IDT_W)) u_idt_wr (
    .clk        (clk),
    .rst        (rst),
    .fifo_empty (status.fifo_empty),
    .fifo_rd    (fifo_rd),
    .fifo_rdata (fifo_rdata),
    .idt_ff_n   (idt_ff_n),
    .idt_paf_n  (idt_paf_n),
    .idt_wen_n  (idt_wen_n),
    .idt_d      (idt_d)
  );

endmodule
