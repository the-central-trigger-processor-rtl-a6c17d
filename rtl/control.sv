// control: the Control FPGA — registers, VME interface, integration window and
// interrupt request.
//
// The VME slave (vmedec) reads and writes the 20 registers (ctrl_regs) and reads
// the external FIFOs for the block transfers, driving their read enables. A local
// BCID generator with its own offset gives the turn boundaries on which the
// integration controller opens and closes the window in NORMAL or WINDOW mode and
// counts turns. The almost overflow flags of the Core FPGAs, ORed and gated by the
// interrupt enable, request a VME interrupt. Everything the Core FPGAs need leaves
// in one registered bundle, core_ctrl, one cycle after it is decided. A write of 1
// to the global reset register pulses core_rst, which resets the Core FPGAs and the
// integration controller; the register contents and the VME interface keep their
// state.
//
// The set of functions (registers, VMEDEC, BCID generator, interrupt on almost
// overflow) follows the original module; placing the integration controller here
// and the global reset scope are this design's choices.
module control
  import ctp_mon_pkg::*;
#(
  parameter int unsigned NCORE = N_CORE,
  parameter int unsigned NBC   = N_BC,
  parameter logic [7:0]  BASE  = 8'h10
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      orbit,
  input  logic [2:0]                power_good,
  // VMEbus
  input  logic                      vme_as_n,
  input  logic [1:0]                vme_ds_n,
  input  logic                      vme_write_n,
  input  logic [5:0]                vme_am,
  input  logic [31:1]               vme_addr,
  input  logic                      vme_lword_n,
  input  logic                      vme_iack_n,
  input  logic                      vme_iackin_n,
  input  logic [31:0]               vme_d_in,
  output logic [31:0]               vme_d_out,
  output logic                      vme_d_oe,
  output logic                      vme_dtack_n,
  output logic                      vme_iackout_n,
  output logic [7:1]                vme_irq_n,
  // Core FPGAs
  output core_ctrl_t                core_ctrl,
  output logic                      core_rst,
  input  core_status_t [NCORE-1:0]  core_status,
  // external FIFOs, read side
  output logic [NCORE-1:0]          idt_ren_n,
  input  logic [NCORE-1:0][IDT_W-1:0] idt_q,
  input  logic [NCORE-1:0]          idt_ef_n,
  input  logic [NCORE-1:0]          idt_ff_n,
  input  logic [NCORE-1:0]          idt_paf_n
);
  ctrl_cfg_t cfg;
  ctrl_cmd_t cmd;

  logic [BCID_W-1:0] bcid;
  logic              bc0;
  logic              int_rst;

  assign int_rst = rst || cmd.global_reset;

  bcid_gen u_bcid (
    .clk      (clk),
    .rst      (rst),
    .orbit    (orbit),
    .bcid_max (cfg.bcid_max),
    .offset   (cfg.bc_ofs_ctrl),
    .bcid     (bcid),
    .bc0      (bc0)
  );

  logic        integ, armed, integ_done;
  logic [31:0] turn_count;

  integration_ctrl u_integ (
    .clk        (clk),
    .rst        (int_rst),
    .bc0        (bc0),
    .mode       (cfg.mode),
    .num_turns  (cfg.num_turns),
    .start      (cmd.start_integ),
    .stop       (cmd.stop_integ),
    .integ      (integ),
    .armed      (armed),
    .done       (integ_done),
    .turn_count (turn_count)
  );

  logic              reg_wr;
  logic [4:0]        reg_addr;
  logic [31:0]       reg_wdata, reg_rdata;
  logic              irq_pending;
  logic [NCORE-1:0]  ro_busy, ro_done, c_ovf, c_empty, c_full, ao;

  always_comb begin
    for (int unsigned k = 0; k < NCORE; k++) begin
      ro_busy[k] = core_status[k].ro_busy;
      ro_done[k] = core_status[k].ro_done;
      c_ovf[k]   = core_status[k].fifo_ovf;
      c_empty[k] = core_status[k].fifo_empty;
      c_full[k]  = core_status[k].fifo_full;
      ao[k]      = core_status[k].ao;
    end
  end

  ctrl_regs #(.NCORE(NCORE), .NBC(NBC)) u_regs (
    .clk             (clk),
    .rst             (rst),
    .wr              (reg_wr),
    .addr            (reg_addr),
    .wdata           (reg_wdata),
    .rdata           (reg_rdata),
    .cfg             (cfg),
    .cmd             (cmd),
    .ro_busy         (ro_busy),
    .ro_done         (ro_done),
    .core_fifo_ovf   (c_ovf),
    .core_fifo_empty (c_empty),
    .core_fifo_full  (c_full),
    .ext_empty       (~idt_ef_n),
    .ext_full        (~idt_ff_n),
    .ext_afull       (~idt_paf_n),
    .ao              (ao),
    .irq_pending     (irq_pending),
    .integ           (integ),
    .armed           (armed),
    .integ_done      (integ_done),
    .turn_count      (turn_count),
    .power_good      (power_good),
    .bcid            (bcid)
  );

  logic [NCORE-1:0]       fifo_ren;
  logic [NCORE-1:0][31:0] fifo_q;

  always_comb begin
    for (int unsigned k = 0; k < NCORE; k++) fifo_q[k] = idt_q[k][31:0];
  end
  assign idt_ren_n = ~fifo_ren;

  vmedec #(.BASE(BASE), .NCORE(NCORE)) u_vme (
    .clk           (clk),
    .rst           (rst),
    .vme_as_n      (vme_as_n),
    .vme_ds_n      (vme_ds_n),
    .vme_write_n   (vme_write_n),
    .vme_am        (vme_am),
    .vme_addr      (vme_addr),
    .vme_lword_n   (vme_lword_n),
    .vme_iack_n    (vme_iack_n),
    .vme_iackin_n  (vme_iackin_n),
    .vme_d_in      (vme_d_in),
    .vme_d_out     (vme_d_out),
    .vme_d_oe      (vme_d_oe),
    .vme_dtack_n   (vme_dtack_n),
    .vme_iackout_n (vme_iackout_n),
    .vme_irq_n     (vme_irq_n),
    .reg_wr        (reg_wr),
    .reg_addr      (reg_addr),
    .reg_wdata     (reg_wdata),
    .reg_rdata     (reg_rdata),
    .fifo_ren      (fifo_ren),
    .fifo_q        (fifo_q),
    .fifo_empty    (~idt_ef_n),
    .irq_req       (cfg.irq_enable && (|ao)),
    .irq_level     (cfg.irq_level),
    .irq_vector    (cfg.irq_vector),
    .irq_pending   (irq_pending)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      core_ctrl <= '0;
      core_rst  <= 1'b1;
    end else begin
      core_rst                <= cmd.global_reset;
      core_ctrl.integ         <= integ;
      core_ctrl.clear_mem     <= cmd.clear_mem;
      core_ctrl.clear_ao      <= cmd.clear_ao;
      core_ctrl.start_readout <= cmd.start_readout;
      core_ctrl.in_sel        <= cfg.in_sel;
      core_ctrl.bc_ofs        <= cfg.bc_ofs_core;
      core_ctrl.bcid_max      <= cfg.bcid_max;
      core_ctrl.ao_th         <= cfg.ao_th;
      core_ctrl.turn_count    <= turn_count;
    end
  end

endmodule
