// ctp_mon_top: bunch-by-bunch monitor of the Central Trigger Processor inputs.
//
// The 160-bit PIT trigger bus is decoded (routing, grouping, look-up tables) into
// the PTC bus, 4 bunch clocks later. Four Core FPGAs each histogram 40 PTC bits: one
// 30-bit counter per bit per bunch position of the LHC turn (3564), updated at the
// 40 MHz bunch clock with no dead time. The Control FPGA holds the registers, runs
// the VME A32:D32:BLT slave, defines the integration window in whole turns and
// raises an interrupt on almost overflow. A readout copies every histogram, with
// three headers per channel, through a small FIFO in each Core FPGA into one
// external FIFO per Core FPGA, 131,072 x 40, from which the VME master reads them by
// block transfer. The external FIFOs are outside this module: their write side is
// driven by the Core FPGAs and their read side by the Control FPGA. All logic runs on
// the bunch clock clk; rst_n is a synchronous power-up reset.
//
// The structure of the module follows the original design; see the files of the
// blocks for what each adds of its own.
module ctp_mon_top
  import ctp_mon_pkg::*;
#(
  parameter int unsigned NCORE      = N_CORE,
  parameter int unsigned NCH        = N_CH,
  parameter int unsigned NBC        = N_BC,
  parameter int unsigned FIFO_DEPTH = CORE_FIFO_DEPTH,
  parameter logic [7:0]  VME_BASE   = 8'h10
) (
  input  logic                        clk,        // bunch clock BCK, 40 MHz
  input  logic                        rst_n,
  input  logic                        orbit,
  input  logic [NCORE*NCH-1:0]        pit,
  input  logic [2:0]                  power_good,
  // VMEbus
  input  logic                        vme_as_n,
  input  logic [1:0]                  vme_ds_n,
  input  logic                        vme_write_n,
  input  logic [5:0]                  vme_am,
  input  logic [31:1]                 vme_addr,
  input  logic                        vme_lword_n,
  input  logic                        vme_iack_n,
  input  logic                        vme_iackin_n,
  input  logic [31:0]                 vme_d_in,
  output logic [31:0]                 vme_d_out,
  output logic                        vme_d_oe,
  output logic                        vme_dtack_n,
  output logic                        vme_iackout_n,
  output logic [7:1]                  vme_irq_n,
  // external FIFOs, one per Core FPGA
  output logic [NCORE-1:0]            idt_wen_n,
  output logic [NCORE-1:0][IDT_W-1:0] idt_d,
  input  logic [NCORE-1:0]            idt_ff_n,
  input  logic [NCORE-1:0]            idt_paf_n,
  output logic [NCORE-1:0]            idt_ren_n,
  input  logic [NCORE-1:0][IDT_W-1:0] idt_q,
  input  logic [NCORE-1:0]            idt_ef_n
);
  localparam int unsigned NPIT = NCORE * NCH;

  logic rst;
  assign rst = !rst_n;

  logic [NPIT-1:0] ptc;

  input_decoding #(.N(NPIT)) u_dec (
    .clk (clk),
    .pit (pit),
    .ptc (ptc)
  );

  core_ctrl_t                core_ctrl;
  logic                      core_rst;
  core_status_t [NCORE-1:0]  core_status;

  control #(.NCORE(NCORE), .NBC(NBC), .BASE(VME_BASE)) u_ctrl (
    .clk           (clk),
    .rst           (rst),
    .orbit         (orbit),
    .power_good    (power_good),
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
    .core_ctrl     (core_ctrl),
    .core_rst      (core_rst),
    .core_status   (core_status),
    .idt_ren_n     (idt_ren_n),
    .idt_q         (idt_q),
    .idt_ef_n      (idt_ef_n),
    .idt_ff_n      (idt_ff_n),
    .idt_paf_n     (idt_paf_n)
  );

  for (genvar k = 0; k < NCORE; k++) begin : g_core
    core_processing #(
      .NCH        (NCH),
      .CORE_ID    (k),
      .DEPTH      (NBC),
      .FIFO_DEPTH (FIFO_DEPTH)
    ) u_core (
      .clk       (clk),
      .rst       (rst || core_rst),
      .orbit     (orbit),
      .ptc       (ptc[k*NCH +: NCH]),
      .ctrl      (core_ctrl),
      .status    (core_status[k]),
      .bcid      (),
      .idt_wen_n (idt_wen_n[k]),
      .idt_d     (idt_d[k]),
      .idt_ff_n  (idt_ff_n[k]),
      .idt_paf_n (idt_paf_n[k])
    );
  end

endmodule
