// ctrl_regs: the 20 status and control registers of the Control FPGA.
//
// Registers are 32 bits wide and accessed one at a time (addr = register index,
// see the map in ctp_mon_pkg). A write with wr high updates a read/write register
// at the clock edge, or, for the command registers (global reset, command, start
// readout), produces one-cycle pulses on cmd in the next cycle. rdata is the
// combinational read value of register addr; command registers read as 0. All
// read/write registers return to their power-up values on rst: NORMAL mode,
// counting the decoded inputs, Core BCID offset = the 4-cycle decoding latency,
// bcid_max = NBC-1, threshold 14, one turn, interrupts disabled. The list of
// registers follows the original module as far as it names them; the indices, bit
// positions and power-up values are this design's.
module ctrl_regs
  import ctp_mon_pkg::*;
#(
  parameter int unsigned NCORE = N_CORE,   // at most 4
  parameter int unsigned NBC   = N_BC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr,
  input  logic [4:0]        addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output ctrl_cfg_t         cfg,
  output ctrl_cmd_t         cmd,
  // status
  input  logic [NCORE-1:0]  ro_busy,
  input  logic [NCORE-1:0]  ro_done,
  input  logic [NCORE-1:0]  core_fifo_ovf,
  input  logic [NCORE-1:0]  core_fifo_empty,
  input  logic [NCORE-1:0]  core_fifo_full,
  input  logic [NCORE-1:0]  ext_empty,
  input  logic [NCORE-1:0]  ext_full,
  input  logic [NCORE-1:0]  ext_afull,
  input  logic [NCORE-1:0]  ao,
  input  logic              irq_pending,
  input  logic              integ,
  input  logic              armed,
  input  logic              integ_done,
  input  logic [31:0]       turn_count,
  input  logic [2:0]        power_good,
  input  logic [BCID_W-1:0] bcid
);
  logic [31:0] scratch;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.mode        <= MODE_NORMAL;
      cfg.in_sel      <= SEL_PTC;
      cfg.bc_ofs_core <= BCID_W'(DEC_LATENCY);
      cfg.bc_ofs_ctrl <= '0;
      cfg.bcid_max    <= BCID_W'(NBC - 1);
      cfg.ao_th       <= 4'd14;
      cfg.num_turns   <= 30'd1;
      cfg.irq_level   <= 3'd1;
      cfg.irq_vector  <= 8'h00;
      cfg.irq_enable  <= 1'b0;
      scratch         <= '0;
      cmd             <= '0;
    end else begin
      cmd <= '0;
      if (wr) begin
        unique case (32'(addr))
          REG_GLOBAL_RESET: cmd.global_reset  <= wdata[0];
          REG_GEN_CTRL:     cfg.mode          <= integ_mode_e'(wdata[0]);
          REG_COMMAND: begin
            cmd.start_integ <= wdata[0];
            cmd.stop_integ  <= wdata[1];
            cmd.clear_mem   <= wdata[2];
            cmd.clear_ao    <= wdata[3];
          end
          REG_START_RO:     cmd.start_readout <= wdata[0];
          REG_INPUT_SEL:    cfg.in_sel        <= (wdata[1:0] == 2'd3) ? SEL_ZERO : in_sel_e'(wdata[1:0]);
          REG_BC_OFS_CORE:  cfg.bc_ofs_core   <= wdata[BCID_W-1:0];
          REG_BC_OFS_CTRL:  cfg.bc_ofs_ctrl   <= wdata[BCID_W-1:0];
          REG_BCID_MAX:     cfg.bcid_max      <= wdata[BCID_W-1:0];
          REG_AO_TH:        cfg.ao_th         <= wdata[3:0];
          REG_NUM_TURNS:    cfg.num_turns     <= wdata[29:0];
          REG_IRQ_CFG: begin
            cfg.irq_level  <= wdata[2:0];
            cfg.irq_vector <= wdata[15:8];
            cfg.irq_enable <= wdata[16];
          end
          REG_SCRATCH:      scratch <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (32'(addr))
      REG_GEN_CTRL:     rdata[0]        = cfg.mode;
      REG_INPUT_SEL:    rdata[1:0]      = cfg.in_sel;
      REG_BC_OFS_CORE:  rdata[BCID_W-1:0] = cfg.bc_ofs_core;
      REG_BC_OFS_CTRL:  rdata[BCID_W-1:0] = cfg.bc_ofs_ctrl;
      REG_BCID_MAX:     rdata[BCID_W-1:0] = cfg.bcid_max;
      REG_AO_TH:        rdata[3:0]      = cfg.ao_th;
      REG_NUM_TURNS:    rdata[29:0]     = cfg.num_turns;
      REG_IRQ_CFG:      rdata[16:0]     = {cfg.irq_enable, cfg.irq_vector, 5'd0, cfg.irq_level};
      REG_RO_STATUS: begin
        rdata[3:0]   = 4'(ro_busy);
        rdata[7:4]   = 4'(ro_done);
        rdata[11:8]  = 4'(core_fifo_ovf);
      end
      REG_FIFO_STATUS: begin
        rdata[3:0]   = 4'(ext_empty);
        rdata[7:4]   = 4'(ext_full);
        rdata[11:8]  = 4'(ext_afull);
        rdata[15:12] = 4'(core_fifo_empty);
        rdata[19:16] = 4'(core_fifo_full);
      end
      REG_TURN_COUNT:   rdata = turn_count;
      REG_INTEG_STATUS: rdata[2:0] = {integ_done, armed, integ};
      REG_POWER_GOOD:   rdata[2:0] = power_good;
      REG_BCID:         rdata[BCID_W-1:0] = bcid;
      REG_AO_STATUS:    rdata[4:0] = {irq_pending, 4'(ao)};
      REG_SCRATCH:      rdata = scratch;
      REG_MODULE_ID:    rdata = MODULE_ID;
      default: ;
    endcase
  end

endmodule
