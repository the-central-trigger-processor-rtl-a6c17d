// ctp_mon_pkg: sizes, encodings, data-word formats and the register map shared by
// the modules of the CTP bunch-by-bunch trigger monitor.
//
// The monitor histograms each of the 160 trigger inputs of the Central Trigger
// Processor per LHC bunch (3564 bunches per orbit) into 30-bit counters kept in
// on-chip memory, and reads the histograms out through FIFOs onto a VMEbus.
// Sizes, the four Core FPGAs of 40 channels, the 4-cycle decoding latency and the
// header/P-word formats follow the original module. The register map (which of the
// 20 registers sits at which index and which bit does what) is this design's own.
package ctp_mon_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_PIT       = 160;   // trigger inputs (PIT bus)
  localparam int unsigned N_CORE      = 4;     // Core FPGAs
  localparam int unsigned N_CH        = 40;    // channels per Core FPGA
  localparam int unsigned N_BC        = 3564;  // bunch positions per LHC turn
  localparam int unsigned BCID_W      = 12;    // width of the BCID counters
  localparam int unsigned P_W         = 30;    // histogram counter width
  localparam int unsigned WORD_W      = 32;    // data word towards the FIFOs
  localparam int unsigned IDT_W       = 40;    // external FIFO data width
  localparam int unsigned IDT_DEPTH   = 131072;// external FIFO depth (words)
  localparam int unsigned CORE_FIFO_DEPTH = 12288; // small FIFO in each Core FPGA
  localparam int unsigned DEC_LATENCY = 4;     // input decoding latency (BC)
  localparam int unsigned N_REGS      = 20;    // status and control registers

  // ------------------------------------------------ histogram input selection
  // Three-input multiplexer in front of every histogramming adder.
  typedef enum logic [1:0] {
    SEL_PTC  = 2'd0,   // count the decoded trigger input
    SEL_ZERO = 2'd1,   // add nothing (also used outside integration)
    SEL_ONE  = 2'd2    // count every bunch (test / calibration)
  } in_sel_e;

  typedef enum logic {
    MODE_NORMAL = 1'b0,  // start/stop commands
    MODE_WINDOW = 1'b1   // fixed number of turns
  } integ_mode_e;

  // ------------------------------------------------------------ data words
  localparam logic [2:0] HDR1_CODE = 3'b100;
  localparam logic [2:0] HDR2_CODE = 3'b101;
  localparam logic [2:0] HDR3_CODE = 3'b110;

  // Header 1: code, PIT code in bits 20..13, bit 12 zero, first BCID in 11..0.
  function automatic logic [31:0] make_hdr1(logic [7:0] pit_code, logic [11:0] bcid);
    return {HDR1_CODE, 8'd0, pit_code, 1'b0, bcid};
  endfunction
  // Header 2 / 3: turn count, least / most significant 16 bits.
  function automatic logic [31:0] make_hdr2(logic [31:0] turns);
    return {HDR2_CODE, 13'd0, turns[15:0]};
  endfunction
  function automatic logic [31:0] make_hdr3(logic [31:0] turns);
    return {HDR3_CODE, 13'd0, turns[31:16]};
  endfunction
  // P word: bit 31 zero, bit 30 overflow, bits 29..0 the counter.
  function automatic logic [31:0] make_pword(logic ov, logic [P_W-1:0] p);
    return {1'b0, ov, p};
  endfunction

  // --------------------------------------------------------- register map
  // Register index = VME byte offset / 4 inside the register window.
  localparam int unsigned REG_GLOBAL_RESET = 0;  // W: bit0 pulses a global reset
  localparam int unsigned REG_GEN_CTRL     = 1;  // RW: bit0 mode (0 NORMAL, 1 WINDOW)
  localparam int unsigned REG_COMMAND      = 2;  // W: bit0 start, bit1 stop, bit2 clear memory, bit3 clear AO
  localparam int unsigned REG_START_RO     = 3;  // W: bit0 starts the readout
  localparam int unsigned REG_INPUT_SEL    = 4;  // RW: bits1..0 in_sel_e
  localparam int unsigned REG_BC_OFS_CORE  = 5;  // RW: bits11..0 Core BCID offset
  localparam int unsigned REG_BC_OFS_CTRL  = 6;  // RW: bits11..0 Control BCID offset
  localparam int unsigned REG_BCID_MAX     = 7;  // RW: bits11..0 last BCID of a turn
  localparam int unsigned REG_AO_TH        = 8;  // RW: bits3..0 almost overflow threshold
  localparam int unsigned REG_NUM_TURNS    = 9;  // RW: bits29..0 turns in WINDOW mode
  localparam int unsigned REG_IRQ_CFG      = 10; // RW: bits2..0 level, 15..8 vector, 16 enable
  localparam int unsigned REG_RO_STATUS    = 11; // R: per core busy[3:0], done[7:4], core FIFO overflow[11:8]
  localparam int unsigned REG_FIFO_STATUS  = 12; // R: per core ext empty[3:0], full[7:4], almost full[11:8], core FIFO empty[15:12], full[19:16]
  localparam int unsigned REG_TURN_COUNT   = 13; // R: turns integrated
  localparam int unsigned REG_INTEG_STATUS = 14; // R: bit0 integrating, bit1 start armed, bit2 done
  localparam int unsigned REG_POWER_GOOD   = 15; // R: bits2..0 power good 1.5 V, 1.8 V, 2.5 V
  localparam int unsigned REG_BCID         = 16; // R: Control BCID
  localparam int unsigned REG_AO_STATUS    = 17; // R: per core AO flags, bit4 IRQ pending
  localparam int unsigned REG_SCRATCH      = 18; // RW: free scratch register
  localparam int unsigned REG_MODULE_ID    = 19; // R: constant module identifier

  localparam logic [31:0] MODULE_ID = 32'hC7B0_0001;

  // Configuration the Control FPGA distributes.
  typedef struct packed {
    integ_mode_e       mode;
    in_sel_e           in_sel;
    logic [11:0]       bc_ofs_core;
    logic [11:0]       bc_ofs_ctrl;
    logic [11:0]       bcid_max;
    logic [3:0]        ao_th;
    logic [29:0]       num_turns;
    logic [2:0]        irq_level;
    logic [7:0]        irq_vector;
    logic              irq_enable;
  } ctrl_cfg_t;

  // Single-cycle commands decoded from register writes.
  typedef struct packed {
    logic global_reset;
    logic start_integ;
    logic stop_integ;
    logic clear_mem;
    logic clear_ao;
    logic start_readout;
  } ctrl_cmd_t;

  // What the Control FPGA sends to every Core FPGA.
  typedef struct packed {
    logic              integ;        // integration window (whole turns, Control BCID frame)
    logic              clear_mem;    // pulse: clear the histograms during the next turn
    logic              clear_ao;     // pulse: clear the almost overflow flag
    logic              start_readout;// pulse
    in_sel_e           in_sel;
    logic [11:0]       bc_ofs;
    logic [11:0]       bcid_max;
    logic [3:0]        ao_th;
    logic [31:0]       turn_count;
  } core_ctrl_t;

  // What every Core FPGA reports back.
  typedef struct packed {
    logic ao;            // almost overflow flag
    logic ro_busy;       // readout running
    logic ro_done;       // readout finished since the last start
    logic fifo_empty;    // core FIFO empty
    logic fifo_full;     // core FIFO full
    logic fifo_ovf;      // a word was lost because the core FIFO was full
  } core_status_t;

  // Default routing of the input decoding: output i takes input i.
  function automatic logic [N_PIT*8-1:0] identity_route(int unsigned n);
    logic [N_PIT*8-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < n; i++) r[i*8 +: 8] = 8'(i);
    return r;
  endfunction

  // Default look-up tables: every 4-bit group is passed unchanged.
  function automatic logic [(N_PIT/4)*16*4-1:0] identity_lut(int unsigned nlut);
    logic [(N_PIT/4)*16*4-1:0] t;
    t = '0;
    for (int unsigned l = 0; l < nlut; l++)
      for (int unsigned a = 0; a < 16; a++) t[(l*16 + a)*4 +: 4] = 4'(a);
    return t;
  endfunction

endpackage
