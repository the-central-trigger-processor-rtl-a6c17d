// tb_ctrl_regs: checks the power-up values, write/read-back of every read/write
// register, the one-cycle command pulses and the status fields of ctrl_regs.
module tb_ctrl_regs;
  import ctp_mon_pkg::*;
  logic clk = 0, rst = 1, wr = 0;
  logic [4:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  ctrl_cfg_t cfg;
  ctrl_cmd_t cmd;
  logic [3:0] ro_busy = 4'h1, ro_done = 4'h2, ovf = 4'h4, cemp = 4'h8, cful = 4'h3,
              eemp = 4'h5, eful = 4'h6, eaf = 4'h9, ao = 4'hA;
  logic irq_pending = 1, integ = 1, armed = 0, integ_done = 1;
  logic [31:0] turn_count = 32'h1234_5678;
  logic [2:0] power_good = 3'b101;
  logic [11:0] bcid = 12'd3000;
  int checks = 0, failures = 0;

  ctrl_regs dut (.clk, .rst, .wr, .addr, .wdata, .rdata, .cfg, .cmd, .ro_busy, .ro_done,
    .core_fifo_ovf(ovf), .core_fifo_empty(cemp), .core_fifo_full(cful), .ext_empty(eemp),
    .ext_full(eful), .ext_afull(eaf), .ao, .irq_pending, .integ, .armed, .integ_done,
    .turn_count, .power_good, .bcid);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("fail: %s at %0t", what, $time); end
  endtask


  task automatic write(int a, logic [31:0] d);
    @(negedge clk); wr = 1; addr = 5'(a); wdata = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic expect_reg(int a, logic [31:0] e, string what);
    @(negedge clk); addr = 5'(a); #1;
    check(rdata === e, what);
  endtask

  int pulses [6];
  always @(posedge clk) if (!rst) begin
    if (cmd.global_reset)  pulses[0]++;
    if (cmd.start_integ)   pulses[1]++;
    if (cmd.stop_integ)    pulses[2]++;
    if (cmd.clear_mem)     pulses[3]++;
    if (cmd.clear_ao)      pulses[4]++;
    if (cmd.start_readout) pulses[5]++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // power-up values
    expect_reg(REG_BCID_MAX, 32'd3563, "bcid max reset");
    expect_reg(REG_BC_OFS_CORE, 32'd4, "core offset reset");
    expect_reg(REG_AO_TH, 32'd14, "threshold reset");
    expect_reg(REG_NUM_TURNS, 32'd1, "turns reset");
    expect_reg(REG_GEN_CTRL, 32'd0, "normal mode reset");
    expect_reg(REG_MODULE_ID, MODULE_ID, "module id");
    // read/write registers
    write(REG_GEN_CTRL, 32'hFFFF_FFFF);    expect_reg(REG_GEN_CTRL, 32'h1, "mode");
    check(cfg.mode == MODE_WINDOW, "mode output");
    write(REG_INPUT_SEL, 32'h2);           expect_reg(REG_INPUT_SEL, 32'h2, "input sel");
    check(cfg.in_sel == SEL_ONE, "in_sel output");
    write(REG_BC_OFS_CORE, 32'hABC);       expect_reg(REG_BC_OFS_CORE, 32'hABC, "core ofs");
    write(REG_BC_OFS_CTRL, 32'h123);       expect_reg(REG_BC_OFS_CTRL, 32'h123, "ctrl ofs");
    write(REG_BCID_MAX, 32'h7);            expect_reg(REG_BCID_MAX, 32'h7, "bcid max");
    check(cfg.bcid_max == 7, "bcid max output");
    write(REG_AO_TH, 32'h5);               expect_reg(REG_AO_TH, 32'h5, "ao th");
    write(REG_NUM_TURNS, 32'hFFFF_FFFF);   expect_reg(REG_NUM_TURNS, 32'h3FFF_FFFF, "turns");
    write(REG_IRQ_CFG, 32'h0001_A503);     expect_reg(REG_IRQ_CFG, 32'h0001_A503, "irq cfg");
    check(cfg.irq_level == 3 && cfg.irq_vector == 8'hA5 && cfg.irq_enable, "irq outputs");
    write(REG_SCRATCH, 32'hDEAD_BEEF);     expect_reg(REG_SCRATCH, 32'hDEAD_BEEF, "scratch");
    // status
    expect_reg(REG_RO_STATUS, 32'h0000_0421, "readout status");
    expect_reg(REG_FIFO_STATUS, 32'h0003_8965, "fifo status");
    expect_reg(REG_TURN_COUNT, 32'h1234_5678, "turn count");
    expect_reg(REG_INTEG_STATUS, 32'h5, "integration status");
    expect_reg(REG_POWER_GOOD, 32'h5, "power good");
    expect_reg(REG_BCID, 32'd3000, "bcid");
    expect_reg(REG_AO_STATUS, 32'h1A, "ao status");
    // commands: one pulse each
    write(REG_COMMAND, 32'h1);
    write(REG_COMMAND, 32'h2);
    write(REG_COMMAND, 32'h4);
    write(REG_COMMAND, 32'h8);
    write(REG_START_RO, 32'h1);
    write(REG_GLOBAL_RESET, 32'h1);
    repeat (3) @(negedge clk);
    foreach (pulses[i]) check(pulses[i] == 1, "one command pulse");
    expect_reg(REG_COMMAND, 32'h0, "command reads 0");
    // global reset does not touch the registers (only rst does)
    expect_reg(REG_SCRATCH, 32'hDEAD_BEEF, "scratch kept");
    rst = 1; @(negedge clk); rst = 0;
    expect_reg(REG_BCID_MAX, 32'd3563, "bcid max after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
