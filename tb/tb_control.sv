// tb_control: the Control FPGA seen from the VMEbus. Through VME cycles it programs
// the registers and checks what reaches the Core FPGAs (core_ctrl), runs a WINDOW
// integration of 3 turns of 8 bunches and a NORMAL one, reads the turn count, raises
// an interrupt from a core's almost overflow flag and acknowledges it, reads an
// external FIFO stand-in by block transfer and pulses the global reset.
module tb_control;
  import ctp_mon_pkg::*;
  localparam int NB = 8;
  logic clk = 0, rst = 1, orbit = 0;
  always #5 clk = ~clk;

  logic as_n, write_n, lword_n, iack_n, d_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] addr;
  logic [31:0] d_m2s, d_s2m;
  logic [7:1] irq_n;
  core_ctrl_t core_ctrl;
  logic core_rst;
  core_status_t [3:0] core_status;
  logic [3:0] idt_ren_n, idt_ef_n, idt_ff_n = '1, idt_paf_n = '1;
  logic [3:0][39:0] idt_q;
  int checks = 0, failures = 0;

  control dut (.clk, .rst, .orbit, .power_good(3'b111), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_am(am), .vme_addr(addr), .vme_lword_n(lword_n),
    .vme_iack_n(iack_n), .vme_iackin_n(iack_n), .vme_d_in(d_m2s), .vme_d_out(d_s2m),
    .vme_d_oe(d_oe), .vme_dtack_n(dtack_n), .vme_iackout_n(iackout_n), .vme_irq_n(irq_n),
    .core_ctrl, .core_rst, .core_status, .idt_ren_n, .idt_q, .idt_ef_n, .idt_ff_n, .idt_paf_n);
  vme_master m (.clk, .as_n, .ds_n, .write_n, .am, .addr, .lword_n, .iack_n, .d(d_m2s),
                .d_in(d_s2m), .d_oe, .dtack_n);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    orbit <= ((cyc + 1) % NB == 0);
  end

  // external FIFO stand-in for core 2
  logic [31:0] fq [$];
  always_comb begin
    idt_ef_n = '0;
    idt_ef_n[2] = (fq.size() != 0);
  end
  always @(posedge clk) if (!idt_ren_n[2] && fq.size() > 0) idt_q[2] <= {8'd0, fq.pop_front()};

  // window length as seen by the cores
  int win = 0, last_win = 0;
  logic integ_q = 0;
  always @(negedge clk) begin
    if (core_ctrl.integ) win++;
    if (!core_ctrl.integ && integ_q) begin last_win = win; win = 0; end
    integ_q = core_ctrl.integ;
  end
  int rst_pulses = 0;
  logic core_rst_q = 1;
  always @(negedge clk) begin
    if (!rst && core_rst && !core_rst_q) rst_pulses++;
    core_rst_q = core_rst;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("fail: %s at %0t", what, $time); end
  endtask

  localparam logic [31:0] B = 32'h1000_0000;

  initial begin
    logic [31:0] v;
    logic [31:0] q [$];
    core_status = '0;
    idt_q = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    m.read32(B + 4 * REG_MODULE_ID, v);
    check(v == MODULE_ID, "module id");
    m.write32(B + 4 * REG_BCID_MAX, NB - 1);
    m.write32(B + 4 * REG_BC_OFS_CORE, 3);
    m.write32(B + 4 * REG_AO_TH, 9);
    m.write32(B + 4 * REG_INPUT_SEL, 2);
    repeat (2) @(negedge clk);
    check(core_ctrl.bcid_max == NB - 1 && core_ctrl.bc_ofs == 3 && core_ctrl.ao_th == 9 &&
          core_ctrl.in_sel == SEL_ONE, "configuration reaches the cores");
    // WINDOW mode, 3 turns
    m.write32(B + 4 * REG_GEN_CTRL, 1);
    m.write32(B + 4 * REG_NUM_TURNS, 3);
    m.write32(B + 4 * REG_COMMAND, 1);
    repeat (6 * NB) @(negedge clk);
    m.read32(B + 4 * REG_INTEG_STATUS, v);
    check(v[2] && !v[0], "window done");
    m.read32(B + 4 * REG_TURN_COUNT, v);
    check(v == 3 && last_win == 3 * NB, "3 turns integrated");
    check(core_ctrl.turn_count == 3, "turn count to the cores");
    // NORMAL mode
    m.write32(B + 4 * REG_GEN_CTRL, 0);
    m.write32(B + 4 * REG_COMMAND, 1);
    repeat (5 * NB) @(negedge clk);
    m.write32(B + 4 * REG_COMMAND, 2);
    repeat (3 * NB) @(negedge clk);
    m.read32(B + 4 * REG_TURN_COUNT, v);
    check(v >= 5 && v <= 8 && last_win == int'(v) * NB, "normal mode whole turns");
    // interrupt from core 1's almost overflow flag
    m.write32(B + 4 * REG_IRQ_CFG, 32'h0001_7702);
    core_status[1].ao = 1;
    repeat (4) @(negedge clk);
    check(irq_n[2] == 0, "IRQ2 requested");
    m.read32(B + 4 * REG_AO_STATUS, v);
    check(v[1] && v[4], "AO status");
    m.iack_cycle(3'd2, v);
    check(v[7:0] == 8'h77 && irq_n == 7'h7F, "acknowledged with vector");
    // commands reach the cores as pulses
    fork
      m.write32(B + 4 * REG_COMMAND, 32'hC);
      begin
        bit seen_clr, seen_ao;
        seen_clr = 0; seen_ao = 0;
        repeat (20) begin
          @(negedge clk);
          if (core_ctrl.clear_mem) seen_clr = 1;
          if (core_ctrl.clear_ao) seen_ao = 1;
        end
        check(seen_clr && seen_ao, "clear pulses");
      end
    join
    // FIFO block transfer from the external FIFO of core 2
    for (int i = 0; i < 30; i++) fq.push_back(32'h8000_0000 | i);
    m.blt_read(B + 32'h0012_0000, 30, q);
    begin
      bit ok;
      ok = q.size() == 30;
      foreach (q[i]) if (q[i] != (32'h8000_0000 | i)) ok = 0;
      check(ok, "FIFO block transfer");
    end
    // global reset
    m.write32(B + 4 * REG_GLOBAL_RESET, 1);
    repeat (3) @(negedge clk);
    check(rst_pulses == 1, "global reset pulse");
    m.read32(B + 4 * REG_TURN_COUNT, v);
    check(v == 0, "turn count reset by global reset");
    check(m.timeouts == 0, "all cycles answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
