// ctp_mon_harness: end-to-end test bench body for ctp_mon_top, shared by the short
// test (8 bunches per turn) and the full-size test (3564 bunches).
//
// It drives the 160-bit PIT bus with a pattern alternating between 0xAAAA... and
// 0x5555... from bunch to bunch, sends ORBIT once per turn, models the four external
// FIFOs (depth IDT_DEPTH) and drives the VMEbus with a master model. Everything is
// done through VME cycles, as software would: program BCID max, clear the memory,
// integrate a WINDOW of 5 turns, start the readout and read the four FIFOs by block
// transfer. Every word read is compared with the expected headers and counts (5 or
// 0). With EXTRA set it also runs a NORMAL-mode window with the constant-1 input, an
// almost overflow interrupt and its acknowledge, and a global reset. It counts how
// often each mechanism happened and counts a failure for any that never did.
module ctp_mon_harness #(
  parameter int NB        = 8,       // bunches per turn (BCID max + 1)
  parameter int IDT_DEPTH = 256,     // external FIFO depth
  parameter bit EXTRA     = 1,
  parameter int WATCHDOG  = 200000
);
  import ctp_mon_pkg::*;
  localparam int NCORE = 4, NCH = 40, NPIT = 160;
  localparam logic [31:0] B = 32'h1000_0000;

  logic clk = 0, rst_n = 0, orbit = 0;
  always #12.5 clk = ~clk;   // 40 MHz bunch clock

  logic [NPIT-1:0] pit;
  logic as_n, write_n, lword_n, iack_n, d_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] addr;
  logic [31:0] d_m2s, d_s2m;
  logic [7:1] irq_n;
  logic [NCORE-1:0] idt_wen_n, idt_ff_n, idt_paf_n, idt_ren_n, idt_ef_n;
  logic [NCORE-1:0][39:0] idt_d, idt_q;
  int unsigned idt_count [NCORE], idt_lost [NCORE];
  int checks = 0, failures = 0;

  ctp_mon_top dut (.clk, .rst_n, .orbit, .pit, .power_good(3'b111), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am), .vme_addr(addr),
    .vme_lword_n(lword_n), .vme_iack_n(iack_n), .vme_iackin_n(iack_n), .vme_d_in(d_m2s),
    .vme_d_out(d_s2m), .vme_d_oe(d_oe), .vme_dtack_n(dtack_n), .vme_iackout_n(iackout_n),
    .vme_irq_n(irq_n), .idt_wen_n, .idt_d, .idt_ff_n, .idt_paf_n, .idt_ren_n, .idt_q,
    .idt_ef_n);

  for (genvar k = 0; k < NCORE; k++) begin : g_idt
    idt_fifo_model #(.DEPTH(IDT_DEPTH)) u_idt (.clk, .rst(!rst_n), .wen_n(idt_wen_n[k]),
      .d(idt_d[k]), .ff_n(idt_ff_n[k]), .paf_n(idt_paf_n[k]), .ren_n(idt_ren_n[k]),
      .q(idt_q[k]), .ef_n(idt_ef_n[k]), .count(idt_count[k]), .lost(idt_lost[k]));
  end

  vme_master m (.clk, .as_n, .ds_n, .write_n, .am, .addr, .lword_n, .iack_n, .d(d_m2s),
                .d_in(d_s2m), .d_oe, .dtack_n);

  // bunch numbering: ORBIT is high in cycles with cyc % NB == 0 and the PIT of bunch
  // b is presented in cycles with (cyc - 1) % NB == b; the Core BCID offset of 4
  // (the power-up value) lines the decoded bits up with the Core BCID.
  int cyc = 0;
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    orbit <= ((cyc + 1) % NB == 0);
    pit   <= (((cyc + 1 - 1) % NB) % 2 == 0) ? {NPIT/2{2'b10}} : {NPIT/2{2'b01}};
  end

  // mechanism counters
  int n_clear = 0, n_window = 0, n_normal = 0, n_one = 0, n_readout = 0;
  int n_ext_full = 0, n_throttle = 0, n_core_fifo_hold = 0, n_irq = 0, n_iack = 0, n_greset = 0;
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NCORE; k++) begin
      if (!idt_ff_n[k]) n_ext_full++;
      if (!dut.core_status[k].fifo_empty && !idt_paf_n[k]) n_core_fifo_hold++;
    end
    if (dut.g_core[0].u_core.u_idt_wr.state == 2'd2) n_throttle++;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("fail: %s at %0t", what, $time); end
  endtask

  task automatic wr(int r, logic [31:0] v); m.write32(B + 32'(4 * r), v); endtask
  task automatic rd(int r, output logic [31:0] v); m.read32(B + 32'(4 * r), v); endtask

  task automatic wait_status(int r, logic [31:0] mask, logic [31:0] value, int max_polls);
    logic [31:0] v;
    int n;
    n = 0;
    do begin
      repeat (NB) @(negedge clk);
      rd(r, v);
      n++;
    end while ((v & mask) != value && n < max_polls);
    check((v & mask) == value, "status reached");
  endtask

  // read the histograms of all cores and compare: P = odd_val where channel+bunch
  // is odd, even_val otherwise
  task automatic read_and_check(int odd_val, int even_val, logic [31:0] turns);
    int nw;
    nw = NCH * (NB + 3);
    wr(REG_START_RO, 1);
    n_readout++;
    wait_status(REG_RO_STATUS, 32'hFF, 32'hF0, 100 + 4 * NB);
    for (int k = 0; k < NCORE; k++) begin
      logic [31:0] q [$];
      int bad;
      bad = 0;
      m.blt_read(B + 32'h0010_0000 + 32'(k << 16), nw, q);
      for (int c = 0; c < NCH; c++) begin
        int base, b0;
        base = c * (NB + 3);
        b0 = int'(q[base][11:0]);
        if (q[base] != {3'b100, 8'd0, 8'(k * NCH + c), 1'b0, 12'(b0)} || b0 >= NB) bad++;
        if (q[base + 1] != {3'b101, 13'd0, turns[15:0]}) bad++;
        if (q[base + 2] != {3'b110, 13'd0, turns[31:16]}) bad++;
        for (int j = 0; j < NB; j++) begin
          int b;
          b = (b0 + j) % NB;
          if (q[base + 3 + j] != 32'(((c + b) % 2 == 1) ? odd_val : even_val)) bad++;
        end
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("core %0d: %0d wrong words", k, bad);
      end
      check(idt_lost[k] == 0 && idt_ef_n[k] == 0, "external FIFO emptied, nothing lost");
    end
  endtask

  initial begin
    logic [31:0] v;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    rd(REG_MODULE_ID, v);
    check(v == MODULE_ID, "module answers");
    wr(REG_BCID_MAX, NB - 1);
    // 1) reset the memory, then clear flags the old contents may have raised
    wr(REG_COMMAND, 32'h4);
    n_clear++;
    repeat (3 * NB + 20) @(negedge clk);
    wr(REG_COMMAND, 32'h8);
    wr(REG_IRQ_CFG, 32'h0001_4203);
    // 2) WINDOW mode, 5 turns, counting the PTC bits
    wr(REG_GEN_CTRL, 1);
    wr(REG_NUM_TURNS, 5);
    wr(REG_COMMAND, 32'h1);
    n_window++;
    wait_status(REG_INTEG_STATUS, 32'h7, 32'h4, 20);
    rd(REG_TURN_COUNT, v);
    check(v == 5, "5 turns integrated");
    repeat (2 * NB + 10) @(negedge clk);
    // 3) readout through the FIFOs and VME
    read_and_check(5, 0, 32'd5);
    if (EXTRA) begin
      logic [31:0] turns;
      // NORMAL mode with the constant-1 input
      wr(REG_INPUT_SEL, 2);
      n_one++;
      wr(REG_GEN_CTRL, 0);
      wr(REG_COMMAND, 32'h1);
      n_normal++;
      repeat (4 * NB) @(negedge clk);
      wr(REG_COMMAND, 32'h2);
      wait_status(REG_INTEG_STATUS, 32'h7, 32'h4, 20);
      rd(REG_TURN_COUNT, turns);
      check(turns >= 2, "normal mode turns");
      repeat (2 * NB + 10) @(negedge clk);
      read_and_check(5 + int'(turns), int'(turns), turns);
      // almost overflow interrupt: preset one counter of core 2 near the top and
      // integrate one more turn
      check(irq_n == 7'h7F, "no interrupt yet");
      wait (dut.g_core[2].u_core.bcid == 12'd2);
      @(negedge clk);
      dut.g_core[2].u_core.g_ch[5].u_cell.u_mem.mem[4] = {1'b0, 30'h3FFF_FF00};
      wr(REG_NUM_TURNS, 1);
      wr(REG_GEN_CTRL, 1);
      wr(REG_COMMAND, 32'h1);
      wait_status(REG_INTEG_STATUS, 32'h7, 32'h4, 20);
      repeat (2 * NB + 10) @(negedge clk);
      check(irq_n[3] == 0, "interrupt requested");
      if (irq_n[3] == 0) n_irq++;
      m.iack_cycle(3'd3, v);
      check(v[7:0] == 8'h42 && irq_n == 7'h7F, "interrupt acknowledged");
      if (v[7:0] == 8'h42) n_iack++;
      rd(REG_AO_STATUS, v);
      check(v[3:0] == 4'b0100, "AO flag of core 2");
      // global reset clears the turn counter, not the registers; the counter near the
      // top raises the flag again until the memory is cleared
      wr(REG_GLOBAL_RESET, 1);
      n_greset++;
      repeat (4) @(negedge clk);
      wr(REG_COMMAND, 32'h4);
      repeat (3 * NB + 20) @(negedge clk);
      wr(REG_COMMAND, 32'h8);
      rd(REG_AO_STATUS, v);
      check(v[3:0] == 0, "AO flags cleared after the memory");
      rd(REG_TURN_COUNT, v);
      check(v == 0, "turn count reset");
      rd(REG_BCID_MAX, v);
      check(v == NB - 1, "registers kept");
    end
    check(m.timeouts == 0 && m.oe_errors == 0, "all VME cycles answered");
    // every mechanism must have happened
    check(n_clear > 0 && n_window > 0 && n_readout > 0, "clear, window, readout");
    check(n_ext_full > 0, "external FIFO full (handshake phase)");
    check(n_core_fifo_hold > 0, "Core FIFO holding data while the external FIFO is full");
    check(n_throttle > 0, "write control throttled near full");
    if (EXTRA) check(n_normal > 0 && n_one > 0 && n_irq > 0 && n_iack > 0 && n_greset > 0,
                     "normal mode, constant input, interrupt, acknowledge, global reset");
    $display("mechanisms: clear=%0d window=%0d normal=%0d one=%0d readout=%0d ext_full=%0d hold=%0d throttle=%0d irq=%0d iack=%0d greset=%0d",
             n_clear, n_window, n_normal, n_one, n_readout, n_ext_full, n_core_fifo_hold,
             n_throttle, n_irq, n_iack, n_greset);
    $display("cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
