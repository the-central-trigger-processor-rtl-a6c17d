// tb_core_processing: one Core FPGA of 40 channels, turns of 8 bunches (BCID max 7).
// The memory is cleared, then the window level is raised and lowered in mid-turn so
// that exactly 4 whole turns must be integrated, with the PTC pattern alternating between 0xAAAAAAAAAA and
// 0x5555555555 from bunch to bunch, and the readout is started. The words arriving
// in a model of the external FIFO (depth 256, emptied slowly so that flow control is
// exercised) must be, per channel, Header 1/2/3 and P words of 4 or 0. A second
// window with the constant-1 input adds 3 to every counter. A third readout runs
// while a constant-1 window is open and checks that each channel's words are a
// consistent snapshot (one turn apart across BCID 0). A counter preset near
// the top then sets the almost overflow flag, and clear_ao clears it.
module tb_core_processing;
  import ctp_mon_pkg::*;
  localparam int NCH = 40, NB = 8;
  logic clk = 0, rst = 1, orbit = 0;
  logic [NCH-1:0] ptc;
  core_ctrl_t ctrl;
  core_status_t status;
  logic [11:0] bcid;
  logic idt_wen_n, idt_ff_n, idt_paf_n, idt_ren_n = 1, idt_ef_n;
  logic [39:0] idt_d, idt_q;
  int unsigned idt_count, idt_lost;
  int checks = 0, failures = 0;

  core_processing #(.NCH(NCH), .CORE_ID(1)) dut (.clk, .rst, .orbit, .ptc, .ctrl, .status, .bcid,
    .idt_wen_n, .idt_d, .idt_ff_n, .idt_paf_n);
  idt_fifo_model #(.DEPTH(256)) idt (.clk, .rst, .wen_n(idt_wen_n), .d(idt_d), .ff_n(idt_ff_n),
    .paf_n(idt_paf_n), .ren_n(idt_ren_n), .q(idt_q), .ef_n(idt_ef_n), .count(idt_count),
    .lost(idt_lost));
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    orbit <= ((cyc + 1) % NB == 0);
  end
  // decoded inputs for the bunch the core is at
  assign ptc = bcid[0] ? {NCH/2{2'b01}} : {NCH/2{2'b10}};

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("fail: %s at %0t", what, $time); end
  endtask

  // slow reader of the external FIFO
  logic [31:0] words [$];
  bit rd_pend = 0, reading = 0;
  always @(negedge clk) begin
    if (rd_pend) words.push_back(idt_q[31:0]);
    idt_ren_n = !(reading && idt_ef_n && ($urandom % 3 == 0));
    rd_pend = !idt_ren_n;
  end

  task automatic pulse(string which);
    @(negedge clk);
    case (which)
      "clear": ctrl.clear_mem = 1;
      "ro":    ctrl.start_readout = 1;
      "ao":    ctrl.clear_ao = 1;
      default: ;
    endcase
    @(negedge clk);
    ctrl.clear_mem = 0; ctrl.start_readout = 0; ctrl.clear_ao = 0;
  endtask

  task automatic readout_and_check(int expect_odd, int expect_even, logic [31:0] turns);
    int nw;
    words.delete();
    ctrl.turn_count = turns;
    pulse("ro");
    reading = 1;
    wait (status.ro_done);
    nw = NCH * (NB + 3);
    for (int i = 0; i < 20000 && words.size() < nw; i++) @(negedge clk);
    reading = 0;
    repeat (5) @(negedge clk);
    check(words.size() == nw, "word count");
    check(idt_lost == 0 && !status.fifo_ovf, "nothing lost");
    for (int c = 0; c < NCH && words.size() == nw; c++) begin
      int base, b0;
      base = c * (NB + 3);
      b0 = int'(words[base][11:0]);
      check(words[base][31:29] == 3'b100 && words[base][20:13] == 8'(NCH + c), "header 1");
      check(words[base + 1] == {3'b101, 13'd0, turns[15:0]}, "header 2");
      check(words[base + 2] == {3'b110, 13'd0, turns[31:16]}, "header 3");
      for (int k = 0; k < NB; k++) begin
        int b, e;
        b = (b0 + k) % NB;
        e = ((c + b) % 2 == 1) ? expect_odd : expect_even;
        check(words[base + 3 + k] == 32'(e), "P word");
      end
    end
  endtask


  // readout while a constant-1 window is open: every counter gains one per turn, so
  // within one channel the bunches read before the next BCID 0 show n turns and
  // those read after it n+1 turns, and n never falls from one channel to the next
  int live_steps = 0;
  task automatic readout_live_check(int base_odd, int base_even);
    int nw, prev;
    words.delete();
    pulse("ro");
    reading = 1;
    wait (status.ro_done);
    nw = NCH * (NB + 3);
    for (int i = 0; i < 20000 && words.size() < nw; i++) @(negedge clk);
    reading = 0;
    repeat (5) @(negedge clk);
    check(words.size() == nw, "live word count");
    prev = 0;
    for (int c = 0; c < NCH && words.size() == nw; c++) begin
      int base, b0, n_first, n_last;
      base = c * (NB + 3);
      b0 = int'(words[base][11:0]);
      check(words[base][31:29] == 3'b100 && words[base][20:13] == 8'(NCH + c), "live header 1");
      for (int k = 0; k < NB; k++) begin
        int b, n;
        b = (b0 + k) % NB;
        n = int'(words[base + 3 + k]) - (((c + b) % 2 == 1) ? base_odd : base_even);
        if (k == 0) n_first = n;
        if (b == 0) n_last = n;
        if (b >= b0) check(n == n_first, "live: same turn before BCID 0");
        else         check(n == n_last, "live: same turn after BCID 0");
      end
      if (b0 != 0) check(n_last == n_first + 1, "live: one turn more after BCID 0");
      check(n_first >= prev, "live: counts never fall");
      if (n_first > prev) live_steps++;
      prev = (b0 != 0) ? n_last : n_first;
    end
  endtask

  initial begin
    ctrl = '0;
    ctrl.bcid_max = 12'(NB - 1);
    ctrl.bc_ofs = 0;
    ctrl.in_sel = SEL_PTC;
    ctrl.ao_th = 4'd14;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    pulse("clear");
    repeat (3 * NB) @(negedge clk);
    // the memory held arbitrary values before the clear, which may have set the flag
    pulse("ao");
    // window level raised at bunch 3 and held 4 turns + 2 bunches: only the 4 whole
    // turns that start inside it may be integrated
    wait (bcid == 12'd3);
    @(negedge clk);
    ctrl.integ = 1;
    repeat (4 * NB + 2) @(negedge clk);
    ctrl.integ = 0;
    repeat (2 * NB) @(negedge clk);
    readout_and_check(4, 0, 32'd4);
    check(!status.ao, "no almost overflow yet");
    // 3 turns of the constant-1 input
    ctrl.in_sel = SEL_ONE;
    ctrl.integ = 1;
    repeat (3 * NB) @(negedge clk);
    ctrl.integ = 0;
    repeat (2 * NB) @(negedge clk);
    readout_and_check(7, 3, 32'h0002_0003);
    // readout during integration
    ctrl.integ = 1;
    repeat (NB) @(negedge clk);
    readout_live_check(7, 3);
    ctrl.integ = 0;
    check(live_steps > 10, "live readout saw the counts grow");
    repeat (2 * NB) @(negedge clk);
    // almost overflow: preset channel 7, bunch 4 near the top, one more turn of ones
    wait (bcid == 12'd2);
    @(negedge clk);
    dut.g_ch[7].u_cell.u_mem.mem[4] = {1'b0, 30'h3C00_0000};
    ctrl.integ = 1;
    repeat (NB + 2) @(negedge clk);
    ctrl.integ = 0;
    repeat (2 * NB) @(negedge clk);
    check(status.ao, "almost overflow set");
    pulse("ao");
    repeat (2) @(negedge clk);
    check(!status.ao, "almost overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
