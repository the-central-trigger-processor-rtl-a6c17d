// tb_hist_cell: checks one histogramming channel against a reference array.
//
// The channel is addressed as in a turn of 8 bunches (BCID max 7, as in short
// simulations of the module) and later 13 bunches. It is cleared for one turn, then
// integrates an alternating and a random PTC pattern, the constant 1 and the constant
// 0 inputs. Every cycle the word read (rd_data, one cycle after its address) is
// compared with the reference, and the word written (wr_p) with the reference five
// cycles after its address, which checks the 4-cycle adder latency. Two counters
// are preset near 2^30 to check the wrap and the sticky overflow bit.
module tb_hist_cell;
  import ctp_mon_pkg::*;
  logic clk = 0, rst = 1;
  logic [11:0] addr = 0;
  in_sel_e sel = SEL_ZERO;
  logic ptc = 0, clear = 0;
  logic [P_W:0] rd_data;
  logic [11:0] rd_addr;
  logic wr_valid;
  logic [P_W-1:0] wr_p;
  int checks = 0, failures = 0, overflows = 0;

  hist_cell dut (.clk, .rst, .addr, .sel, .ptc, .clear, .rd_data, .rd_addr, .wr_valid, .wr_p);
  always #5 clk = ~clk;

  logic [P_W:0] refm [16];
  // expected read word / written word, by cycle of arrival
  logic [P_W:0] exp_rd [$];
  logic [P_W:0] exp_wr [$];
  bit           chk_rd, chk_wr;
  int           nbc = 8;
  int           cyc = 0;

  // Called once per cycle, at the falling edge: first compares the outputs of this
  // cycle (the read issued one step ago, the write issued five steps ago), then
  // applies the inputs of this cycle and updates the reference.
  task automatic step(in_sel_e s, bit p, bit c);
    logic [P_W:0] old, nw;
    bit inc;
    @(negedge clk);
    if (chk_rd && exp_rd.size() >= 1) begin
      checks++;
      if (rd_data !== exp_rd[exp_rd.size() - 1]) begin
        failures++;
        if (failures < 10) $display("rd=%h exp=%h", rd_data, exp_rd[exp_rd.size() - 1]);
      end
    end
    if (chk_wr && exp_wr.size() >= 5) begin
      logic [P_W:0] e;
      e = exp_wr[exp_wr.size() - 5];
      checks++;
      if (!wr_valid || wr_p !== e[P_W-1:0]) begin
        failures++;
        if (failures < 10) $display("wr=%h exp=%h", wr_p, e);
      end
    end
    sel = s; ptc = p; clear = c;
    inc = (s == SEL_PTC) ? p : (s == SEL_ONE);
    old = refm[addr[3:0]];
    nw  = c ? '0 : {old[P_W] | (old[P_W-1:0] == '1 && inc), old[P_W-1:0] + P_W'(inc)};
    refm[addr[3:0]] = nw;
    if (nw[P_W] && !old[P_W]) overflows++;
    exp_rd.push_back(old);
    exp_wr.push_back(nw);
  endtask

  always @(posedge clk) if (!rst) addr <= (addr >= 12'(nbc - 1)) ? '0 : addr + 1;

  initial begin
    chk_rd = 0; chk_wr = 0;
    for (int i = 0; i < 16; i++) refm[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // clear one turn (plus margin); the memory starts with unknown contents
    repeat (2 * nbc) step(SEL_ZERO, 0, 1);
    repeat (8) step(SEL_ZERO, 0, 0);
    chk_rd = 1; chk_wr = 1;
    // alternating pattern for 5 turns: even cycles 1, odd 0
    for (int t = 0; t < 5 * nbc; t++) step(SEL_PTC, (t % 2) == 0, 0);
    for (int t = 0; t < 5 * nbc; t++) step(SEL_PTC, 1'($urandom), 0);
    for (int t = 0; t < 3 * nbc; t++) step(SEL_ONE, 1'($urandom), 0);
    for (int t = 0; t < 2 * nbc; t++) step(SEL_ZERO, 1'b1, 0);
    // preset bunches 2 and 3 near the top of the counter, then count ones
    @(negedge clk);
    chk_rd = 0; chk_wr = 0;
    wait (addr == 12'd0);
    @(posedge clk);
    #1;
    dut.u_mem.mem[2] = {1'b0, 30'h3FFF_FFFE};
    dut.u_mem.mem[3] = {1'b0, 30'h3FFF_FFFF};
    refm[2] = {1'b0, 30'h3FFF_FFFE};
    refm[3] = {1'b0, 30'h3FFF_FFFF};
    exp_rd.delete(); exp_wr.delete();
    // addr is 1 now: no write to bunches 2 and 3 is in flight
    for (int t = 0; t < 4 * nbc; t++) begin
      step(SEL_ONE, 0, 0);
      if (t == 8) begin chk_rd = 1; chk_wr = 1; end
    end
    // a longer turn of 13 bunches
    chk_rd = 0; chk_wr = 0;
    @(negedge clk);
    wait (addr == 12'd7);
    nbc = 13;
    repeat (2 * nbc) step(SEL_ZERO, 0, 1);
    repeat (8) step(SEL_ZERO, 0, 0);
    chk_rd = 1; chk_wr = 1;
    for (int t = 0; t < 6 * nbc; t++) step(SEL_PTC, 1'($urandom), 0);
    repeat (8) step(SEL_ZERO, 0, 0);
    if (overflows != 2) begin
      failures++;
      $display("expected 2 overflows, saw %0d", overflows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
