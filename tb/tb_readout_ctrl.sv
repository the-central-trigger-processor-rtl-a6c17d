// tb_readout_ctrl: runs a readout of 40 channels over turns of 8 bunches and checks
// the word stream: Header 1 with the PIT code and the BCID of the next P word,
// Headers 2/3 with the turn count latched at start, then 8 P words of consecutive
// bunches per channel whose contents match the memory pattern, channels in order.
// Also checks that the first word is written 4 cycles after start, that words come
// one per clock without gaps, and busy/done.
module tb_readout_ctrl;
  import ctp_mon_pkg::*;
  localparam int NCH = 40, CORE = 2, NB = 8;
  logic clk = 0, rst = 1, start = 0;
  logic [11:0] bcid_max = 12'(NB - 1), rd_bcid = 0;
  logic [NCH-1:0][P_W:0] rd_data;
  logic [31:0] turn_count = 32'h0003_0005;
  logic fifo_wr, busy, done;
  logic [31:0] fifo_wdata;
  int checks = 0, failures = 0;

  readout_ctrl #(.NCH(NCH), .CORE_ID(CORE)) dut (.clk, .rst, .start, .bcid_max, .rd_bcid,
    .rd_data, .turn_count, .fifo_wr, .fifo_wdata, .busy, .done);
  always #5 clk = ~clk;

  function automatic logic [P_W:0] pat(int c, int b);
    return {1'((c + b) % 3 == 0), 30'(c * 100000 + b * 7 + 1)};
  endfunction

  always_comb for (int c = 0; c < NCH; c++) rd_data[c] = pat(c, int'(rd_bcid));
  always @(posedge clk) rd_bcid <= (rd_bcid == bcid_max) ? '0 : rd_bcid + 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s at %0t", what, $time); end
  endtask

  logic [31:0] words [$];
  int first_wr_cycle = -1, last_wr_cycle = -1, cyc = 0, start_cycle = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_wr && !rst) begin
      words.push_back(fifo_wdata);
      if (first_wr_cycle < 0) first_wr_cycle = cyc;
      last_wr_cycle = cyc;
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1; start_cycle = cyc;
    @(negedge clk);
    start = 0;
    turn_count = 32'hFFFF_FFFF;   // must not reach the headers
    check(busy, "busy after start");
    wait (done);
    repeat (6) @(negedge clk);
    check(!busy, "not busy at end");
    check(first_wr_cycle == start_cycle + 4, "latency start to first word = 4");
    check(last_wr_cycle - first_wr_cycle + 1 == NCH * (NB + 3), "one word per clock");
    check(words.size() == NCH * (NB + 3), "word count");
    for (int c = 0; c < NCH && words.size() >= (c + 1) * (NB + 3); c++) begin
      int base, b0;
      logic [31:0] h1;
      base = c * (NB + 3);
      h1 = words[base];
      b0 = int'(h1[11:0]);
      check(h1[31:29] == 3'b100 && h1[20:13] == 8'(CORE * NCH + c) && !h1[12] &&
            h1[28:21] == 0, "header 1");
      check(words[base + 1] == {3'b101, 13'd0, 16'h0005}, "header 2");
      check(words[base + 2] == {3'b110, 13'd0, 16'h0003}, "header 3");
      for (int k = 0; k < NB; k++) begin
        logic [P_W:0] p;
        p = pat(c, (b0 + k) % NB);
        check(words[base + 3 + k] == {1'b0, p}, "P word");
      end
    end
    // a second readout starting at another phase
    words.delete(); first_wr_cycle = -1;
    @(negedge clk); @(negedge clk);
    start = 1; start_cycle = cyc;
    @(negedge clk); start = 0;
    check(!done, "done cleared by start");
    wait (done);
    repeat (6) @(negedge clk);
    check(first_wr_cycle == start_cycle + 4 && words.size() == NCH * (NB + 3), "second readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
