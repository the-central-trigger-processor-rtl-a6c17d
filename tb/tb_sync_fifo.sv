// tb_sync_fifo: random writes and reads on a small FIFO (depth 12, not a power of
// two) and on the default 12k depth, compared with a queue; full, empty, count
// and the sticky overflow flag are checked, and the full FIFO is filled to the top.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // small instance
  logic wr, rd, empty, full, ovf;
  logic [31:0] wdata, rdata;
  logic [4:0] count;
  sync_fifo #(.W(32), .DEPTH(12)) dut (.clk, .rst, .wr, .wdata, .rd, .rdata, .empty, .full,
                                       .count, .overflow(ovf));
  // default-size instance
  logic wr2, rd2, empty2, full2, ovf2;
  logic [31:0] wdata2, rdata2;
  logic [14:0] count2;
  sync_fifo big (.clk, .rst, .wr(wr2), .wdata(wdata2), .rd(rd2), .rdata(rdata2), .empty(empty2),
                 .full(full2), .count(count2), .overflow(ovf2));

  logic [31:0] q [$];
  logic [31:0] q2 [$];
  bit rd_pend, rd_pend2;
  logic [31:0] exp_rd, exp_rd2;
  bit exp_ovf;
  int fulls = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s at %0t", what, $time); end
  endtask

  initial begin
    wr = 0; rd = 0; wdata = 0; wr2 = 0; rd2 = 0; wdata2 = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    exp_ovf = 0; rd_pend = 0; rd_pend2 = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // results of the previous edge
      if (rd_pend) check(rdata === exp_rd, "small rdata");
      if (rd_pend2) check(rdata2 === exp_rd2, "big rdata");
      check(count == 5'(q.size()), "small count");
      check(empty == (q.size() == 0) && full == (q.size() == 12), "small flags");
      check(ovf == exp_ovf, "small overflow");
      check(count2 == 15'(q2.size()) && empty2 == (q2.size() == 0), "big count");
      if (full) fulls++;
      // new stimulus; phases bias towards filling and emptying
      wr = ((t / 500) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd = ((t / 500) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      wdata = $urandom;
      // a write is judged against the fill level before this cycle's read
      begin
        bit was_full;
        was_full = (q.size() == 12);
        rd_pend = rd && q.size() > 0;
        if (rd_pend) exp_rd = q.pop_front();
        if (wr && !was_full) q.push_back(wdata);
        if (wr && was_full) exp_ovf = 1;
      end
      wr2 = (t < 3000) ? 1'b1 : ($urandom % 2 == 0);
      rd2 = (t > 2000) && ($urandom % 2 == 0);
      wdata2 = $urandom;
      begin
        bit was_full2;
        was_full2 = (q2.size() == 12288);
        rd_pend2 = rd2 && q2.size() > 0;
        if (rd_pend2) exp_rd2 = q2.pop_front();
        if (wr2 && !was_full2) q2.push_back(wdata2);
      end
    end
    check(fulls > 0 && exp_ovf, "small FIFO reached full and overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
