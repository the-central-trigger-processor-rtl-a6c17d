// tb_idt_wr_ctrl: a Core FIFO feeds idt_wr_ctrl, which fills a small model of the
// external FIFO (depth 64, almost-full offset 8) that is emptied slowly. Checks:
// every word arrives once and in order, no word is written into a full FIFO, the
// machine writes at one word per clock while there is room (40 MHz rate), and the
// throttled near-full mode is entered.
module tb_idt_wr_ctrl;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic wr, fifo_rd, fifo_empty, fifo_full, ovf;
  logic [31:0] wdata, fifo_rdata;
  logic idt_ff_n, idt_paf_n, idt_wen_n, idt_ren_n, idt_ef_n;
  logic [39:0] idt_d, idt_q;
  int unsigned idt_count, idt_lost;

  sync_fifo #(.W(32), .DEPTH(256)) cf (.clk, .rst, .wr, .wdata, .rd(fifo_rd), .rdata(fifo_rdata),
                                       .empty(fifo_empty), .full(fifo_full), .count(), .overflow(ovf));
  idt_wr_ctrl dut (.clk, .rst, .fifo_empty, .fifo_rd, .fifo_rdata, .idt_ff_n, .idt_paf_n,
                   .idt_wen_n, .idt_d);
  idt_fifo_model #(.W(40), .DEPTH(64), .PAF_OFFSET(8)) idt (
    .clk, .rst, .wen_n(idt_wen_n), .d(idt_d), .ff_n(idt_ff_n), .paf_n(idt_paf_n),
    .ren_n(idt_ren_n), .q(idt_q), .ef_n(idt_ef_n), .count(idt_count), .lost(idt_lost));

  int n_wr = 0, n_rd = 0, burst = 0, max_burst = 0, throttled = 0;
  bit rd_pend;
  logic [31:0] expq [$];

  initial begin
    wr = 0; wdata = 0; idt_ren_n = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    rd_pend = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (rd_pend) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (idt_q !== {8'd0, e}) begin
          failures++;
          if (failures < 10) $display("t=%0d q=%h exp=%h", t, idt_q, e);
        end
      end
      if (!idt_wen_n) begin burst++; if (burst > max_burst) max_burst = burst; end
      else burst = 0;
      if (dut.state == dut.S_THROTTLE) throttled++;
      // write 200 words at full rate at the start and 200 later
      wr = (t < 200) || (t >= 1500 && t < 1700);
      wdata = 32'(n_wr) ^ 32'hA5A5_0000;
      if (wr) begin expq.push_back(wdata); n_wr++; end
      // drain slowly from t=300
      idt_ren_n = !(t > 300 && ($urandom % 5 == 0) && idt_ef_n);
      rd_pend = !idt_ren_n;
    end
    // drain the rest
    for (int t = 0; t < 3000 && expq.size() > 0; t++) begin
      @(negedge clk);
      if (rd_pend) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (idt_q !== {8'd0, e}) failures++;
      end
      idt_ren_n = !idt_ef_n;
      rd_pend = !idt_ren_n;
    end
    checks++;
    if (expq.size() != 0 || idt_lost != 0) begin
      failures++;
      $display("left=%0d lost=%0d", expq.size(), idt_lost);
    end
    checks++;
    if (max_burst < 40) begin failures++; $display("max burst %0d", max_burst); end
    checks++;
    if (throttled == 0) begin failures++; $display("never throttled"); end
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
