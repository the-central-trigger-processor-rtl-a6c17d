// tb_vmedec: runs VME cycles against vmedec with a register array and four FIFO
// queues standing in for the registers and external FIFOs. Checks single writes and
// reads, a block transfer over the registers, block-transfer reads of two FIFOs,
// reading an empty FIFO, cycles for another base address or address modifier (no
// DTACK*), the interrupt request, its acknowledge with the vector and the daisy-chain
// pass-through for another level, and the DTACK* latency.
module tb_vmedec;
  import ctp_mon_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic as_n, write_n, lword_n, iack_n, iackin_n, d_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] addr;
  logic [31:0] d_m2s, d_s2m;
  logic [7:1] irq_n;
  logic reg_wr;
  logic [4:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [3:0] fifo_ren, fifo_empty;
  logic [3:0][31:0] fifo_q;
  logic irq_req = 0, irq_pending;
  logic [2:0] irq_level = 3'd3;
  logic [7:0] irq_vector = 8'h5C;
  int checks = 0, failures = 0;

  vmedec #(.BASE(8'h10)) dut (.clk, .rst, .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_am(am), .vme_addr(addr), .vme_lword_n(lword_n), .vme_iack_n(iack_n),
    .vme_iackin_n(iackin_n), .vme_d_in(d_m2s), .vme_d_out(d_s2m), .vme_d_oe(d_oe),
    .vme_dtack_n(dtack_n), .vme_iackout_n(iackout_n), .vme_irq_n(irq_n), .reg_wr, .reg_addr,
    .reg_wdata, .reg_rdata, .fifo_ren, .fifo_q, .fifo_empty, .irq_req, .irq_level,
    .irq_vector, .irq_pending);
  vme_master m (.clk, .as_n, .ds_n, .write_n, .am, .addr, .lword_n, .iack_n, .d(d_m2s),
                .d_in(d_s2m), .d_oe, .dtack_n);
  assign iackin_n = iack_n;   // first slot of the daisy chain

  // register and FIFO stand-ins
  logic [31:0] regs [32];
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (reg_wr) regs[reg_addr] <= reg_wdata;
  logic [31:0] fq [4][$];
  always_comb for (int k = 0; k < 4; k++) fifo_empty[k] = (fq[k].size() == 0);
  always @(posedge clk) for (int k = 0; k < 4; k++)
    if (fifo_ren[k] && fq[k].size() > 0) fifo_q[k] <= fq[k].pop_front();

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("fail: %s at %0t", what, $time); end
  endtask

  int passes = 0;
  always @(negedge clk) if (!iackout_n) passes++;

  initial begin
    logic [31:0] v;
    logic [31:0] q [$];
    bit ans;
    for (int i = 0; i < 32; i++) regs[i] = 32'h100 + i;
    for (int k = 0; k < 4; k++) fifo_q[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // single write and read
    m.write32(32'h1000_0024, 32'hCAFE_0009);
    check(regs[9] == 32'hCAFE_0009, "register written");
    check(m.last_latency >= 3 && m.last_latency <= 6, "write DTACK latency");
    m.read32(32'h1000_0024, v);
    check(v == 32'hCAFE_0009, "register read back");
    m.read32(32'h1000_0010, v);
    check(v == 32'h104, "register 4 read");
    // block transfer over the registers 2..6
    q.delete();
    m.blt_read(32'h1000_0008, 5, q);
    check(q.size() == 5 && q[0] == 32'h102 && q[1] == 32'h103 && q[4] == 32'h106, "register BLT");
    // FIFO block transfers
    for (int i = 0; i < 50; i++) fq[1].push_back(32'h1111_0000 + i);
    for (int i = 0; i < 20; i++) fq[3].push_back(32'h3333_0000 + i);
    q.delete();
    m.blt_read(32'h1011_0000, 50, q);
    begin
      bit ok;
      ok = (q.size() == 50);
      for (int i = 0; i < q.size(); i++) if (q[i] != 32'h1111_0000 + i) ok = 0;
      check(ok, "FIFO 1 BLT");
    end
    check(m.last_latency >= 5 && m.last_latency <= 8, "FIFO read DTACK latency");
    q.delete();
    m.blt_read(32'h1013_0000, 22, q);
    check(q.size() == 22 && q[0] == 32'h3333_0000 && q[19] == 32'h3333_0013 &&
          q[20] == 0 && q[21] == 0, "FIFO 3 BLT then empty reads 0");
    // not selected: other base, other AM, D16
    m.probe_no_answer(32'h2000_0000, 6'h09, ans);  check(!ans, "other base ignored");
    m.probe_no_answer(32'h1000_0000, 6'h39, ans);  check(!ans, "A24 AM ignored");
    check(regs[0] == 32'h100, "ignored write had no effect");
    check(m.timeouts == 0 && m.oe_errors == 0, "handshakes complete");
    // interrupt
    check(irq_n == 7'h7F, "no request");
    irq_req = 1;
    repeat (3) @(negedge clk);
    check(irq_n == ~7'(1 << 2) && irq_pending, "IRQ3 asserted");
    m.iack_cycle(3'd5, v);   // wrong level: expect pass-through and no answer... bounded
    check(passes > 0, "acknowledge for another level passed down the chain");
    m.timeouts = 0;
    m.iack_cycle(3'd3, v);
    check(v[7:0] == 8'h5C && m.timeouts == 0, "vector returned");
    check(irq_n == 7'h7F && !irq_pending, "request released on acknowledge");
    irq_req = 0;
    repeat (2) @(negedge clk);
    irq_req = 1;
    repeat (3) @(negedge clk);
    check(irq_pending, "new request on new rising edge");
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
