// vme_master: VMEbus master for the testbenches. Its tasks run single A32/D32 read
// and write cycles, block-transfer reads and interrupt-acknowledge cycles with the
// full address-strobe / data-strobe / DTACK* handshake, stepping on the falling edge
// of clk. Each cycle waits at most 200 clocks for DTACK*; a cycle that gets no DTACK*
// increments "timeouts". "last_latency" is the number of clocks from the data
// strobes to DTACK* of the last transfer.
module vme_master (
  input  logic        clk,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic [5:0]  am,
  output logic [31:1] addr,
  output logic        lword_n,
  output logic        iack_n,
  output logic [31:0] d,
  input  logic [31:0] d_in,
  input  logic        d_oe,
  input  logic        dtack_n
);
  int timeouts = 0;
  int last_latency = 0;
  int oe_errors = 0;

  initial begin
    as_n = 1; ds_n = 2'b11; write_n = 1; am = '0; addr = '0; lword_n = 1; iack_n = 1; d = '0;
  end

  task automatic wait_dtack(bit level);
    int n;
    n = 0;
    while (dtack_n !== level && n < 200) begin @(negedge clk); n++; end
    if (dtack_n !== level) timeouts++;
    if (!level) last_latency = n;
  endtask

  task automatic start_cycle(logic [31:0] a, logic [5:0] m, bit wr, logic [31:0] data);
    @(negedge clk);
    addr = a[31:1]; am = m; write_n = !wr; lword_n = 0; iack_n = 1; d = data;
    @(negedge clk);
    as_n = 0;
  endtask

  task automatic end_cycle();
    as_n = 1;
    @(negedge clk);
  endtask

  task automatic strobe(output logic [31:0] data);
    @(negedge clk);
    ds_n = 2'b00;
    wait_dtack(1'b0);
    data = d_in;
    if (write_n && !d_oe) oe_errors++;
    ds_n = 2'b11;
    wait_dtack(1'b1);
  endtask

  task automatic write32(logic [31:0] a, logic [31:0] data);
    logic [31:0] dummy;
    start_cycle(a, 6'h09, 1'b1, data);
    strobe(dummy);
    end_cycle();
  endtask

  task automatic read32(logic [31:0] a, output logic [31:0] data);
    start_cycle(a, 6'h09, 1'b0, '0);
    strobe(data);
    end_cycle();
  endtask

  // block transfer: n reads under one address strobe
  task automatic blt_read(logic [31:0] a, int n, ref logic [31:0] q [$]);
    logic [31:0] data;
    start_cycle(a, 6'h0B, 1'b0, '0);
    for (int i = 0; i < n; i++) begin
      strobe(data);
      q.push_back(data);
    end
    end_cycle();
  endtask

  // interrupt acknowledge for a level; returns the status/ID byte
  task automatic iack_cycle(logic [2:0] level, output logic [31:0] data);
    @(negedge clk);
    addr = {28'd0, level}; am = 6'h0D; write_n = 1; lword_n = 1; iack_n = 0;
    @(negedge clk);
    as_n = 0;
    @(negedge clk);
    ds_n = 2'b10;
    wait_dtack(1'b0);
    data = d_in;
    ds_n = 2'b11;
    wait_dtack(1'b1);
    as_n = 1; iack_n = 1;
    @(negedge clk);
  endtask

  // a write cycle that should get no answer: waits 20 clocks then gives up
  task automatic probe_no_answer(logic [31:0] a, logic [5:0] m, output bit answered);
    start_cycle(a, m, 1'b1, 32'h0);
    @(negedge clk);
    ds_n = 2'b00;
    answered = 0;
    repeat (20) begin @(negedge clk); if (!dtack_n) answered = 1; end
    ds_n = 2'b11;
    @(negedge clk);
    end_cycle();
    repeat (3) @(negedge clk);
  endtask
endmodule
