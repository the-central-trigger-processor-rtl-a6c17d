// tb_integration_ctrl: checks the integration window against a turn-level
// reference. Turns are 8 cycles (bc0 every 8th cycle). WINDOW mode with 5 turns,
// NORMAL mode with start/stop, a stop during a WINDOW run, and a WINDOW start with 0
// turns (ignored). The window must open in the cycle after a bc0, last a whole
// number of turns, and turn_count must equal the number of turns integrated.
module tb_integration_ctrl;
  import ctp_mon_pkg::*;
  logic clk = 0, rst = 1, bc0, start = 0, stop = 0;
  integ_mode_e mode = MODE_WINDOW;
  logic [29:0] num_turns = 30'd5;
  logic integ, armed, done;
  logic [31:0] turn_count;
  int checks = 0, failures = 0;

  integration_ctrl dut (.clk, .rst, .bc0, .mode, .num_turns, .start, .stop, .integ, .armed,
                        .done, .turn_count);
  always #5 clk = ~clk;

  int cyc = 0;
  assign bc0 = (cyc % 8 == 3);
  always @(posedge clk) cyc <= cyc + 1;

  // measure windows
  int win_len = 0, last_len = 0, bad_phase = 0, windows = 0;
  logic integ_q = 0;
  always @(negedge clk) begin
    if (integ) win_len++;
    if (integ && !integ_q && (cyc % 8) != 4) bad_phase++;
    if (!integ && integ_q) begin last_len = win_len; win_len = 0; windows++; end
    integ_q = integ;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s at %0t", what, $time); end
  endtask

  task automatic pulse_start(); @(negedge clk); start = 1; @(negedge clk); start = 0; endtask
  task automatic pulse_stop();  @(negedge clk); stop = 1;  @(negedge clk); stop = 0;  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // WINDOW, 5 turns
    pulse_start();
    check(armed && !integ, "armed after start");
    wait (done);
    repeat (2) @(negedge clk);
    check(last_len == 5 * 8 && turn_count == 5, "window of 5 turns");
    // NORMAL, stop after about 3.5 turns
    mode = MODE_NORMAL;
    pulse_start();
    wait (integ);
    repeat (27) @(negedge clk);
    pulse_stop();
    wait (done);
    repeat (2) @(negedge clk);
    check(last_len == 4 * 8 && turn_count == 4, "normal mode window of 4 turns");
    // WINDOW of 20 turns stopped early
    mode = MODE_WINDOW; num_turns = 20;
    pulse_start();
    wait (integ);
    repeat (10) @(negedge clk);
    pulse_stop();
    wait (done);
    repeat (2) @(negedge clk);
    check(last_len == 2 * 8 && turn_count == 2, "window stopped early");
    // zero turns: ignored
    num_turns = 0;
    pulse_start();
    repeat (30) @(negedge clk);
    check(!integ && !armed && windows == 3, "zero-turn start ignored");
    // one turn
    num_turns = 1;
    pulse_start();
    wait (done);
    repeat (2) @(negedge clk);
    check(last_len == 8 && turn_count == 1, "one turn");
    check(bad_phase == 0, "window opens after bc0");
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
