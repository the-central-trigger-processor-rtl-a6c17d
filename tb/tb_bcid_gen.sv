// tb_bcid_gen: checks the BCID counter against a reference counter: wrap at
// bcid_max, reload by ORBIT with several offsets, and bc0.
module tb_bcid_gen;
  logic clk = 0, rst = 1, orbit = 0;
  logic [11:0] bcid_max, offset, bcid;
  logic bc0;
  int checks = 0, failures = 0;

  bcid_gen dut (.clk, .rst, .orbit, .bcid_max, .offset, .bcid, .bc0);
  always #5 clk = ~clk;

  int exp_bcid;

  task automatic run(int max, int ofs, int turns);
    bcid_max = 12'(max);
    offset   = 12'(ofs);
    for (int t = 0; t < turns * (max + 1); t++) begin
      @(negedge clk);
      orbit = (t % (max + 1) == 0);
      // expected value in this cycle
      if (t > 0) checks++;
      if (t > 0 && (bcid !== 12'(exp_bcid) || bc0 !== (exp_bcid == 0))) begin
        failures++;
        if (failures < 10) $display("t=%0d bcid=%0d exp=%0d", t, bcid, exp_bcid);
      end
      // next cycle
      if (orbit) exp_bcid = (ofs == 0) ? 0 : max + 1 - ofs;
      else       exp_bcid = (exp_bcid >= max) ? 0 : exp_bcid + 1;
    end
  endtask

  initial begin
    bcid_max = 12'd7; offset = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    exp_bcid = 0;
    // the first cycle of every run only aligns the reference (its orbit reloads both)
    run(7, 0, 4);
    run(7, 4, 4);
    run(3563, 4, 2);
    run(11, 11, 3);
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
