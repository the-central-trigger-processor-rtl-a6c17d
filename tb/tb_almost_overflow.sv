// tb_almost_overflow: drives random counter MSBs and thresholds into almost_overflow
// and compares the flag with a reference: set 2 cycles after a value above the
// threshold is written, sticky, cleared by clr.
module tb_almost_overflow;
  localparam int N = 8;
  logic clk = 0, rst = 1, clr = 0, valid = 0, ao;
  logic [3:0] th;
  logic [N-1:0][3:0] msb;
  int checks = 0, failures = 0, sets = 0;

  almost_overflow #(.N(N)) dut (.clk, .rst, .clr, .th, .valid, .msb, .ao);
  always #5 clk = ~clk;

  bit hit_q, hit_qq, clr_q, exp_ao;

  initial begin
    th = 4'd12; msb = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    exp_ao = 0; hit_q = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (ao !== exp_ao) begin
        failures++;
        if (failures < 10) $display("t=%0d ao=%0d exp=%0d", t, ao, exp_ao);
      end
      // new stimulus
      valid = ($urandom % 4) != 0;
      clr   = ($urandom % 50) == 0;
      if (t % 500 == 0) th = 4'($urandom % 16);
      for (int i = 0; i < N; i++) msb[i] = ($urandom % 8 == 0) ? 4'($urandom) : 4'($urandom % 8);
      // reference for the next cycles: cmp registered at next edge, flag one later
      begin
        bit hit;
        hit = 0;
        for (int i = 0; i < N; i++) if (valid && msb[i] > th) hit = 1;
        // at next edge: flag uses hit_q (registered previous cycle)
        exp_ao = clr ? 0 : (exp_ao | hit_q);
        if (!clr && hit_q && !ao) sets++;
        hit_q = hit;
      end
    end
    if (sets == 0) begin failures++; $display("flag never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
