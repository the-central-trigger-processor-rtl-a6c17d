// tb_input_decoding: checks routing, grouping and LUT decoding of input_decoding and
// its 4-cycle latency.
//
// The unit is built with 16 inputs (4 tables). Routing sends PIT bits in a scrambled
// order and ties some table inputs to 0. Table 0 decodes a 3-bit multiplicity count
// into "=1, =2, >2" (option 1), table 1 into "=1, >1, >2" (option 2), table 2 passes
// its 2-bit group and table 3 inverts its 4 bits. Random PIT words are applied every
// cycle and each output is compared with a reference computed here, 4 cycles later.
module tb_input_decoding;
  localparam int unsigned N = 16;

  // routing: LUT input i <- PIT index
  function automatic logic [N*8-1:0] mk_route();
    logic [N*8-1:0] r;
    int unsigned src [N] = '{5, 9, 2, 16, 0, 7, 11, 16, 3, 14, 16, 16, 1, 4, 6, 15};
    for (int i = 0; i < N; i++) r[i*8 +: 8] = 8'(src[i]);
    return r;
  endfunction

  function automatic logic [3:0] ref_lut(int l, logic [3:0] a);
    int m;
    m = int'(a[2:0]);
    case (l)
      0: return {1'b0, m > 2, m == 2, m == 1};
      1: return {1'b0, m > 2, m > 1, m == 1};
      2: return {2'b00, a[1:0]};
      default: return ~a;
    endcase
  endfunction

  function automatic logic [(N/4)*64-1:0] mk_lut();
    logic [(N/4)*64-1:0] t;
    for (int l = 0; l < N/4; l++)
      for (int a = 0; a < 16; a++) t[(l*16 + a)*4 +: 4] = ref_lut(l, 4'(a));
    return t;
  endfunction

  localparam logic [N*8-1:0]      ROUTE = mk_route();
  localparam logic [(N/4)*64-1:0] LUT   = mk_lut();

  logic clk = 0;
  logic [N-1:0] pit, ptc;
  int checks = 0, failures = 0;

  input_decoding #(.N(N), .ROUTE(ROUTE), .LUT(LUT)) dut (.clk(clk), .pit(pit), .ptc(ptc));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(logic [N-1:0] p);
    logic [N-1:0] routed, o;
    for (int i = 0; i < N; i++) begin
      int s;
      s = int'(ROUTE[i*8 +: 8]);
      routed[i] = (s < N) ? p[s] : 1'b0;
    end
    for (int l = 0; l < N/4; l++) o[l*4 +: 4] = ref_lut(l, routed[l*4 +: 4]);
    return o;
  endfunction

  logic [N-1:0] hist [$];

  initial begin
    pit = '0;
    repeat (6) @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      pit = N'($urandom);
      hist.push_back(pit);
      if (hist.size() > 4) begin
        // the value applied 4 cycles before the one just applied is on ptc now
        logic [N-1:0] exp;
        exp = model(hist[hist.size() - 5]);
        checks++;
        if (ptc !== exp) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d ptc=%h exp=%h", t, ptc, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
