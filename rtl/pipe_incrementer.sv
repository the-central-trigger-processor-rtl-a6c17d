// pipe_incrementer: W-bit counter increment split over STAGES pipeline stages.
//
// The value a (with its sticky overflow bit ov_in) is incremented by cin. Stage s
// adds the carry into bits [s*SEG, (s+1)*SEG) and registers the result, so each stage
// holds a short carry chain and the result appears STAGES cycles after the inputs.
// The carry out of the top bit wraps the counter to zero and sets the sticky
// overflow output. A new operation may start every cycle. SEG = ceil(W/STAGES) and
// W must exceed (STAGES-1)*SEG. The 4-cycle latency follows the original module;
// the even split into segments is this design's choice.
module pipe_incrementer #(
  parameter int unsigned W      = 30,
  parameter int unsigned STAGES = 4
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic         ov_in,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         ov_out
);
  localparam int unsigned SEG = (W + STAGES - 1) / STAGES;

  logic [W-1:0] v [STAGES+1];
  logic         c [STAGES+1];
  logic         o [STAGES+1];

  assign v[0] = a;
  assign c[0] = cin;
  assign o[0] = ov_in;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned LO = s * SEG;
    localparam int unsigned HI = ((s + 1) * SEG < W) ? (s + 1) * SEG - 1 : W - 1;
    localparam int unsigned SW = HI - LO + 1;
    logic [SW:0] seg_sum;
    logic [W-1:0] v_q;
    logic c_q, o_q;
    assign seg_sum = {1'b0, v[s][HI:LO]} + (SW+1)'(c[s]);
    always_ff @(posedge clk) begin
      v_q        <= v[s];
      v_q[HI:LO] <= seg_sum[SW-1:0];
      c_q        <= seg_sum[SW];
      o_q        <= o[s];
    end
    assign v[s+1] = v_q;
    assign c[s+1] = c_q;
    assign o[s+1] = o_q;
  end

  assign sum    = v[STAGES];
  assign ov_out = o[STAGES] | c[STAGES];

endmodule
