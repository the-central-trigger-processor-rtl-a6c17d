// almost_overflow: raises a sticky flag when any histogram counter gets near its top.
//
// For each of the N channels the four most significant bits of the counter value
// being written back (P[29:26]) are compared with the programmable threshold th in
// a comparator with one cycle of latency. The comparator results are ORed, and the
// OR together with the flag itself feeds the flag register, so once set the AO flag
// stays set until rst or clr. The Control FPGA turns the flag into a VME interrupt
// request. The comparators on P[29:26], the 1-cycle latency, the OR gate and the
// fed-back flag register with a clear follow the original module. "Passes the
// threshold" is read as P[29:26] > th, this design's choice.
//
// Timing: a value written in cycle t sets ao in cycle t+2.
module almost_overflow #(
  parameter int unsigned N = 40
) (
  input  logic             clk,
  input  logic             rst,       // synchronous clear
  input  logic             clr,       // synchronous clear command
  input  logic [3:0]       th,        // threshold on P[29:26]
  input  logic             valid,     // msb carries written values this cycle
  input  logic [N-1:0][3:0] msb,      // P[29:26] of every channel
  output logic             ao
);
  logic [N-1:0] cmp_q;

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < N; i++) cmp_q[i] <= valid && (msb[i] > th);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) ao <= 1'b0;
    else            ao <= ao | (|cmp_q);
  end

endmodule
