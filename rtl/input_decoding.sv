// input_decoding: routes, groups and decodes the PIT trigger bus into the PTC bus.
//
// The 160 PIT inputs arrive aligned to the bunch clock. A first register layer
// captures them with one constant setup time. A routing crossbar then lets every
// look-up-table input take any PIT bit (or a constant 0), and a second register
// layer holds the routed bits. The routed bits are cut into groups of G=4, and each
// group addresses its own ROM look-up table with G output bits, so an output group
// has as many bits as its input group. A group of 2 or 3 signals uses 2 or 3 of the
// 4 LUT inputs and ties the rest to 0 with route code >= N. Two output register
// layers follow the ROMs, so the latency from pit to ptc is DEC_LATENCY = 4 cycles.
//
// The ROM contents and the routing are fixed when the device is configured; here
// they are the parameters LUT and ROUTE. ROUTE[8*i +: 8] is the PIT index feeding
// LUT input i. LUT[(16*l + a)*4 +: 4] is the output of table l at address a (the
// address bit k is LUT input 4*l + k). The defaults pass every bit straight through;
// a multiplicity decoding such as "=1, =2, >2" of a 3-bit count is loaded through
// LUT. The register layers, the ROM tables and the 4-cycle latency follow the
// original module; the 4-input table size and the route encoding are this design's.
module input_decoding
  import ctp_mon_pkg::*;
#(
  parameter int unsigned N = N_PIT,                 // bus width, a multiple of 4
  parameter logic [N*8-1:0] ROUTE = identity_route(N),
  parameter logic [(N/4)*64-1:0] LUT = identity_lut(N/4)
) (
  input  logic         clk,
  input  logic [N-1:0] pit,   // PIT bus, one bunch per cycle
  output logic [N-1:0] ptc    // decoded bus, 4 cycles later
);
  localparam int unsigned G    = 4;
  localparam int unsigned NLUT = N / G;

  logic [N-1:0] in_q;     // layer 1: constant setup time
  logic [N-1:0] route_q;  // layer 2: routed bits
  logic [N-1:0] lut_q;    // layer 3: ROM outputs
  logic [N-1:0] out_q;    // layer 4: constant clock-to-output

  logic [N-1:0] routed;
  logic [N-1:0] decoded;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic [7:0] idx;
      idx = ROUTE[i*8 +: 8];
      routed[i] = (32'(idx) < N) ? in_q[idx] : 1'b0;
    end
  end

  for (genvar l = 0; l < NLUT; l++) begin : g_lut
    // ROM of 16 words of 4 bits
    localparam logic [63:0] ROM = LUT[l*64 +: 64];
    assign decoded[l*G +: G] = ROM[route_q[l*G +: G]*4 +: 4];
  end

  always_ff @(posedge clk) begin
    in_q    <= pit;
    route_q <= routed;
    lut_q   <= decoded;
    out_q   <= lut_q;
  end

  assign ptc = out_q;

endmodule
