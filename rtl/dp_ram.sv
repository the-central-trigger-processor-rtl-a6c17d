// dp_ram: dual-port memory with one write port and one registered read port on the
// same clock, written so that synthesis maps it onto an FPGA block RAM.
//
// A read issued in cycle t (raddr) returns data in cycle t+1 (rdata). A write in
// cycle t (we, waddr, wdata) lands at the clock edge ending cycle t. A read of the
// address being written in the same cycle returns the old word. The contents are
// not reset; users clear them by writing.
module dp_ram #(
  parameter int unsigned W     = 31,
  parameter int unsigned DEPTH = 3564,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
