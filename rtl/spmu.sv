// spmu: survivor path memory, a simple dual-port RAM of DEPTH words of
// WIDTH bits (32 x 4 by default).
//
// Each word holds the decision bits of the four ACS nodes for one trellis
// step. The depth is twice the trellis length: while one half is being
// written by the ACS unit, the trace back unit reads the other. One write
// port and one read port, both synchronous; the read data appears one clock
// after the address. Reading and writing the same address in one clock
// returns the old word. Size and the dual-port organisation follow the
// design; the read latency is this design's choice.
module spmu #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
