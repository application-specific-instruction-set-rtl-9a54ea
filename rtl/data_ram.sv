// Data RAM of the core, DEPTH words of WIDTH bits (128 x 16 by default, the
// size the 3D Hall sensor firmware needed).
//
// One port, synchronous: a write stores wdata at addr on the clock edge; a
// read returns mem[addr] on rdata one clock after re is high.  The core
// therefore runs lw as a two-cycle instruction.  Contents are undefined after
// power-up in silicon; here they start at zero.
module data_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
