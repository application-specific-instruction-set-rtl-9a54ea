// Program ROM holding the firmware, DEPTH words of WIDTH bits (512 x 32 by
// default, the size chosen for the inductive position sensor firmware; the 3D
// Hall sensor firmware uses 1024 words).
//
// Synchronous read: the word at addr appears on data one clock after en is
// high, and data holds while en is low, which is how the fetch stage stalls.
// Contents come from the hex file named by INIT_FILE (one word per line) when
// it is not empty; otherwise the array starts at zero (all NOPs) and a
// testbench fills it.  In silicon this is a mask ROM macro.
module prog_rom #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned WIDTH     = 32,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end
endmodule
