// General purpose register file of the ASIP core.
//
// NREGS registers of WIDTH bits (31 x 16 by default), addressed 1..NREGS; address 0
// always reads zero and ignores writes, which gives the assembler its $0 operand.
// Two asynchronous read ports serve the decode stage, one synchronous write
// port serves the execute stage.  A write and a read of the same register in
// one cycle return the old value: the core bypasses the value being written
// (see sensasip_core).  Registers reset to zero.  The register count and width
// are the processor's own figures; the port structure is this design's choice.
module regfile #(
  parameter int unsigned NREGS = 31,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] regs [1:NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0 && int'(waddr) <= NREGS) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata_a = '0;
    rdata_b = '0;
    if (raddr_a != '0 && int'(raddr_a) <= NREGS) rdata_a = regs[raddr_a];
    if (raddr_b != '0 && int'(raddr_b) <= NREGS) rdata_b = regs[raddr_b];
  end
endmodule
