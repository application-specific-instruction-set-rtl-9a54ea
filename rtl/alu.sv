// Base of the extended ALU: the single-cycle two's complement operations.
//
// Signed add/sub saturate to the 16-bit range (the clamping the conditioning
// algorithms need); unsigned add/sub wrap modulo 2^16.  Shifts take their
// amount from the low four bits of b for register shifts, and logic operations
// support the bit-wise conditional code.  The comparison outputs (eq, gt
// signed) feed the conditional branches.  Purely combinational.
// The operation set follows the processor's basic instructions; saturation as
// the difference between the signed and unsigned forms is this design's choice.
module alu
  import sensasip_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  alu_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [4:0]    sh,
  output logic [W-1:0]  y,
  output logic          eq,
  output logic          gt
);
  localparam logic [W-1:0] SMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic [W-1:0] SMIN = {1'b1, {(W-1){1'b0}}};

  logic [W:0] sum, dif;
  logic ovf_add, ovf_sub;

  always_comb begin
    sum = {a[W-1], a} + {b[W-1], b};
    dif = {a[W-1], a} - {b[W-1], b};
    ovf_add = sum[W] != sum[W-1];
    ovf_sub = dif[W] != dif[W-1];
    unique case (op)
      ALU_ADDS:  y = ovf_add ? (sum[W] ? SMIN : SMAX) : sum[W-1:0];
      ALU_ADDU:  y = a + b;
      ALU_SUBS:  y = ovf_sub ? (dif[W] ? SMIN : SMAX) : dif[W-1:0];
      ALU_SUBU:  y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << sh;
      ALU_SRL:   y = a >> sh;
      ALU_SRA:   y = W'($signed(a) >>> sh);
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
    eq = (a == b);
    gt = $signed(a) > $signed(b);
  end
endmodule
