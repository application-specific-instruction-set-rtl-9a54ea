// Shared types and constants of the sensor-conditioning ASIP.
//
// The core is a 16-bit two's complement machine with 32-bit instruction words.
// Register count (31 + constant zero), data width (16), instruction width (32,
// from the 512x32 program ROM) and the instruction names add/sub/shifts/lw/sw/
// j/beq/bne/bgt/mul/atan/otprd/otpwr/sleep/return follow the processor this RTL
// implements.  The binary encoding below, the opcode numbers and the I/O
// register numbering are this design's own choice.
//
// Encoding (bit 31 is the MSB):
//   R-type  op[31:26] rd[25:20] rs[19:14] rt[13:8] -[7:5] sh[4:0]
//           6-bit register operands: 0 = zero, 1..31 = GPR, 32.. = I/O regs
//   I-type  op[31:26] ra[25:21] rb[20:16] imm[15:0]   (GPR operands only)
//           addi/andi/ori/lw/otprd: ra = rb op imm  (ra is the destination)
//           sw/otpwr: mem[rb + imm] = ra
//           beq/bne/bgt: compare ra with rb, target = pc + 1 + imm
//   J-type  op[31:26] target[15:0]                   (j)
package sensasip_pkg;

  localparam int unsigned XLEN   = 16;  // data path width
  localparam int unsigned ILEN   = 32;  // instruction width
  localparam int unsigned RIDX_W = 6;   // unified register index width (R-type)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ILEN-1:0] instr_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_ADD    = 6'd1,   // signed, saturating
    OP_ADDU   = 6'd2,   // unsigned, wraps modulo 2^16
    OP_SUB    = 6'd3,   // signed, saturating
    OP_SUBU   = 6'd4,   // unsigned, wraps
    OP_AND    = 6'd5,
    OP_OR     = 6'd6,
    OP_XOR    = 6'd7,
    OP_SLL    = 6'd8,   // rd = rs << sh
    OP_SRL    = 6'd9,   // rd = rs >> sh (logical)
    OP_SRA    = 6'd10,  // rd = rs >>> sh (arithmetic, sign extension)
    OP_MUL    = 6'd11,  // rd = sat16((rs * rt) >>> sh), 2-cycle MCI
    OP_ATAN   = 6'd12,  // rd = atan2(rs, rt) as binary angle, 7-cycle MCI
    OP_ADDI   = 6'd16,
    OP_ANDI   = 6'd17,
    OP_ORI    = 6'd18,
    OP_LW     = 6'd19,
    OP_SW     = 6'd20,
    OP_OTPRD  = 6'd21,
    OP_OTPWR  = 6'd22,
    OP_BEQ    = 6'd24,
    OP_BNE    = 6'd25,
    OP_BGT    = 6'd26,  // signed greater than
    OP_J      = 6'd27,
    OP_RETURN = 6'd28,  // return from interrupt handler
    OP_SLEEP  = 6'd29
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADDS, ALU_ADDU, ALU_SUBS, ALU_SUBU,
    ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB
  } alu_op_e;

  // I/O register numbers in the unified 6-bit register space.
  localparam ridx_t IO_ADC1   = 6'd32;  // read only: receiver counter 1
  localparam ridx_t IO_ADC2   = 6'd33;  // read only: receiver counter 2
  localparam ridx_t IO_COMMI1 = 6'd34;  // read only: received packet [15:0]
  localparam ridx_t IO_COMMI2 = 6'd35;  // read only: received packet [19:16]
  localparam ridx_t IO_COMMO1 = 6'd36;  // packet to send [15:0]
  localparam ridx_t IO_COMMO2 = 6'd37;  // packet to send [19:16]; a write sends
  localparam ridx_t IO_TXCNF  = 6'd38;  // transmitter configuration
  localparam ridx_t IO_ANA1   = 6'd39;  // analog interface
  localparam ridx_t IO_ANA2   = 6'd40;
  localparam ridx_t IO_ANA3   = 6'd41;
  localparam ridx_t IO_OTPRG  = 6'd42;  // OTP special functions, bit 0 = program enable
  localparam ridx_t IO_IRQEN  = 6'd43;  // interrupt enable mask

  // Instruction field helpers.
  function automatic opcode_e f_op(instr_t i);   return opcode_e'(i[31:26]); endfunction
  function automatic ridx_t   f_rd(instr_t i);   return i[25:20];            endfunction
  function automatic ridx_t   f_rs(instr_t i);   return i[19:14];            endfunction
  function automatic ridx_t   f_rt(instr_t i);   return i[13:8];             endfunction
  function automatic logic [4:0] f_sh(instr_t i); return i[4:0];             endfunction
  function automatic ridx_t   f_ra(instr_t i);   return {1'b0, i[25:21]};    endfunction
  function automatic ridx_t   f_rb(instr_t i);   return {1'b0, i[20:16]};    endfunction
  function automatic word_t   f_imm(instr_t i);  return i[15:0];             endfunction

  // Encoders, used by testbenches to build programs.
  function automatic instr_t enc_r(opcode_e op, ridx_t rd, ridx_t rs, ridx_t rt, logic [4:0] sh = 5'd0);
    return {op, rd, rs, rt, 3'b000, sh};
  endfunction
  function automatic instr_t enc_i(opcode_e op, logic [4:0] ra, logic [4:0] rb, word_t imm);
    return {op, ra, rb, imm};
  endfunction
  function automatic instr_t enc_j(opcode_e op, word_t target);
    return {op, 10'd0, target};
  endfunction

endpackage
