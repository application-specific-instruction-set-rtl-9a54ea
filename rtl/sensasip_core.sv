// Three-stage pipelined 16-bit ASIP core for sensor conditioning.
//
// Pipeline
//   IF  the program counter addresses the synchronous program ROM; the ROM's
//       output register is the fetched instruction.
//   ID  decode, register read (general purpose registers and I/O registers in
//       one 6-bit register space) and the bypass of the value being written
//       back in the same cycle, so back-to-back dependent instructions never
//       wait.
//   EX  ALU, branch resolution, memory and OTP access, the multi-cycle units
//       and write-back.
// Hazard detection: a multi-cycle instruction (MCI) holds EX busy and stalls
// IF and ID until it completes: mul 2 cycles, atan 7 cycles, lw 2 cycles
// (synchronous RAM), otprd/otpwr until the OTP macro acknowledges.  A taken
// branch, jump, return or sleep is resolved in EX and squashes the two younger
// instructions (two-cycle penalty).
// Interrupts: line n enters its handler at program address n + 1 (address 0 is
// the reset entry, so a program starts with a table of jumps).  An interrupt is
// taken in place of the instruction in ID, whose address is saved and resumed
// by "return"; handlers do not nest.  "sleep" stops fetching and freezes the
// pipeline (sleep_o high) until an enabled interrupt arrives; after the handler
// returns, execution continues after the sleep instruction.
// What follows the processor description: three stages, hazard detection,
// MCIs with the 2- and 7-cycle figures, 31 x 16-bit registers, ROM/RAM/OTP
// interfaces, interrupt-based firmware, sleep mode, the I/O register names.
// This design's own choices: the encoding (sensasip_pkg), the bypass, the
// branch penalty, interrupt entry/priority/mask and all handshakes.
module sensasip_core
  import sensasip_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 512,
  parameter int unsigned RAM_WORDS = 128,
  parameter int unsigned OTP_WORDS = 8,
  parameter int unsigned NREGS     = 31,
  parameter int unsigned NIRQ      = 4,
  parameter bit          HAS_MUL   = 1'b1,
  parameter bit          HAS_ATAN  = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program ROM
  output logic                          rom_en,
  output logic [$clog2(ROM_WORDS)-1:0]  rom_addr,
  input  instr_t                        rom_data,
  // data RAM
  output logic                          ram_re,
  output logic                          ram_we,
  output logic [$clog2(RAM_WORDS)-1:0]  ram_addr,
  output word_t                         ram_wdata,
  input  word_t                         ram_rdata,
  // OTP parameter memory
  output logic                          otp_req,
  output logic                          otp_we,
  output logic [$clog2(OTP_WORDS)-1:0]  otp_addr,
  output word_t                         otp_wdata,
  input  logic                          otp_ack,
  input  word_t                         otp_rdata,
  // interrupts and power
  input  logic [NIRQ-1:0]               irq_i,
  output logic                          sleep_o,
  // I/O registers towards the hardwired blocks
  input  word_t                         adc1_i,
  input  word_t                         adc2_i,
  input  logic [19:0]                   commi_i,
  output logic [19:0]                   commo_o,
  output logic                          commo_send_o,
  output word_t                         txcnf_o,
  output word_t                         ana1_o,
  output word_t                         ana2_o,
  output word_t                         ana3_o
);
  localparam int unsigned PCW = $clog2(ROM_WORDS);
  localparam int unsigned RAW = $clog2(RAM_WORDS);
  localparam int unsigned OAW = $clog2(OTP_WORDS);
  localparam int unsigned RFW = $clog2(NREGS + 1);

  typedef logic [PCW-1:0] pc_t;

  typedef struct packed {
    opcode_e op;
    ridx_t   rd;      // destination, 0 = none
    logic    wr;      // writes rd
    word_t   a;
    word_t   b;
    word_t   imm;
    logic [4:0] sh;
    pc_t     pc;
  } ex_t;

  // ---------------------------------------------------------------- state
  pc_t   pc_q, id_pc_q, epc_q;
  logic  id_valid_q, ex_valid_q, ex_first_q, in_isr_q, sleep_q;
  ex_t   ex_q, id_ex;

  // ---------------------------------------------------------------- ID
  instr_t   id_instr;
  opcode_e  id_op;
  ridx_t    src_a, src_b;
  word_t    gpr_a, gpr_b, io_a, io_b, opnd_a, opnd_b;
  logic     wb_en;
  ridx_t    wb_addr;
  word_t    wb_data;
  word_t    otprg, irqen;

  assign id_instr = rom_data;
  assign id_op    = f_op(id_instr);

  always_comb begin
    src_a = '0;
    src_b = '0;
    unique case (id_op)
      OP_ADD, OP_ADDU, OP_SUB, OP_SUBU, OP_AND, OP_OR, OP_XOR,
      OP_SLL, OP_SRL, OP_SRA, OP_MUL, OP_ATAN: begin
        src_a = f_rs(id_instr); src_b = f_rt(id_instr);
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_LW, OP_OTPRD: src_a = f_rb(id_instr);
      OP_SW, OP_OTPWR: begin src_a = f_rb(id_instr); src_b = f_ra(id_instr); end
      OP_BEQ, OP_BNE, OP_BGT: begin src_a = f_ra(id_instr); src_b = f_rb(id_instr); end
      default: ;
    endcase
  end

  regfile #(.NREGS(NREGS), .WIDTH(XLEN), .AW(RFW)) u_rf (
    .clk, .rst_n,
    .raddr_a(RFW'(src_a)), .rdata_a(gpr_a),
    .raddr_b(RFW'(src_b)), .rdata_b(gpr_b),
    .we(wb_en && !wb_addr[RIDX_W-1]), .waddr(RFW'(wb_addr)), .wdata(wb_data)
  );

  io_regs u_io (
    .clk, .rst_n,
    .raddr_a(src_a), .rdata_a(io_a),
    .raddr_b(src_b), .rdata_b(io_b),
    .we(wb_en && wb_addr[RIDX_W-1]), .waddr(wb_addr), .wdata(wb_data),
    .adc1_i, .adc2_i, .commi_i, .commo_o, .commo_send_o, .txcnf_o,
    .ana1_o, .ana2_o, .ana3_o, .otprg_o(otprg), .irqen_o(irqen)
  );

  // Operand read with write-back bypass (read-after-write hazard).
  logic byp_a, byp_b;
  always_comb begin
    byp_a  = wb_en && src_a != '0 && wb_addr == src_a;
    byp_b  = wb_en && src_b != '0 && wb_addr == src_b;
    opnd_a = byp_a ? wb_data : (src_a[RIDX_W-1] ? io_a : gpr_a);
    opnd_b = byp_b ? wb_data : (src_b[RIDX_W-1] ? io_b : gpr_b);
  end

  always_comb begin
    id_ex     = '0;
    id_ex.op  = id_op;
    id_ex.a   = opnd_a;
    id_ex.b   = opnd_b;
    id_ex.imm = f_imm(id_instr);
    id_ex.sh  = f_sh(id_instr);
    id_ex.pc  = id_pc_q;
    unique case (id_op)
      OP_ADD, OP_ADDU, OP_SUB, OP_SUBU, OP_AND, OP_OR, OP_XOR,
      OP_SLL, OP_SRL, OP_SRA, OP_MUL, OP_ATAN: begin
        id_ex.rd = f_rd(id_instr); id_ex.wr = 1'b1;
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_LW, OP_OTPRD: begin
        id_ex.rd = f_ra(id_instr); id_ex.wr = 1'b1;
      end
      OP_NOP, OP_SW, OP_OTPWR, OP_BEQ, OP_BNE, OP_BGT, OP_J, OP_RETURN, OP_SLEEP: ;
      default: id_ex.op = OP_NOP;  // undefined opcodes execute as nop
    endcase
  end

  // ---------------------------------------------------------------- EX
  alu_op_e alu_op;
  word_t   alu_b, alu_y, ea, mul_y, atan_y;
  logic    alu_eq, alu_gt, mul_done, atan_done;
  logic    ex_done, ex_stall, redirect, br_taken;
  pc_t     redirect_pc;
  word_t   ex_result;

  always_comb begin
    alu_b = ex_q.b;
    unique case (ex_q.op)
      OP_ADD:  alu_op = ALU_ADDS;
      OP_ADDU: alu_op = ALU_ADDU;
      OP_SUB:  alu_op = ALU_SUBS;
      OP_SUBU: alu_op = ALU_SUBU;
      OP_AND:  alu_op = ALU_AND;
      OP_OR:   alu_op = ALU_OR;
      OP_XOR:  alu_op = ALU_XOR;
      OP_SLL:  alu_op = ALU_SLL;
      OP_SRL:  alu_op = ALU_SRL;
      OP_SRA:  alu_op = ALU_SRA;
      OP_ADDI: begin alu_op = ALU_ADDU; alu_b = ex_q.imm; end
      OP_ANDI: begin alu_op = ALU_AND;  alu_b = ex_q.imm; end
      OP_ORI:  begin alu_op = ALU_OR;   alu_b = ex_q.imm; end
      default: alu_op = ALU_SUBU;      // branches compare a with b
    endcase
  end

  alu #(.W(XLEN)) u_alu (
    .op(alu_op), .a(ex_q.a), .b(alu_b), .sh(ex_q.sh), .y(alu_y), .eq(alu_eq), .gt(alu_gt)
  );

  logic ex_mul, ex_atan;
  assign ex_mul  = ex_valid_q && ex_q.op == OP_MUL;
  assign ex_atan = ex_valid_q && ex_q.op == OP_ATAN;

  // The extended ALU is modular: without a unit its instruction completes in
  // one cycle and writes zero.
  if (HAS_MUL) begin : g_mul
    mul_unit #(.W(XLEN)) u_mul (
      .clk, .rst_n, .start(ex_mul && ex_first_q), .a(ex_q.a), .b(ex_q.b), .sh(ex_q.sh),
      .done(mul_done), .y(mul_y)
    );
  end else begin : g_no_mul
    assign mul_done = ex_mul;
    assign mul_y    = '0;
  end

  if (HAS_ATAN) begin : g_atan
    cordic_atan #(.W(XLEN)) u_cordic (
      .clk, .rst_n, .start(ex_atan && ex_first_q), .a(ex_q.a), .b(ex_q.b),
      .done(atan_done), .y(atan_y)
    );
  end else begin : g_no_atan
    assign atan_done = ex_atan;
    assign atan_y    = '0;
  end

  // Memory and OTP accesses: the effective address is base + offset.
  logic otp_prog_en;
  assign ea          = ex_q.a + ex_q.imm;
  assign otp_prog_en = otprg[0];
  assign ram_addr    = ea[RAW-1:0];
  assign ram_wdata   = ex_q.b;
  assign ram_re      = ex_valid_q && ex_first_q && ex_q.op == OP_LW;
  assign ram_we      = ex_valid_q && ex_q.op == OP_SW;
  assign otp_addr    = ea[OAW-1:0];
  assign otp_wdata   = ex_q.b;
  assign otp_we      = ex_q.op == OP_OTPWR;
  assign otp_req     = ex_valid_q && ex_first_q &&
                       (ex_q.op == OP_OTPRD || (ex_q.op == OP_OTPWR && otp_prog_en));

  always_comb begin
    ex_result = alu_y;
    unique case (ex_q.op)
      OP_MUL:   ex_result = mul_y;
      OP_ATAN:  ex_result = atan_y;
      OP_LW:    ex_result = ram_rdata;
      OP_OTPRD: ex_result = otp_rdata;
      default: ;
    endcase

    unique case (ex_q.op)
      OP_MUL:   ex_done = mul_done;
      OP_ATAN:  ex_done = atan_done;
      OP_LW:    ex_done = !ex_first_q;
      OP_OTPRD: ex_done = otp_ack;
      OP_OTPWR: ex_done = otp_ack || !otp_prog_en;
      default:  ex_done = 1'b1;
    endcase
    ex_done  = ex_done && ex_valid_q;
    ex_stall = ex_valid_q && !ex_done;

    unique case (ex_q.op)
      OP_BEQ:  br_taken = alu_eq;
      OP_BNE:  br_taken = !alu_eq;
      OP_BGT:  br_taken = alu_gt;
      default: br_taken = 1'b0;
    endcase
    redirect    = 1'b0;
    redirect_pc = ex_q.pc + pc_t'(1);
    if (ex_done) begin
      unique case (ex_q.op)
        OP_BEQ, OP_BNE, OP_BGT: begin
          redirect    = br_taken;
          redirect_pc = ex_q.pc + pc_t'(1) + pc_t'(ex_q.imm);
        end
        OP_J:      begin redirect = 1'b1; redirect_pc = pc_t'(ex_q.imm); end
        OP_RETURN: begin redirect = 1'b1; redirect_pc = epc_q; end
        OP_SLEEP:  redirect = 1'b1;
        default: ;
      endcase
    end

    wb_en   = ex_done && ex_q.wr && ex_q.rd != '0;
    wb_addr = ex_q.rd;
    wb_data = ex_result;
  end

  // ---------------------------------------------------------------- interrupts
  localparam int unsigned IDW = $clog2(NIRQ);
  logic           irq_req, irq_take;
  logic [IDW-1:0] irq_id;
  logic [NIRQ-1:0] irq_pend;

  irq_ctrl #(.NIRQ(NIRQ)) u_irq (
    .clk, .rst_n, .irq_i, .enable_i(irqen[NIRQ-1:0]), .ack_i(irq_take),
    .req_o(irq_req), .id_o(irq_id), .pending_o(irq_pend)
  );

  assign irq_take = irq_req && !in_isr_q && !redirect &&
                    (sleep_q || (id_valid_q && !ex_stall));

  // ---------------------------------------------------------------- sequencing
  assign rom_en   = !ex_stall && !sleep_q;
  assign rom_addr = pc_q;
  assign sleep_o  = sleep_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0; id_pc_q <= '0; epc_q <= '0;
      id_valid_q <= 1'b0; in_isr_q <= 1'b0; sleep_q <= 1'b0;
    end else if (redirect) begin
      pc_q       <= redirect_pc;
      id_valid_q <= 1'b0;
      if (ex_q.op == OP_RETURN) in_isr_q <= 1'b0;
      if (ex_q.op == OP_SLEEP)  sleep_q  <= 1'b1;
    end else if (irq_take) begin
      pc_q       <= pc_t'(irq_id) + pc_t'(1);
      epc_q      <= sleep_q ? pc_q : id_pc_q;
      in_isr_q   <= 1'b1;
      sleep_q    <= 1'b0;
      id_valid_q <= 1'b0;
    end else if (sleep_q) begin
      id_valid_q <= 1'b0;
    end else if (!ex_stall) begin
      pc_q       <= pc_q + pc_t'(1);
      id_pc_q    <= pc_q;
      id_valid_q <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q <= '0; ex_valid_q <= 1'b0; ex_first_q <= 1'b0;
    end else if (ex_stall) begin
      ex_first_q <= 1'b0;
    end else if (redirect || irq_take || !id_valid_q || sleep_q) begin
      ex_valid_q <= 1'b0;
      ex_first_q <= 1'b0;
    end else begin
      ex_q       <= id_ex;
      ex_valid_q <= 1'b1;
      ex_first_q <= 1'b1;
    end
  end

  // A stalled instruction must not change while it waits in EX.
  property p_ex_hold;
    @(posedge clk) disable iff (!rst_n) ex_stall |=> ex_valid_q && $stable(ex_q);
  endproperty
  a_ex_hold: assert property (p_ex_hold);
endmodule
