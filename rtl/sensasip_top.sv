// Sensor-conditioning ASIP macrocell: the pipelined core with its program ROM,
// data RAM and OTP parameter memory.
//
// The hardwired blocks that stay beside the processor in a sensor system
// (transmitter, receiver phase-shift counters, communication packet builder,
// test block, analog front end) connect through the ports: the receiver
// counters to adc1/adc2, the communication block to commi/commo, the
// transmitter to txcnf, the analog interface to ana1..ana3, and their events
// to the interrupt lines irq_i (line n starts the handler at ROM address n+1).
// sleep_o is high while the core sleeps waiting for an interrupt; a clock
// gate for the core would be driven from it.
// Default sizes: 512 x 32 program ROM and 128-bit OTP as in the inductive
// position sensor, 128 x 16 RAM and the CORDIC atan unit as in the 3D Hall
// sensor, 31 x 16-bit registers.  The inductive sensor build is
// HAS_RAM=0, HAS_ATAN=0; the 3D Hall build is ROM_WORDS=1024.  The firmware is loaded into u_rom.mem, from
// ROM_INIT_FILE when that parameter names a hex file.
module sensasip_top
  import sensasip_pkg::*;
#(
  parameter int unsigned ROM_WORDS     = 512,
  parameter int unsigned RAM_WORDS     = 128,
  parameter int unsigned OTP_BITS      = 128,
  parameter int unsigned NREGS         = 31,
  parameter int unsigned NIRQ          = 4,
  parameter bit          HAS_RAM       = 1'b1,
  parameter bit          HAS_MUL       = 1'b1,
  parameter bit          HAS_ATAN      = 1'b1,
  parameter string       ROM_INIT_FILE = ""
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIRQ-1:0] irq_i,
  output logic            sleep_o,
  input  word_t           adc1_i,
  input  word_t           adc2_i,
  input  logic [19:0]     commi_i,
  output logic [19:0]     commo_o,
  output logic            commo_send_o,
  output word_t           txcnf_o,
  output word_t           ana1_o,
  output word_t           ana2_o,
  output word_t           ana3_o
);
  localparam int unsigned OTP_WORDS = OTP_BITS / 16;

  logic                          rom_en;
  logic [$clog2(ROM_WORDS)-1:0]  rom_addr;
  instr_t                        rom_data;
  logic                          ram_re, ram_we;
  logic [$clog2(RAM_WORDS)-1:0]  ram_addr;
  word_t                         ram_wdata, ram_rdata;
  logic                          otp_req, otp_we, otp_ack;
  logic [$clog2(OTP_WORDS)-1:0]  otp_addr;
  word_t                         otp_wdata, otp_rdata;

  sensasip_core #(
    .ROM_WORDS(ROM_WORDS), .RAM_WORDS(RAM_WORDS), .OTP_WORDS(OTP_WORDS),
    .NREGS(NREGS), .NIRQ(NIRQ), .HAS_MUL(HAS_MUL), .HAS_ATAN(HAS_ATAN)
  ) u_core (
    .clk, .rst_n,
    .rom_en, .rom_addr, .rom_data,
    .ram_re, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .otp_req, .otp_we, .otp_addr, .otp_wdata, .otp_ack, .otp_rdata,
    .irq_i, .sleep_o,
    .adc1_i, .adc2_i, .commi_i, .commo_o, .commo_send_o, .txcnf_o,
    .ana1_o, .ana2_o, .ana3_o
  );

  prog_rom #(.DEPTH(ROM_WORDS), .WIDTH(ILEN), .INIT_FILE(ROM_INIT_FILE)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .data(rom_data)
  );

  if (HAS_RAM) begin : g_ram
    data_ram #(.DEPTH(RAM_WORDS), .WIDTH(XLEN)) u_ram (
      .clk, .re(ram_re), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
    );
  end else begin : g_no_ram
    // Without RAM, lw reads zero and sw is lost.
    assign ram_rdata = '0;
  end

  otp_macro #(.BITS(OTP_BITS)) u_otp (
    .clk, .rst_n, .req(otp_req), .we(otp_we), .addr(otp_addr), .wdata(otp_wdata),
    .ack(otp_ack), .rdata(otp_rdata)
  );
endmodule
