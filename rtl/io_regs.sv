// Application-specific I/O registers that connect the core to the hardwired
// blocks kept beside it (receiver counters, communication, transmitter,
// analog interface, OTP special functions).
//
// They sit in the core's register space above the general purpose registers
// (addresses 32..43, see sensasip_pkg), so any R-type instruction can read or
// write them directly, e.g. "add $r1, $adc1, $0".  Two asynchronous read ports
// serve decode, one synchronous write port serves execute.
//   adc1, adc2      read only, receiver phase-shift counters
//   commi1, commi2  read only, received 20-bit packet (16 + 4 bits)
//   commo1, commo2  20-bit packet to transmit; writing commo2 pulses commo_send
//   txcnf           transmitter configuration
//   ana1..ana3      analog interface controls, read back as written
//   otprg           OTP special functions (bit 0 enables programming)
//   irqen           interrupt enable mask (one bit per interrupt line)
// Writable registers reset to zero.  The register names and the 20-bit packet
// split over two registers follow the processor description; the numbering,
// access rights, the send strobe, the otprg bit and irqen are this design's.
module io_regs
  import sensasip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ridx_t       raddr_a,
  output word_t       rdata_a,
  input  ridx_t       raddr_b,
  output word_t       rdata_b,
  input  logic        we,
  input  ridx_t       waddr,
  input  word_t       wdata,
  // hardwired block side
  input  word_t       adc1_i,
  input  word_t       adc2_i,
  input  logic [19:0] commi_i,
  output logic [19:0] commo_o,
  output logic        commo_send_o,
  output word_t       txcnf_o,
  output word_t       ana1_o,
  output word_t       ana2_o,
  output word_t       ana3_o,
  output word_t       otprg_o,
  output word_t       irqen_o
);
  word_t commo1_q, commo2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      commo1_q <= '0; commo2_q <= '0; txcnf_o <= '0;
      ana1_o <= '0; ana2_o <= '0; ana3_o <= '0; otprg_o <= '0; irqen_o <= '0;
      commo_send_o <= 1'b0;
    end else begin
      commo_send_o <= we && waddr == IO_COMMO2;
      if (we) begin
        unique case (waddr)
          IO_COMMO1: commo1_q <= wdata;
          IO_COMMO2: commo2_q <= {12'd0, wdata[3:0]};
          IO_TXCNF:  txcnf_o  <= wdata;
          IO_ANA1:   ana1_o   <= wdata;
          IO_ANA2:   ana2_o   <= wdata;
          IO_ANA3:   ana3_o   <= wdata;
          IO_OTPRG:  otprg_o  <= wdata;
          IO_IRQEN:  irqen_o  <= wdata;
          default: ;
        endcase
      end
    end
  end

  assign commo_o = {commo2_q[3:0], commo1_q};

  function automatic word_t rd(ridx_t a);
    unique case (a)
      IO_ADC1:   return adc1_i;
      IO_ADC2:   return adc2_i;
      IO_COMMI1: return commi_i[15:0];
      IO_COMMI2: return {12'd0, commi_i[19:16]};
      IO_COMMO1: return commo1_q;
      IO_COMMO2: return commo2_q;
      IO_TXCNF:  return txcnf_o;
      IO_ANA1:   return ana1_o;
      IO_ANA2:   return ana2_o;
      IO_ANA3:   return ana3_o;
      IO_OTPRG:  return otprg_o;
      IO_IRQEN:  return irqen_o;
      default:   return '0;
    endcase
  endfunction

  assign rdata_a = rd(raddr_a);
  assign rdata_b = rd(raddr_b);
endmodule
