// Behavioural model of the one-time-programmable (OTP) parameter memory, not
// synthesizable logic: in silicon this is a process-specific macro.
//
// BITS bits (128 by default) organised as BITS/16 words of 16 bits.  A request
// (req=1 for one cycle) reads or programs one word; ack pulses when the access
// is over, RD_LAT cycles after a read request (rdata valid with ack) and
// PROG_LAT cycles after a program request.  Programming can only set bits
// (an OTP cell once blown stays blown): the stored word becomes old | wdata.
// The contents do not depend on reset and start unprogrammed (all zero).
// The size is the processor's; the latencies and handshake are assumptions.
module otp_macro #(
  parameter int unsigned BITS     = 128,
  parameter int unsigned RD_LAT   = 2,
  parameter int unsigned PROG_LAT = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          req,
  input  logic                          we,
  input  logic [$clog2(BITS/16)-1:0]    addr,
  input  logic [15:0]                   wdata,
  output logic                          ack,
  output logic [15:0]                   rdata
);
  localparam int unsigned NW = BITS / 16;
  logic [15:0] cells [NW];
  logic [7:0]  cnt_q;
  logic        busy_q, we_q;
  logic [$clog2(NW)-1:0] addr_q;
  logic [15:0] wdata_q;

  initial for (int i = 0; i < int'(NW); i++) cells[i] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; cnt_q <= '0; ack <= 1'b0; rdata <= '0;
      we_q <= 1'b0; addr_q <= '0; wdata_q <= '0;
    end else begin
      ack <= 1'b0;
      if (!busy_q && req) begin
        busy_q  <= 1'b1;
        we_q    <= we;
        addr_q  <= addr;
        wdata_q <= wdata;
        cnt_q   <= 8'(we ? PROG_LAT - 1 : RD_LAT - 1);
      end else if (busy_q) begin
        if (cnt_q <= 8'd1) begin
          busy_q <= 1'b0;
          ack    <= 1'b1;
          if (we_q) cells[addr_q] <= cells[addr_q] | wdata_q;
          else      rdata <= cells[addr_q];
        end else begin
          cnt_q <= cnt_q - 8'd1;
        end
      end
    end
  end
endmodule
