// Interrupt pending and priority logic of the core.
//
// Each of the NIRQ request lines (for instance "receiver data ready" from the
// phase-shift counters) sets a pending bit while it is high.  A request is
// raised towards the core when a pending bit is also enabled in the mask; the
// lowest-numbered such line wins and its number is given on id.  The core
// pulses ack in the cycle it enters the handler, which clears that pending
// bit.  Handler entry, nesting and the vector address (line n jumps to program
// address n + 1, address 0 being the reset entry) are handled in the core.
// Interrupt-driven firmware and wake-up from sleep follow the processor
// description; the number of lines, the mask and the fixed priority are this
// design's choices.
module irq_ctrl #(
  parameter int unsigned NIRQ = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIRQ-1:0]         irq_i,
  input  logic [NIRQ-1:0]         enable_i,
  input  logic                    ack_i,
  output logic                    req_o,
  output logic [$clog2(NIRQ)-1:0] id_o,
  output logic [NIRQ-1:0]         pending_o
);
  logic [NIRQ-1:0] pend_q, active;

  always_comb begin
    active = pend_q & enable_i;
    req_o  = |active;
    id_o   = '0;
    for (int i = NIRQ - 1; i >= 0; i--)
      if (active[i]) id_o = i[$clog2(NIRQ)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= '0;
    else begin
      for (int i = 0; i < NIRQ; i++) begin
        if (irq_i[i])                                 pend_q[i] <= 1'b1;
        else if (ack_i && req_o && int'(id_o) == i)   pend_q[i] <= 1'b0;
      end
    end
  end

  assign pending_o = pend_q;
endmodule
