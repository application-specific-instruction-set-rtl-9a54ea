// Self-checking test of the interrupt controller: pulses set pending bits,
// the mask gates them, the lowest enabled line wins, ack clears only the
// winner, and a request arriving together with an ack of the same line stays
// pending.  Checked against a cycle model.
module tb_irq_ctrl;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, ack = 0, req;
  logic [N-1:0] irq = '0, en = '0, pend, mpend;
  logic [1:0] id;
  int checks = 0, failures = 0;

  irq_ctrl #(.NIRQ(N)) dut (.clk, .rst_n, .irq_i(irq), .enable_i(en), .ack_i(ack),
    .req_o(req), .id_o(id), .pending_o(pend));

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  initial begin
    logic [N-1:0] act; int win;
    mpend = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      irq = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      en  = (t % 50 < 5) ? N'($urandom) : en | N'($urandom_range(0, 1));
      ack = $urandom_range(0, 1);
      #1;
      act = mpend & en;
      win = -1;
      for (int i = N - 1; i >= 0; i--) if (act[i]) win = i;
      chk(pend == mpend, $sformatf("pending %b exp %b", pend, mpend));
      chk(req == (act != 0), "req");
      if (win >= 0) chk(int'(id) == win, $sformatf("id %0d exp %0d", id, win));
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (irq[i]) mpend[i] = 1'b1;
        else if (ack && i == win) mpend[i] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
