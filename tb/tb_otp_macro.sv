// Self-checking test of the OTP model: reads acknowledge after RD_LAT clocks
// with the stored word, programs after PROG_LAT clocks, and programming can
// only set bits (stored = old | new), checked against a model of the cells.
module tb_otp_macro;
  logic clk = 0, rst_n = 0, req = 0, we = 0, ack;
  logic [2:0] addr = '0;
  logic [15:0] wdata = '0, rdata, model [8];
  int checks = 0, failures = 0;

  otp_macro #(.BITS(128), .RD_LAT(2), .PROG_LAT(8)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .ack, .rdata);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int lat;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      we = (t % 3 == 0); addr = 3'($urandom); wdata = 16'($urandom) & 16'($urandom);
      req = 1;
      @(negedge clk); req = 0; lat = 1;
      while (!ack && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != (we ? 8 : 2)) begin failures++; $display("FAIL latency %0d we %b", lat, we); end
      if (we) model[addr] = model[addr] | wdata;
      else begin
        checks++;
        if (rdata !== model[addr]) begin failures++; $display("FAIL read %0d %h exp %h", addr, rdata, model[addr]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
