// Self-checking test of the data RAM: random reads and writes against a model
// array, read data one clock after re, holding when re is low.
module tb_data_ram;
  localparam int D = 128;
  logic clk = 0, re = 0, we = 0;
  logic [6:0] addr = '0;
  logic [15:0] wdata = '0, rdata, model [D];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(D), .WIDTH(16)) dut (.clk, .re, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [15:0] exp_d;
    foreach (model[i]) model[i] = '0;
    exp_d = '0;
    @(negedge clk); re = 1; addr = 0; @(negedge clk); exp_d = rdata;
    for (int t = 0; t < 5000; t++) begin
      re = $urandom_range(0, 1); we = $urandom_range(0, 1);
      addr = 7'($urandom); wdata = 16'($urandom);
      if (re) exp_d = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_d) begin failures++; $display("FAIL addr %0d rdata %h exp %h", addr, rdata, exp_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
