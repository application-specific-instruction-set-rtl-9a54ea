// Self-checking test of the register file: random writes and dual reads
// against a model array, register 0 stays zero, out-of-range addresses read
// zero, reset clears every register.
module tb_regfile;
  localparam int N = 31;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra, rb, wa;
  logic [15:0] da, db, wd;
  logic [15:0] model [0:31];
  int checks = 0, failures = 0;

  regfile #(.NREGS(N), .WIDTH(16), .AW(5)) dut (
    .clk, .rst_n, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  initial begin
    ra = 0; rb = 0; wa = 0; wd = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); ra = 5'(i); rb = 5'(31 - i); #1;
      chk(da == 0 && db == 0, $sformatf("reset value r%0d", i));
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = 16'($urandom);
      ra = 5'($urandom); rb = 5'($urandom); #1;
      chk(da == model[ra], $sformatf("read a r%0d %h exp %h", ra, da, model[ra]));
      chk(db == model[rb], $sformatf("read b r%0d", rb));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
