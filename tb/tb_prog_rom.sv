// Self-checking test of the program ROM: contents written into the array
// before the run are read back one clock after the address, and the output
// holds while en is low (fetch stall).
module tb_prog_rom;
  localparam int D = 512;
  logic clk = 0, en = 0;
  logic [8:0] addr = '0;
  logic [31:0] data, img [D];
  int checks = 0, failures = 0;

  prog_rom #(.DEPTH(D), .WIDTH(32)) dut (.clk, .en, .addr, .data);

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [31:0] last;
    for (int i = 0; i < D; i++) begin img[i] = $urandom; dut.mem[i] = img[i]; end
    @(negedge clk); en = 1; addr = 0; @(negedge clk); last = data;
    for (int t = 0; t < 4000; t++) begin
      en = $urandom_range(0, 3) != 0; addr = 9'($urandom);
      @(negedge clk);
      checks++;
      if (en ? data !== img[addr] : data !== last) begin
        failures++; $display("FAIL addr %0d en %b data %h", addr, en, data);
      end
      last = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
