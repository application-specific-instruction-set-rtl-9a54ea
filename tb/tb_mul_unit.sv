// Self-checking test of the two-stage multiplier: random and corner operands
// and post-shifts against a 64-bit integer reference with saturation; the
// result must come with done exactly one clock after start (two-cycle
// instruction), and back-to-back starts must both be right.
module tb_mul_unit;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] a = 0, b = 0, y;
  logic [4:0] sh = 0;
  int checks = 0, failures = 0;

  mul_unit #(.W(16)) dut (.clk, .rst_n, .start, .a, .b, .sh, .done, .y);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] ref_mul(logic [15:0] x, logic [15:0] z, int s);
    longint p = (longint'($signed(x)) * longint'($signed(z))) >>> s;
    if (p > 32767) return 16'h7fff;
    if (p < -32768) return 16'h8000;
    return 16'(p);
  endfunction

  initial begin
    logic [15:0] corner [5] = '{16'h8000, 16'h7fff, 16'hffff, 16'h0000, 16'h0001};
    logic [15:0] exp_y;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t < 200) begin a = corner[$urandom_range(0, 4)]; b = corner[$urandom_range(0, 4)]; end
      else begin a = 16'($urandom); b = 16'($urandom); end
      sh = 5'($urandom_range(0, 20));
      exp_y = ref_mul(a, b, int'(sh));
      start = 1;
      #1; checks++; if (done) begin failures++; $display("FAIL done too early"); end
      @(negedge clk); start = (t % 3 == 0);   // sometimes a back-to-back start
      if (start) begin a = 16'($urandom); b = 16'($urandom); end
      checks++;
      if (!done || y !== exp_y) begin
        failures++; $display("FAIL a %h b %h sh %0d y %h exp %h done %b", a, b, sh, y, exp_y, done);
      end
      if (start) begin
        exp_y = ref_mul(a, b, int'(sh));
        @(negedge clk); start = 0;
        checks++;
        if (!done || y !== exp_y) begin failures++; $display("FAIL back-to-back"); end
      end
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
