// Self-checking test of the CORDIC atan unit: vectors in all four quadrants,
// on the axes and at full scale, compared with $atan2 scaled to binary-angle
// units (65536 per turn).  The tolerance is 4 LSB plus a term for small
// vectors, whose angle the integer datapath cannot resolve better.  done must
// rise exactly six clocks after start (seven-cycle instruction) and stay low
// before.
module tb_cordic_atan;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  cordic_atan #(.W(16)) dut (.clk, .rst_n, .start, .a, .b, .done, .y);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int ref_ang(int yy, int xx);
    real r = $atan2(real'(yy), real'(xx)) / (2.0 * 3.14159265358979) * 65536.0;
    int v = int'(r);
    if (v >= 32768) v -= 65536;   // +180 degrees wraps to -180
    return v;
  endfunction

  initial begin
    int ya, xb, e, d, tol, lat;
    int cy [8] = '{0, 1000, 32767, -32768, 0, -5, 20000, -20000};
    int cx [8] = '{1000, 0, 32767, -32768, -1000, 0, -20000, -20000};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      if (t < 8) begin ya = cy[t]; xb = cx[t]; end
      else begin
        ya = int'($signed(16'($urandom)));
        xb = int'($signed(16'($urandom)));
        if (t % 2 == 0) begin ya = ya / 8; xb = xb / 8; end
      end
      @(negedge clk); a = 16'(ya); b = 16'(xb); start = 1;
      lat = 2;  // cycle index once the start cycle is over
      @(negedge clk); start = 0;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 7) begin failures++; $display("FAIL latency %0d", lat); end
      e = ref_ang(ya, xb);
      d = int'($signed(y)) - e;
      if (d > 32768) d -= 65536;
      if (d < -32768) d += 65536;
      tol = 4 + 16384 / ((ya < 0 ? -ya : ya) + (xb < 0 ? -xb : xb) + 1);
      checks++;
      if (d > tol || d < -tol) begin
        failures++; $display("FAIL y %0d x %0d angle %0d exp %0d", ya, xb, $signed(y), e);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
