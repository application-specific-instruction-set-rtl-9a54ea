// Workload test: 3D Hall style angle sensor firmware on the 1024-word ROM
// configuration.
//
// At start-up the firmware copies six processing parameters from the
// non-volatile memory into the data RAM (the shadow copy the RAM exists for).
// Each measurement interrupt then reads the two field components Bx = adc1,
// By = adc2 and runs:
//   offset correction   x = sat(Bx - offx), y = sat(By - offy)      (sub)
//   sensitivity         x = x*sensx >> 14,  y = y*sensy >> 14       (mul)
//   angle               a = atan(y, x)                              (atan)
//   linearisation       o = sat((a - zero) * gain >> 14), o < 0 -> 0
// stores o in a 32-entry history ring in RAM and sends it as a packet.
// Results are compared with a reference that uses the ideal angle; the
// tolerance follows from the CORDIC accuracy times the linearisation gain.
// Vectors whose ideal angle sits next to the wrap point of a - zero are
// skipped, because there the output legitimately jumps.
module tb_hall_workload;
  import sensasip_pkg::*;

  localparam int NS = 80;
  localparam int OFFX = 120, OFFY = -75, SENSX = 17000, SENSY = 15800, ZERO = -8192, GAIN = 24576;

  logic clk = 1'b0, rst_n = 1'b0, sleep, send;
  logic [3:0] irq = '0;
  word_t adc1 = '0, adc2 = '0, txcnf, ana1, ana2, ana3;
  logic [19:0] commo;

  sensasip_top #(.ROM_WORDS(1024)) dut (
    .clk, .rst_n, .irq_i(irq), .sleep_o(sleep), .adc1_i(adc1), .adc2_i(adc2),
    .commi_i(20'd0), .commo_o(commo), .commo_send_o(send), .txcnf_o(txcnf),
    .ana1_o(ana1), .ana2_o(ana2), .ana3_o(ana3));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [4:0] r5(int r); return 5'(r); endfunction
  function automatic ridx_t r6(int r); return 6'(r); endfunction
  instr_t prog [$];
  localparam int HAND = 20;
  task automatic assemble();
    prog.push_back(enc_j(OP_J, 16'd5));                          // 0 reset
    prog.push_back(enc_j(OP_J, 16'(HAND)));                      // 1 measurement ready
    repeat (3) prog.push_back(enc_j(OP_RETURN, 16'd0));          // 2..4
    prog.push_back(enc_i(OP_ADDI, r5(1), r5(0), 16'd0));         // 5
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'd6));         // 6
    prog.push_back(enc_i(OP_OTPRD, r5(3), r5(1), 16'd0));        // 7 COPY
    prog.push_back(enc_i(OP_SW, r5(3), r5(1), 16'd0));           // 8
    prog.push_back(enc_i(OP_ADDI, r5(1), r5(1), 16'd1));         // 9
    prog.push_back(enc_i(OP_BNE, r5(1), r5(2), 16'(-4)));        // 10 -> 7
    prog.push_back(enc_i(OP_ADDI, r5(20), r5(0), 16'd0));        // 11 history pointer
    prog.push_back(enc_i(OP_ADDI, r5(3), r5(0), 16'd1));         // 12
    prog.push_back(enc_r(OP_ADD, IO_IRQEN, r6(3), r6(0)));       // 13
    prog.push_back(enc_j(OP_SLEEP, 16'd0));                      // 14 MAIN
    prog.push_back(enc_j(OP_J, 16'd14));                         // 15
    repeat (4) prog.push_back(enc_j(OP_NOP, 16'd0));             // 16..19
    // HAND = 20
    prog.push_back(enc_i(OP_LW, r5(10), r5(0), 16'd0));          // offx
    prog.push_back(enc_i(OP_LW, r5(11), r5(0), 16'd1));          // offy
    prog.push_back(enc_i(OP_LW, r5(12), r5(0), 16'd2));          // sensx
    prog.push_back(enc_i(OP_LW, r5(13), r5(0), 16'd3));          // sensy
    prog.push_back(enc_i(OP_LW, r5(14), r5(0), 16'd4));          // zero
    prog.push_back(enc_i(OP_LW, r5(15), r5(0), 16'd5));          // gain
    prog.push_back(enc_r(OP_SUB, r6(1), IO_ADC1, r6(10)));
    prog.push_back(enc_r(OP_MUL, r6(1), r6(1), r6(12), 5'd14));
    prog.push_back(enc_r(OP_SUB, r6(2), IO_ADC2, r6(11)));
    prog.push_back(enc_r(OP_MUL, r6(2), r6(2), r6(13), 5'd14));
    prog.push_back(enc_r(OP_ATAN, r6(3), r6(2), r6(1)));
    prog.push_back(enc_r(OP_SUBU, r6(4), r6(3), r6(14)));
    prog.push_back(enc_r(OP_MUL, r6(4), r6(4), r6(15), 5'd14));
    prog.push_back(enc_i(OP_BGT, r5(4), r5(0), 16'd1));
    prog.push_back(enc_r(OP_ADD, r6(4), r6(0), r6(0)));
    prog.push_back(enc_i(OP_SW, r5(4), r5(20), 16'd64));
    prog.push_back(enc_i(OP_ADDI, r5(20), r5(20), 16'd1));
    prog.push_back(enc_i(OP_ANDI, r5(20), r5(20), 16'd31));
    prog.push_back(enc_r(OP_ADD, IO_COMMO1, r6(4), r6(0)));
    prog.push_back(enc_r(OP_ADD, IO_COMMO2, r6(0), r6(0)));
    prog.push_back(enc_j(OP_RETURN, 16'd0));
  endtask

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic real ref_out(int bx, int by, output real ang);
    int x, y; real o;
    x = sat16(bx - OFFX); x = sat16((longint'(x) * SENSX) >>> 14);
    y = sat16(by - OFFY); y = sat16((longint'(y) * SENSY) >>> 14);
    ang = $atan2(real'(y), real'(x)) / (2.0 * 3.14159265358979) * 65536.0;
    o = (ang - ZERO);
    if (o >= 32768.0) o -= 65536.0;
    o = o * GAIN / 16384.0;
    if (o > 32767.0) o = 32767.0;
    if (o < -32768.0) o = -32768.0;
    if (o <= 0.0) o = 0.0;
    return o;
  endfunction

  initial begin
    int bx, by, cyc, maxcyc = 0, got;
    real ang, o, d, tol;
    int hist [32];
    assemble();
    #1;
    for (int i = 0; i < prog.size(); i++) dut.u_rom.mem[i] = prog[i];
    dut.u_otp.cells[0] = 16'(OFFX);  dut.u_otp.cells[1] = 16'(OFFY);
    dut.u_otp.cells[2] = 16'(SENSX); dut.u_otp.cells[3] = 16'(SENSY);
    dut.u_otp.cells[4] = 16'(ZERO);  dut.u_otp.cells[5] = 16'(GAIN);
    repeat (3) @(posedge clk); rst_n = 1'b1;
    cyc = 0; while (!sleep && cyc < 5000) begin @(posedge clk); cyc++; end
    chk(dut.g_ram.u_ram.mem[2] == 16'(SENSX) && dut.g_ram.u_ram.mem[4] == 16'(ZERO), "parameters shadowed in RAM");
    for (int s = 0; s < NS; s++) begin
      do begin
        bx = $urandom_range(0, 16000) - 8000; by = $urandom_range(0, 16000) - 8000;
        o = ref_out(bx, by, ang);
      end while ((bx - OFFX) * (bx - OFFX) + (by - OFFY) * (by - OFFY) < 1000000 ||
                 (ang > 24576.0 - 64.0 && ang < 24576.0 + 64.0));
      adc1 = 16'(bx); adc2 = 16'(by);
      @(negedge clk); irq[0] = 1'b1; @(negedge clk); irq[0] = 1'b0;
      cyc = 0;
      while (!send && cyc < 3000) begin @(posedge clk); cyc++; end
      if (cyc > maxcyc) maxcyc = cyc;
      got = int'($signed(commo[15:0]));
      d = real'(got) - o;
      tol = 8.0 * GAIN / 16384.0 + 2.0;
      chk(d <= tol && d >= -tol, $sformatf("sample %0d Bx %0d By %0d out %0d exp %0.1f", s, bx, by, got, o));
      hist[s % 32] = got;
      cyc = 0; while (!sleep && cyc < 3000) begin @(posedge clk); cyc++; end
    end
    for (int k = 0; k < 32; k++) begin
      chk(int'($signed(dut.g_ram.u_ram.mem[64 + k])) == hist[k], $sformatf("history entry %0d", k));
    end
    $display("handler: packet at most %0d cycles after the interrupt", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
