// End-to-end test of the ASIP macrocell at its default sizes, running an
// inductive-position-sensor style firmware.
//
// The firmware (assembled below with the sensasip_pkg encoders) starts with the
// jump table (reset, receiver interrupt, communication interrupt), programs
// five conditioning parameters into the OTP and reads them back, enables the
// interrupts and sleeps.  Each "receiver data ready" interrupt runs the
// conditioning chain average -> scale (mul) -> offset -> clamp to [min, max]
// -> output scale (mul), stores the result in RAM and reads it back, computes
// atan(adc2, adc1) with the CORDIC unit and sends the result as a packet.
// A "packet received" interrupt echoes commi1 + 1 on ana3.
// Results are compared with a reference model written here; the mul and atan
// latencies (2 and 7 cycles in EX) are measured; and the test counts how often
// each pipeline mechanism happened (MCI stalls of each kind, bypass, branch
// squash, interrupt entry, sleep/wake, clamping both ways) and fails for any
// that never did.
module tb_sensasip_top;
  import sensasip_pkg::*;

  localparam int NSAMPLES = 60;
  localparam int GAIN  = 20000, SH1 = 14, OFFS = -300, CMAX = 4000, CMIN = 200;
  localparam int OGAIN = 30000, SH2 = 12;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  irq = '0;
  logic        sleep;
  word_t       adc1 = '0, adc2 = '0;
  logic [19:0] commi = '0, commo;
  logic        commo_send;
  word_t       txcnf, ana1, ana2, ana3;

  sensasip_top dut (
    .clk, .rst_n, .irq_i(irq), .sleep_o(sleep),
    .adc1_i(adc1), .adc2_i(adc2), .commi_i(commi), .commo_o(commo),
    .commo_send_o(commo_send), .txcnf_o(txcnf), .ana1_o(ana1), .ana2_o(ana2), .ana3_o(ana3)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ firmware
  instr_t prog [$];
  function automatic logic [4:0] r5(int r); return 5'(r); endfunction
  function automatic ridx_t r6(int r); return 6'(r); endfunction

  localparam int INIT = 5, MAIN = 25, HADC = 27, HCOMM = 45;

  task automatic assemble();
    prog.delete();
    prog.push_back(enc_j(OP_J, 16'(INIT)));                     // 0 reset
    prog.push_back(enc_j(OP_J, 16'(HADC)));                     // 1 irq0
    prog.push_back(enc_j(OP_J, 16'(HCOMM)));                    // 2 irq1
    prog.push_back(enc_j(OP_RETURN, 16'd0));                    // 3 irq2
    prog.push_back(enc_j(OP_RETURN, 16'd0));                    // 4 irq3
    // INIT
    prog.push_back(enc_i(OP_ADDI, r5(1), r5(0), 16'd1));        // 5
    prog.push_back(enc_r(OP_ADD, IO_OTPRG, r6(1), r6(0)));      // 6 programming on
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'(GAIN)));    // 7
    prog.push_back(enc_i(OP_OTPWR, r5(2), r5(0), 16'd0));       // 8
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'(OFFS)));    // 9
    prog.push_back(enc_i(OP_OTPWR, r5(2), r5(0), 16'd1));       // 10
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'(CMAX)));    // 11
    prog.push_back(enc_i(OP_OTPWR, r5(2), r5(0), 16'd2));       // 12
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'(CMIN)));    // 13
    prog.push_back(enc_i(OP_OTPWR, r5(2), r5(0), 16'd3));       // 14
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'(OGAIN)));   // 15
    prog.push_back(enc_i(OP_OTPWR, r5(2), r5(0), 16'd4));       // 16
    prog.push_back(enc_r(OP_ADD, IO_OTPRG, r6(0), r6(0)));      // 17 programming off
    prog.push_back(enc_i(OP_OTPRD, r5(10), r5(0), 16'd0));      // 18
    prog.push_back(enc_i(OP_OTPRD, r5(11), r5(0), 16'd1));      // 19
    prog.push_back(enc_i(OP_OTPRD, r5(12), r5(0), 16'd2));      // 20
    prog.push_back(enc_i(OP_OTPRD, r5(13), r5(0), 16'd3));      // 21
    prog.push_back(enc_i(OP_OTPRD, r5(14), r5(0), 16'd4));      // 22
    prog.push_back(enc_i(OP_ADDI, r5(3), r5(0), 16'd3));        // 23
    prog.push_back(enc_r(OP_ADD, IO_IRQEN, r6(3), r6(0)));      // 24 enable irq0, irq1
    // MAIN
    prog.push_back(enc_j(OP_SLEEP, 16'd0));                     // 25
    prog.push_back(enc_j(OP_J, 16'(MAIN)));                     // 26
    // HADC
    prog.push_back(enc_r(OP_ADD, r6(4), IO_ADC1, r6(0)));       // 27
    prog.push_back(enc_r(OP_ADD, r6(5), IO_ADC2, r6(0)));       // 28
    prog.push_back(enc_r(OP_ADD, r6(6), r6(4), r6(5)));         // 29
    prog.push_back(enc_r(OP_SRA, r6(6), r6(6), r6(0), 5'd1));   // 30 average
    prog.push_back(enc_r(OP_MUL, r6(7), r6(6), r6(10), 5'(SH1)));// 31 scale
    prog.push_back(enc_r(OP_ADD, r6(7), r6(7), r6(11)));        // 32 offset
    prog.push_back(enc_i(OP_BGT, r5(12), r5(7), 16'd1));        // 33 max > v ?
    prog.push_back(enc_r(OP_ADD, r6(7), r6(12), r6(0)));        // 34 clamp max
    prog.push_back(enc_i(OP_BGT, r5(7), r5(13), 16'd1));        // 35 v > min ?
    prog.push_back(enc_r(OP_ADD, r6(7), r6(13), r6(0)));        // 36 clamp min
    prog.push_back(enc_r(OP_MUL, r6(8), r6(7), r6(14), 5'(SH2)));// 37 output scale
    prog.push_back(enc_i(OP_SW, r5(8), r5(0), 16'd5));          // 38
    prog.push_back(enc_i(OP_LW, r5(9), r5(0), 16'd5));          // 39
    prog.push_back(enc_r(OP_ADD, IO_ANA2, r6(9), r6(0)));       // 40
    prog.push_back(enc_r(OP_ATAN, IO_ANA1, r6(5), r6(4)));      // 41
    prog.push_back(enc_r(OP_ADD, IO_COMMO1, r6(8), r6(0)));     // 42
    prog.push_back(enc_r(OP_ADD, IO_COMMO2, r6(0), r6(0)));     // 43 send
    prog.push_back(enc_j(OP_RETURN, 16'd0));                    // 44
    // HCOMM
    prog.push_back(enc_r(OP_ADD, r6(15), IO_COMMI1, r6(0)));    // 45
    prog.push_back(enc_i(OP_ADDI, r5(15), r5(15), 16'd1));      // 46
    prog.push_back(enc_r(OP_ADD, IO_ANA3, r6(15), r6(0)));      // 47
    prog.push_back(enc_j(OP_RETURN, 16'd0));                    // 48
  endtask

  // ------------------------------------------------------------ reference
  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int condition(int a1, int a2);
    int avg, sc, off, o;
    avg = sat16(a1 + a2) >>> 1;
    sc  = sat16((longint'(avg) * GAIN) >>> SH1);
    off = sat16(sc + OFFS);
    if (!(CMAX > off)) off = CMAX;
    if (!(off > CMIN)) off = CMIN;
    o   = sat16((longint'(off) * OGAIN) >>> SH2);
    return o;
  endfunction
  function automatic int ref_angle(int y, int x);
    real ang;
    ang = $atan2(real'(y), real'(x)) / (2.0 * 3.14159265358979) * 65536.0;
    return int'(ang);
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int n_mul, n_atan, n_otp, n_lw, n_bypass, n_squash, n_irq, n_wake, n_clmax, n_clmin, n_send;
  int mci_len, mul_bad, atan_bad;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.ex_valid_q) mci_len++;
    if (dut.u_core.ex_done && dut.u_core.ex_q.op == OP_MUL) begin
      n_mul++; if (mci_len != 2) mul_bad++;
    end
    if (dut.u_core.ex_done && dut.u_core.ex_q.op == OP_ATAN) begin
      n_atan++; if (mci_len != 7) atan_bad++;
    end
    if (dut.u_core.ex_done && dut.u_core.ex_q.op inside {OP_OTPRD, OP_OTPWR} && mci_len > 1) n_otp++;
    if (dut.u_core.ex_done && dut.u_core.ex_q.op == OP_LW && mci_len == 2) n_lw++;
    if (dut.u_core.ex_done) mci_len = 0;
    if (!dut.u_core.ex_stall && dut.u_core.id_valid_q &&
        (dut.u_core.byp_a || dut.u_core.byp_b)) n_bypass++;
    if (dut.u_core.redirect && dut.u_core.id_valid_q) n_squash++;
    if (dut.u_core.irq_take) n_irq++;
    if (dut.u_core.irq_take && dut.u_core.sleep_q) n_wake++;
    if (dut.u_core.ex_done && dut.u_core.ex_q.pc == 9'(34)) n_clmax++;
    if (dut.u_core.ex_done && dut.u_core.ex_q.pc == 9'(36)) n_clmin++;
    if (commo_send) n_send++;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_sleep();
    int n = 0;
    do begin @(posedge clk); n++; end while (!sleep && n < 2000);
    check(sleep, "core did not return to sleep");
  endtask

  initial begin
    int a1, a2, exp_o, exp_ang, d, cyc, maxcyc, tol;
    logic [19:0] pkt;
    assemble();
    for (int i = 0; i < prog.size(); i++) dut.u_rom.mem[i] = prog[i];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait_sleep();
    check(dut.u_core.u_rf.regs[10] == 16'(GAIN) && dut.u_core.u_rf.regs[11] == 16'(OFFS) &&
          dut.u_core.u_rf.regs[14] == 16'(OGAIN), "OTP parameters read back");
    maxcyc = 0;
    for (int s = 0; s < NSAMPLES; s++) begin
      if (s == 0)      begin a1 = 4095; a2 = 4095; end
      else if (s == 1) begin a1 = 0;    a2 = 10;   end
      else begin a1 = $urandom_range(0, 4095); a2 = $urandom_range(0, 4095); end
      adc1 = 16'(a1); adc2 = 16'(a2);
      @(negedge clk); irq[0] = 1'b1; @(negedge clk); irq[0] = 1'b0;
      cyc = 0;
      while (!commo_send && cyc < 2000) begin @(posedge clk); cyc++; end
      if (cyc > maxcyc) maxcyc = cyc;
      exp_o = condition(a1, a2);
      check(commo == {4'd0, 16'(exp_o)}, $sformatf("sample %0d packet %h exp %h", s, commo, exp_o));
      wait_sleep();
      check(ana2 == 16'(exp_o), $sformatf("sample %0d RAM round trip %h", s, ana2));
      exp_ang = ref_angle(a2, a1);
      d = int'($signed(ana1)) - exp_ang;
      tol = 4 + 8192 / (a1 + a2);  // quantisation of small vectors
      check(d >= -tol && d <= tol, $sformatf("sample %0d atan %0d exp %0d", s, $signed(ana1), exp_ang));
      if (s % 5 == 2) begin
        pkt = 20'($urandom);
        commi = pkt;
        @(negedge clk); irq[1] = 1'b1; @(negedge clk); irq[1] = 1'b0;
        repeat (3) @(posedge clk);
        wait_sleep();
        check(ana3 == pkt[15:0] + 16'd1, $sformatf("comm echo %h", ana3));
      end
    end
    // Two interrupts at once: both handlers must run, receiver first.
    adc1 = 16'd1000; adc2 = 16'd3000; commi = 20'h0_1234;
    @(negedge clk); irq = 4'b0011; @(negedge clk); irq = '0;
    repeat (5) @(posedge clk);
    wait_sleep();
    check(commo[15:0] == 16'(condition(1000, 3000)) && ana3 == 16'h1235, "simultaneous interrupts");
    $display("handler: packet after at most %0d cycles", maxcyc);
    $display("mechanisms: mul=%0d atan=%0d otp_stall=%0d lw_stall=%0d bypass=%0d squash=%0d irq=%0d wake=%0d clamp_max=%0d clamp_min=%0d sent=%0d",
             n_mul, n_atan, n_otp, n_lw, n_bypass, n_squash, n_irq, n_wake, n_clmax, n_clmin, n_send);
    check(mul_bad == 0, "mul takes 2 cycles");
    check(atan_bad == 0, "atan takes 7 cycles");
    check(n_mul > 0, "mul MCI seen");
    check(n_atan > 0, "atan MCI seen");
    check(n_otp > 0, "OTP stall seen");
    check(n_lw > 0, "load stall seen");
    check(n_bypass > 0, "bypass seen");
    check(n_squash > 0, "branch squash seen");
    check(n_irq > 0, "interrupt entry seen");
    check(n_wake > 0, "wake from sleep seen");
    check(n_clmax > 0, "clamp to max seen");
    check(n_clmin > 0, "clamp to min seen");
    check(n_send == NSAMPLES + 1, "one packet per sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
