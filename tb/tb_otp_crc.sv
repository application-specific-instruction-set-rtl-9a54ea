// Workload test: OTP safety check in firmware.
//
// The firmware computes a CRC-16 (polynomial 0x1021, initial value 0xFFFF,
// MSB first, one 16-bit OTP word at a time) over OTP words 0..6 using only
// shifts, xor and the conditional branches bne/bgt/beq, compares it with the
// CRC stored in OTP word 7 and reports: ana2 = computed CRC, ana3 = 1 when the
// parameters are intact, 14 when they are corrupted.  The check routine is 23
// instructions long.  The macrocell is built as for the inductive sensor
// (no RAM, no CORDIC unit).  The test runs it on a correct image, then with one OTP
// bit flipped, and compares both with a CRC computed here.
module tb_otp_crc;
  import sensasip_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sleep, send;
  logic [19:0] commo;
  word_t txcnf, ana1, ana2, ana3;

  // Inductive position sensor build: no data RAM, no atan unit.
  sensasip_top #(.HAS_RAM(1'b0), .HAS_ATAN(1'b0)) dut (
    .clk, .rst_n, .irq_i(4'd0), .sleep_o(sleep), .adc1_i(16'd0), .adc2_i(16'd0),
    .commi_i(20'd0), .commo_o(commo), .commo_send_o(send), .txcnf_o(txcnf),
    .ana1_o(ana1), .ana2_o(ana2), .ana3_o(ana3));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [4:0] r5(int r); return 5'(r); endfunction
  function automatic ridx_t r6(int r); return 6'(r); endfunction
  instr_t prog [$];
  task automatic assemble();
    prog.push_back(enc_j(OP_J, 16'd5));                          // 0 reset
    repeat (4) prog.push_back(enc_j(OP_RETURN, 16'd0));          // 1..4
    prog.push_back(enc_i(OP_ADDI, r5(2), r5(0), 16'hFFFF));      // 5  crc
    prog.push_back(enc_i(OP_ADDI, r5(1), r5(0), 16'd0));         // 6  word index
    prog.push_back(enc_i(OP_ADDI, r5(3), r5(0), 16'd7));         // 7  words
    prog.push_back(enc_i(OP_ADDI, r5(4), r5(0), 16'h1021));      // 8  polynomial
    prog.push_back(enc_i(OP_ADDI, r5(6), r5(0), 16'd16));        // 9  bits
    prog.push_back(enc_i(OP_OTPRD, r5(7), r5(1), 16'd0));        // 10 WLOOP
    prog.push_back(enc_r(OP_XOR, r6(2), r6(2), r6(7)));          // 11
    prog.push_back(enc_i(OP_ADDI, r5(5), r5(0), 16'd0));         // 12
    prog.push_back(enc_i(OP_BGT, r5(0), r5(2), 16'd2));          // 13 BLOOP: msb set?
    prog.push_back(enc_r(OP_SLL, r6(2), r6(2), r6(0), 5'd1));    // 14
    prog.push_back(enc_j(OP_J, 16'd18));                         // 15
    prog.push_back(enc_r(OP_SLL, r6(2), r6(2), r6(0), 5'd1));    // 16
    prog.push_back(enc_r(OP_XOR, r6(2), r6(2), r6(4)));          // 17
    prog.push_back(enc_i(OP_ADDI, r5(5), r5(5), 16'd1));         // 18 NEXT
    prog.push_back(enc_i(OP_BNE, r5(5), r5(6), 16'(-7)));        // 19 -> 13
    prog.push_back(enc_i(OP_ADDI, r5(1), r5(1), 16'd1));         // 20
    prog.push_back(enc_i(OP_BNE, r5(1), r5(3), 16'(-12)));       // 21 -> 10
    prog.push_back(enc_i(OP_OTPRD, r5(7), r5(0), 16'd7));        // 22
    prog.push_back(enc_i(OP_ADDI, r5(8), r5(0), 16'd1));         // 23
    prog.push_back(enc_i(OP_BEQ, r5(7), r5(2), 16'd1));          // 24
    prog.push_back(enc_i(OP_ADDI, r5(8), r5(0), 16'd14));        // 25
    prog.push_back(enc_r(OP_ADD, IO_ANA3, r6(8), r6(0)));        // 26
    prog.push_back(enc_r(OP_ADD, IO_ANA2, r6(2), r6(0)));        // 27
    prog.push_back(enc_j(OP_SLEEP, 16'd0));                      // 28 MAIN
    prog.push_back(enc_j(OP_J, 16'd28));                         // 29
  endtask

  function automatic logic [15:0] crc16(logic [15:0] w [8]);
    logic [15:0] c = 16'hFFFF;
    for (int i = 0; i < 7; i++) begin
      c ^= w[i];
      for (int b = 0; b < 16; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  task automatic run(int expect_flag, logic [15:0] exp_crc, string tag);
    int cyc = 0;
    rst_n = 1'b0; repeat (3) @(posedge clk); rst_n = 1'b1;
    @(posedge clk);
    while (!sleep && cyc < 20000) begin @(posedge clk); cyc++; end
    $display("%s: CRC check done after %0d cycles", tag, cyc);
    chk(sleep, {tag, " reached sleep"});
    chk(ana2 == exp_crc, $sformatf("%s crc %h exp %h", tag, ana2, exp_crc));
    chk(int'(ana3) == expect_flag, $sformatf("%s flag %0d exp %0d", tag, ana3, expect_flag));
  endtask

  initial begin
    logic [15:0] img [8];
    assemble();
    #1;
    for (int i = 0; i < prog.size(); i++) dut.u_rom.mem[i] = prog[i];
    for (int i = 0; i < 7; i++) img[i] = 16'($urandom);
    img[3][0] = 1'b0;  // leaves a bit to blow later
    img[7] = crc16(img);
    for (int i = 0; i < 8; i++) dut.u_otp.cells[i] = img[i];
    run(1, img[7], "intact");
    // A programmed cell cannot be cleared, so corrupt by blowing one more bit.
    for (int b = 0; b < 16; b++) if (!img[3][b]) begin img[3][b] = 1'b1; break; end
    dut.u_otp.cells[3] = img[3];
    run(14, crc16(img), "corrupted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
