// Self-checking test of the I/O register bank: read-only inputs show the
// hardwired block values, writable registers read back on both ports and
// drive their outputs, writes to read-only or unused addresses change nothing,
// the 20-bit packet is assembled from commo1/commo2 and a write to commo2
// pulses commo_send for one clock.
module tb_io_regs;
  import sensasip_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, send;
  ridx_t ra = '0, rb = '0, wa = '0;
  word_t da, db, wd = '0, adc1 = '0, adc2 = '0, txcnf, ana1, ana2, ana3, otprg, irqen;
  logic [19:0] commi = '0, commo;
  word_t model [32:63];
  int checks = 0, failures = 0;
  int nsend = 0;

  io_regs dut (.clk, .rst_n, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .we, .waddr(wa), .wdata(wd), .adc1_i(adc1), .adc2_i(adc2), .commi_i(commi),
    .commo_o(commo), .commo_send_o(send), .txcnf_o(txcnf), .ana1_o(ana1), .ana2_o(ana2),
    .ana3_o(ana3), .otprg_o(otprg), .irqen_o(irqen));

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  function automatic word_t expect_rd(ridx_t r);
    case (r)
      IO_ADC1: return adc1;
      IO_ADC2: return adc2;
      IO_COMMI1: return commi[15:0];
      IO_COMMI2: return {12'd0, commi[19:16]};
      default: return (r >= 32) ? model[r] : '0;
    endcase
  endfunction

  initial begin
    bit expect_send;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      adc1 = 16'($urandom); adc2 = 16'($urandom); commi = 20'($urandom);
      we = $urandom_range(0, 1); wa = ridx_t'($urandom_range(32, 47)); wd = 16'($urandom);
      ra = ridx_t'($urandom_range(32, 47)); rb = ridx_t'($urandom_range(32, 47));
      #1;
      chk(da == expect_rd(ra), $sformatf("port a reg %0d %h exp %h", ra, da, expect_rd(ra)));
      chk(db == expect_rd(rb), $sformatf("port b reg %0d", rb));
      chk(commo == {model[IO_COMMO2][3:0], model[IO_COMMO1]}, "commo packet");
      chk(txcnf == model[IO_TXCNF] && ana1 == model[IO_ANA1] && ana2 == model[IO_ANA2] &&
          ana3 == model[IO_ANA3] && otprg == model[IO_OTPRG] && irqen == model[IO_IRQEN], "outputs");
      expect_send = we && wa == IO_COMMO2;
      @(posedge clk);
      if (we) case (wa)
        IO_COMMO1, IO_TXCNF, IO_ANA1, IO_ANA2, IO_ANA3, IO_OTPRG, IO_IRQEN: model[wa] = wd;
        IO_COMMO2: model[wa] = {12'd0, wd[3:0]};
        default: ;
      endcase
      #1;
      chk(send == expect_send, "send strobe");
      if (send) nsend++;
    end
    chk(nsend > 0, "send strobe seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
