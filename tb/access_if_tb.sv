// access_if_tb: checks the serial internal access port and its registers.
// Through a model of the serial controller (2 MHz clock) the testbench writes CTRL, ADDR,
// MASK and the OAM period and checks both the parallel configuration outputs and the read
// back values; reads every status register with random status inputs; checks that a write
// to an error counter gives one clear pulse, that read-only and unmapped registers ignore
// writes, and that an aborted frame (chip select raised early) changes nothing.
module access_if_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sclk, scs_n, sdi, sdo, clr;
  amda_cfg_t cfg;
  amda_stat_t stat;
  int nclr = 0;

  access_if dut (.*);
  spi_master m (.sclk, .scs_n, .sdi, .sdo);
  always #1.6 clk = ~clk;
  always @(posedge clk) if (rst_n && clr) nclr++;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] r;
    m.xfer(1'b0, a, d, r);
  endtask
  task automatic rd(input logic [6:0] a, output logic [7:0] d);
    m.xfer(1'b1, a, 8'h00, d);
  endtask

  initial begin
    logic [7:0] r;
    stat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1000;
    chk(cfg.period == 8'd1 && !cfg.head_end && !cfg.add_en && !cfg.drop_en, "reset values");
    wr(REG_CTRL, 8'b0000_1011);
    chk(cfg.head_end && cfg.add_en && !cfg.drop_en && cfg.rate155, "CTRL write");
    wr(REG_ADDR, 8'h5A);
    wr(REG_MASK, 8'h0F);
    wr(REG_PERIOD, 8'd200);
    chk(cfg.addr == 8'h5A && cfg.mask == 8'h0F && cfg.period == 8'd200, "ADDR/MASK/PERIOD write");
    rd(REG_CTRL, r);   chk(r == 8'h0B, $sformatf("CTRL read %h", r));
    rd(REG_ADDR, r);   chk(r == 8'h5A, $sformatf("ADDR read %h", r));
    rd(REG_MASK, r);   chk(r == 8'h0F, $sformatf("MASK read %h", r));
    rd(REG_PERIOD, r); chk(r == 8'd200, $sformatf("PERIOD read %h", r));
    for (int k = 0; k < 4; k++) begin
      stat = amda_stat_t'({$urandom, $urandom});
      rd(REG_STATUS, r);  chk(r == {5'b0, stat.in_sync, stat.stari_unf, stat.stari_ovf}, $sformatf("STATUS read %h", r));
      rd(REG_SLOTERR, r); chk(r == stat.slot_err, "slot error counter read");
      rd(REG_CNTERR, r);  chk(r == stat.cnt_err, "count error counter read");
      rd(REG_PARERR, r);  chk(r == stat.par_err, "parity error counter read");
      rd(REG_RXCNT, r);   chk(r == stat.rx_cnt, "received count read");
      rd(REG_RXBIP, r);   chk(r == stat.rx_bip, "received BIP read");
    end
    rd(7'h55, r); chk(r == 8'h00, "unmapped register reads 0");
    chk(nclr == 0, "no clear pulse yet");
    wr(REG_PARERR, 8'h00);
    chk(nclr == 1, $sformatf("one clear pulse (%0d)", nclr));
    wr(7'h40, 8'hFF);
    wr(REG_RXCNT, 8'hFF);
    chk(cfg.addr == 8'h5A && cfg.mask == 8'h0F && cfg.period == 8'd200 && nclr == 1, "other writes ignored");
    // aborted frame: 10 bits only
    m.scs_n = 1'b0;
    for (int i = 0; i < 10; i++) begin
      m.sdi = 1'b0; #250 m.sclk = 1'b1; #250 m.sclk = 1'b0;
    end
    m.scs_n = 1'b1; #1000;
    rd(REG_ADDR, r); chk(r == 8'h5A, "aborted frame ignored");
    wr(REG_ADDR, 8'hA7);
    rd(REG_ADDR, r); chk(r == 8'hA7, "port works after an aborted frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
