// oam_monitor_tb: checks the input transmission monitor.
// The testbench builds a slotted stream whose OAM cells carry the right count and BIP-8
// of each frame (its own model), then injects one fault at a time and checks that exactly
// the matching counter moves: a flipped data bit (parity error), a wrong count in an OAM
// cell (count error), and a short slot (slot error, loss of frame sync, no frame check on
// the next OAM cell). Clearing and the received-value registers are checked too.
module oam_monitor_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  hs_beat_t in;
  logic in_sync;
  logic [7:0] slot_err, cnt_err, par_err, rx_cnt, rx_bip;

  oam_monitor dut (.*);
  always #1.6 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned cnt = 0, bip = 0;

  // one slot; flip: xor applied to byte 10 of a valid cell after the BIP is taken;
  // cnt_off: added to the count written into an OAM cell; len: slot length
  task automatic slot(input bit oam, input bit valid, input byte unsigned flip = 0,
                      input byte unsigned cnt_off = 0, input int len = CELL_BYTES);
    for (int b = 0; b < len; b++) begin
      hs_beat_t bt;
      bt.soc = (b == 0);
      bt.rs  = oam;
      bt.vc  = valid;
      bt.d   = 8'($urandom);
      if (oam) bt.d = (b == OAM_CNT_BYTE) ? cnt + cnt_off : (b == OAM_BIP_BYTE) ? bip : 8'h00;
      if (valid) bip ^= bt.d;
      if (valid && b == 10) bt.d ^= flip;
      @(posedge clk);
      in <= bt;
      in_valid <= 1'b1;
    end
    if (oam) begin cnt = 0; bip = 0; end
    if (valid) cnt++;
  endtask

  task automatic frame(input int n, input byte unsigned flip = 0, input byte unsigned cnt_off = 0);
    slot(1'b1, 1'b0, 0, cnt_off);
    for (int i = 0; i < n; i++) slot(1'b0, (i == 1) || ($urandom_range(0, 3) != 0), (i == 1) ? flip : 8'h00);
  endtask

  // pause the stream: the monitor must ignore beats without in_valid
  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk);
      in_valid <= 1'b0;
      in <= '{soc: 1'b1, rs: 1'b1, vc: 1'b1, d: 8'hA5};
    end
  endtask

  byte unsigned last_cnt;
  initial begin
    in = '0;
    idle(3);
    rst_n = 1;
    // clean frames
    for (int f = 0; f < 10; f++) frame(6);
    last_cnt = cnt;
    slot(1'b1, 1'b0);
    idle(3);
    chk(in_sync, "in sync after clean frames");
    chk(slot_err == 0 && cnt_err == 0 && par_err == 0, "no errors on a clean stream");
    chk(rx_cnt == last_cnt, $sformatf("received count %0d expected %0d", rx_cnt, last_cnt));
    for (int i = 0; i < 5; i++) slot(1'b0, 1'b1);
    // parity error: flip a bit in a cell of the next frame
    frame(6, 8'h10);
    frame(6);
    slot(1'b1, 1'b0);
    idle(3);
    chk(par_err == 1 && cnt_err == 0 && slot_err == 0, $sformatf("parity error counted (%0d/%0d/%0d)", par_err, cnt_err, slot_err));
    // count error: the OAM cell closing a frame carries a wrong count
    for (int i = 0; i < 4; i++) slot(1'b0, 1'b1);
    frame(4, 0, 8'd1);
    frame(4);
    idle(3);
    chk(cnt_err == 1 && par_err == 1 && slot_err == 0, $sformatf("count error counted (%0d/%0d/%0d)", par_err, cnt_err, slot_err));
    // slot error: one short slot
    slot(1'b0, 1'b0, 0, 0, 40);
    repeat (2) slot(1'b0, 1'b1);
    idle(3);
    chk(slot_err == 1, $sformatf("slot error counted (%0d)", slot_err));
    chk(!in_sync, "frame sync lost after a slot error");
    // the next OAM cell only re-opens a frame, even if it carries a wrong count
    frame(4, 0, 8'd7);
    chk(cnt_err == 1, "no frame check right after a slot error");
    frame(4);
    frame(4);
    idle(3);
    chk(in_sync && cnt_err == 1 && par_err == 1 && slot_err == 1, "re-synchronised, no new errors");
    // clear
    @(posedge clk) clr <= 1'b1;
    @(posedge clk) clr <= 1'b0;
    @(posedge clk);
    chk(slot_err == 0 && cnt_err == 0 && par_err == 0, "counters cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
