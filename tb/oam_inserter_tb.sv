// oam_inserter_tb: checks the output frame-check insertion.
// A stream of slots is driven: every 5th slot is an OAM slot with garbage in it, the
// others are valid cells (random data) or empty with random probability. The testbench
// keeps its own count and BIP-8 of the valid cells of each frame. At the output (one clk
// later) OAM bytes 5 and 6 must hold those values and every other beat must be unchanged.
module oam_inserter_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  hs_beat_t in, out;
  hs_beat_t exp_q[$];

  oam_inserter dut (.*);
  always #1.6 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: a beat driven at edge n is sampled at n+1 and shown at the output
  // after n+1, when the queue already holds the beat driven at n+1
  always @(negedge clk) begin
    if (exp_q.size() > 1) begin
      hs_beat_t e;
      e = exp_q.pop_front();
      chk(out == e, $sformatf("out %h expected %h", out, e));
    end
  end

  int frames_checked = 0;
  initial begin
    byte unsigned cnt, bip;
    bit first;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cnt = 0; bip = 0; first = 1;
    for (int s = 0; s < 200; s++) begin
      bit oam, valid;
      oam   = (s % 5) == 0;
      valid = !oam && ($urandom_range(0, 2) != 0);
      for (int b = 0; b < CELL_BYTES; b++) begin
        hs_beat_t bt, e;
        @(posedge clk);
        bt.soc = (b == 0);
        bt.rs  = oam;
        bt.vc  = valid;
        bt.d   = 8'($urandom);
        in <= bt;
        e = bt;
        if (oam && b == OAM_CNT_BYTE) e.d = cnt;
        if (oam && b == OAM_BIP_BYTE) e.d = bip;
        if (valid) bip ^= bt.d;
        // at the OAM slot, frames start over after bytes 5/6 were filled
        exp_q.push_back(e);
        if (oam && b == CELL_BYTES - 1) begin
          cnt = 0; bip = 0;
          frames_checked++;
        end
      end
      if (valid) cnt++;
    end
    @(posedge clk);
    @(negedge clk);
    @(negedge clk);
    chk(frames_checked == 40, "frames driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
