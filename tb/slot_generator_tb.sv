// slot_generator_tb: checks the head-end slot generator.
// For OAM periods 1, 3, 255 and 0 (treated as 1) the output is compared beat by beat with
// the expected pattern: soc every 53 clk (a 170 ns slot at 311.04 MHz), one OAM slot (rs
// held for the whole slot) followed by `period` empty slots, vc low and zero data.
module slot_generator_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] period;
  hs_beat_t out;

  slot_generator dut (.*);

  always #1.6075 clk = ~clk;   // 311.04 MHz

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

  task automatic run(input logic [7:0] p, input int nslots);
    int eff, bad, soc_seen;
    realtime t0, t1;
    eff = (p == 0) ? 1 : p;
    period = p;
    en = 0;
    @(posedge clk);
    en <= 1;
    @(posedge clk);   // generator registers the first beat at this edge
    bad = 0; soc_seen = 0;
    for (int s = 0; s < nslots; s++) begin
      for (int b = 0; b < CELL_BYTES; b++) begin
        @(negedge clk);
        if (out.soc !== (b == 0)) bad++;
        if (out.rs !== ((s % (eff + 1)) == 0)) bad++;
        if (out.vc !== 1'b0 || out.d !== 8'h00) bad++;
        if (b == 0 && s == 1) t0 = $realtime;
        if (b == 0 && s == 2) t1 = $realtime;
      end
    end
    chk(bad == 0, $sformatf("period %0d: %0d beats wrong", p, bad));
    chk((t1 - t0) > 170.0 && (t1 - t0) < 171.0, $sformatf("slot time %0.2f ns", t1 - t0));
  endtask

  initial begin
    period = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8'd1, 12);
    run(8'd3, 20);
    run(8'd255, 600);
    run(8'd0, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
