// stari_fifo_tb: checks the STARI retiming FIFO.
// A counter is written every wclk. rclk is wclk delayed by a phase offset, swept over ten
// runs (each after a reset) across a whole clock period. In every run: reading must start
// within a few cycles of the threshold; rdata must then step by exactly one on every rclk
// (no beat lost or repeated); the true fill must stay at least 3 entries away from empty
// and from full; no error flag may rise. Then wclk is stopped (underflow must be flagged)
// and, after a reset, rclk is stopped (overflow must be flagged).
module stari_fifo_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 16;
  localparam int START = DEPTH / 2 - 3;
  localparam int W = 11;
  int checks = 0, failures = 0;
  logic rst_n = 0;
  logic wclk = 0, rclk = 0;
  logic wen = 1, ren = 1;
  realtime offset = 0.0;
  logic [W-1:0] wdata, rdata;
  logic rvalid, overflow, underflow;

  stari_fifo dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // equal periods, rclk = wclk shifted by offset
  logic wclk_free = 0;
  initial forever #5 wclk_free = ~wclk_free;
  always @(wclk_free) if (wen) wclk = wclk_free;
  always @(wclk_free) if (ren) rclk <= #(offset) wclk_free;

  always_ff @(posedge wclk or negedge rst_n)
    if (!rst_n) wdata <= '0; else wdata <= wdata + 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start_cyc, fill, fmin, fmax;
  logic [W-1:0] prev;
  initial begin
    // steady state at phase offsets across the whole 10 ns period
    for (int k = 0; k < 10; k++) begin
      rst_n = 0;
      offset = 0.15 + 0.97 * k;
      repeat (3) @(posedge rclk);
      rst_n = 1;
      start_cyc = 0;
      while (!rvalid) begin @(posedge rclk); start_cyc++; end
      chk(start_cyc >= START && start_cyc <= START + 6, $sformatf("start after %0d cycles", start_cyc));
      @(posedge rclk); prev = rdata;
      fmin = DEPTH; fmax = 0;
      repeat (200) begin
        @(posedge rclk);
        chk(rdata == prev + 1'b1, $sformatf("sequence %0d after %0d", rdata, prev));
        prev = rdata;
        // true occupancy, from both pointers at once
        fill = int'(5'(dut.wbin - dut.rbin));
        if (fill < fmin) fmin = fill;
        if (fill > fmax) fmax = fill;
      end
      chk(fmin >= 3 && fmax <= DEPTH - 3, $sformatf("fill %0d..%0d at offset %0.2f", fmin, fmax, offset));
      chk(!overflow && !underflow, $sformatf("no overflow/underflow at offset %0.2f", offset));
    end
    // stop the transmitter: the FIFO runs dry
    wen = 0;
    repeat (DEPTH + 6) @(posedge rclk);
    chk(underflow, "underflow flagged when writes stop");
    chk(!overflow, "no overflow when writes stop");
    // reset, then stop the receiver: the FIFO fills up
    rst_n = 0; wen = 1; #20; rst_n = 1;
    repeat (DEPTH + 4) @(posedge wclk);
    chk(!overflow, "no overflow while both clocks run");
    ren = 0;
    repeat (DEPTH + 6) @(posedge wclk);
    chk(overflow, "overflow flagged when reads stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
