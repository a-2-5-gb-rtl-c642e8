// cell_buffer_tb: checks the one-cell buffer between the upstream and system clocks.
// The upstream side writes random 53-byte cells at a sixteenth and then a quarter of the
// system clock rate; the system side waits for cell_avail and reads the cell back byte by
// byte. Checked: data order and values, up_ready low while a cell is held (writes then are
// ignored), cell_avail only once all 53 bytes are in, release after the last read.
module cell_buffer_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic rst_n = 0, clk = 0, wclk = 0;
  logic up_wr = 0, up_soc = 0, up_ready, cell_avail, rd_en = 0;
  logic [7:0] up_d = 0, rd_data;
  int wdiv = 16;

  cell_buffer dut (.*);

  always #1.6 clk = ~clk;
  initial forever begin #(1.6 * wdiv); wclk = ~wclk; end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned cbytes[CELL_BYTES];

  task automatic write_cell();
    for (int b = 0; b < CELL_BYTES; b++) cbytes[b] = 8'($urandom);
    @(posedge wclk);
    while (!up_ready) @(posedge wclk);
    for (int b = 0; b < CELL_BYTES; b++) begin
      up_wr <= 1'b1; up_soc <= (b == 0); up_d <= cbytes[b];
      @(posedge wclk);
      if (b < CELL_BYTES - 1) chk(!cell_avail, "cell_avail before the whole cell is in");
    end
    up_wr <= 1'b0; up_soc <= 1'b0;
  endtask

  task automatic read_cell();
    int bad = 0;
    while (!cell_avail) @(posedge clk);
    chk(!up_ready, "up_ready low while a cell is held");
    // a write attempt now must be ignored
    fork
      begin
        @(posedge wclk); up_wr <= 1'b1; up_soc <= 1'b1; up_d <= 8'hEE;
        @(posedge wclk); up_wr <= 1'b0; up_soc <= 1'b0;
      end
    join
    for (int b = 0; b < CELL_BYTES; b++) begin
      @(negedge clk);
      if (rd_data != cbytes[b]) bad++;
      rd_en = 1'b1;
      @(posedge clk);
      #0.1 rd_en = 1'b0;
    end
    chk(bad == 0, $sformatf("%0d bytes read back wrong", bad));
    @(posedge clk);
    chk(!cell_avail, "cell released after the last byte");
    repeat (4 * wdiv + 8) @(posedge clk);
    chk(up_ready, "up_ready back after release");
  endtask

  initial begin
    repeat (3) @(posedge wclk);   // both domains see reset at a clock edge
    rst_n = 1;
    @(posedge wclk);
    chk(up_ready && !cell_avail, "empty after reset");
    repeat (3) begin write_cell(); read_cell(); end
    wdiv = 4;
    repeat (3) begin write_cell(); read_cell(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
