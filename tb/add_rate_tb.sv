// add_rate_tb: sustained add rate of one node, for 155 and 622 Mb/s upstream ports.
//
// A single head-end node (OAM period 255, grant always on) is fed by an upstream writer
// that starts the next cell as soon as up_ready allows. The testbench times the gaps
// between cells appearing on the high-speed output and reports the add rate in Mb/s of
// 53-byte cells. Each gap must be at least the write time of a cell (53 upstream clocks)
// and at most that plus the hand-over overhead: synchronisation both ways, up to one slot
// of waiting for a free slot and one slot of read-out. Every cell must arrive intact.
module add_rate_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam real HALF = 1.6075;   // 311.04 MHz
  localparam int  NCELLS = 12;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  logic clk = 0, rst_n = 1;
  initial forever #HALF clk = ~clk;
  initial #0.5 rst_n = 0;

  logic tx_clk, tx_soc, tx_rs_n, tx_vc_n, up_clk, up_ready, ds_clk, ds_valid, ds_sop, ds_eop;
  logic up_wr = 0, up_soc = 0;
  logic [7:0] tx_d, up_d = 0;
  logic [31:0] ds_data;
  logic sclk, scs_n, sdi, sdo;

  amda_top dut (
    .clk, .rst_n, .rx_clk(clk), .rx_soc(1'b0), .rx_rs_n(1'b1), .rx_vc_n(1'b1), .rx_d(8'h00),
    .tx_clk, .tx_soc, .tx_rs_n, .tx_vc_n, .tx_d,
    .up_clk, .up_wr, .up_soc, .up_d, .up_ready, .up_grant(1'b1),
    .ds_clk, .ds_valid, .ds_sop, .ds_eop, .ds_data,
    .sclk, .scs_n, .sdi, .sdo
  );
  spi_master spi (.sclk, .scs_n, .sdi, .sdo);

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: cell k carries k in every byte after the first
  bit writing = 0;
  int wr_cells = 0;
  initial begin
    wait (writing);
    forever begin
      @(posedge up_clk);
      if (writing && up_ready) begin
        for (int b = 0; b < CELL_BYTES; b++) begin
          #0.5 up_wr = 1; up_soc = (b == 0); up_d = (b == 0) ? 8'h33 : 8'(wr_cells);
          @(posedge up_clk);
        end
        #0.5 up_wr = 0; up_soc = 0;
        wr_cells++;
      end
    end
  end

  // output: time of each valid cell, and its content
  int cyc = 0, n_out = 0, bad = 0, pos = 0;
  int t_cell[$];
  bit in_vc = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_soc) begin
      pos = 0; in_vc = !tx_vc_n && tx_rs_n;
      if (in_vc) t_cell.push_back(cyc);
    end else pos++;
    if (in_vc && pos > 0 && tx_d != 8'(t_cell.size() - 1 + n_out)) bad++;
  end

  task automatic measure(input bit r155);
    logic [7:0] rr;
    int div, gmin, gmax, lo, hi;
    real mbps;
    div = r155 ? 16 : 4;
    writing = 0;
    repeat (200 * div) @(posedge clk);
    spi.xfer(1'b0, REG_CTRL, {4'b0, r155, 3'b011}, rr);
    n_out += t_cell.size();
    t_cell.delete();
    writing = 1;
    wait (t_cell.size() == NCELLS);
    writing = 0;
    gmin = 1 << 30; gmax = 0;
    for (int i = 2; i < NCELLS; i++) begin
      int g;
      g = t_cell[i] - t_cell[i-1];
      if (g < gmin) gmin = g;
      if (g > gmax) gmax = g;
    end
    lo = 53 * div;
    hi = 53 * div + 8 + 2 * CELL_BYTES + 4 * div;
    mbps = 53.0 * 8.0 * (NCELLS - 3) / (real'(t_cell[NCELLS-1] - t_cell[2]) * 2.0 * HALF) * 1000.0;
    $display("upstream at clk/%0d: a cell every %0d..%0d clk, %0.1f Mb/s of cells", div, gmin, gmax, mbps);
    chk(gmin >= lo && gmax <= hi, $sformatf("gaps %0d..%0d outside %0d..%0d", gmin, gmax, lo, hi));
  endtask

  initial begin
    logic [7:0] rr;
    repeat (40) @(posedge clk);
    rst_n = 1;
    spi.xfer(1'b0, REG_PERIOD, 8'd255, rr);
    measure(1'b1);
    measure(1'b0);
    repeat (200) @(posedge clk);
    chk(bad == 0, $sformatf("%0d bytes wrong", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
