// clk_div_tb: checks the derived port clocks.
// Counts system clock cycles between rising edges of up_clk and ds_clk: ds_clk must have a
// period of 4 cycles, up_clk 4 cycles (622 Mb/s setting) or 16 cycles (155 Mb/s setting),
// each high for half of its period.
module clk_div_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rate155 = 0;
  logic up_clk, ds_clk;

  clk_div dut (.*);
  always #1.6 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // period and high time of a clock, in system clock cycles
  task automatic measure(input bit which_up, output int period, output int high);
    logic prev, cur;
    int n, edges, t_rise, t_fall;
    n = 0; edges = 0; t_rise = 0; t_fall = 0; period = 0; high = 0;
    @(negedge clk);
    prev = which_up ? up_clk : ds_clk;
    while (edges < 3) begin
      @(negedge clk);
      n++;
      cur = which_up ? up_clk : ds_clk;
      if (cur && !prev) begin
        if (edges > 0) period = n - t_rise;
        t_rise = n;
        edges++;
      end
      if (!cur && prev && edges > 0) high = n - t_rise;
      prev = cur;
    end
  endtask

  initial begin
    int p, h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(1'b0, p, h); chk(p == 4 && h == 2, $sformatf("ds_clk period %0d high %0d", p, h));
    measure(1'b1, p, h); chk(p == 4 && h == 2, $sformatf("up_clk 622 period %0d high %0d", p, h));
    rate155 = 1;
    repeat (20) @(posedge clk);
    measure(1'b1, p, h); chk(p == 16 && h == 8, $sformatf("up_clk 155 period %0d high %0d", p, h));
    measure(1'b0, p, h); chk(p == 4 && h == 2, $sformatf("ds_clk period %0d high %0d", p, h));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
