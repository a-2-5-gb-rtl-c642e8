// spi_master: testbench model of the controller on the serial access port.
// xfer() sends one 16-bit frame, MSB first: {read, addr[6:0], wdata[7:0]}, with sdi set
// up on the falling edge and sampled by the chip on the rising edge of sclk (period
// SCLK_NS, 2 MHz by default), and collects sdo on rising edges 9 to 16.
module spi_master #(
  parameter real SCLK_NS = 500.0
) (
  output logic sclk,
  output logic scs_n,
  output logic sdi,
  input  logic sdo
);
  timeunit 1ns; timeprecision 1ps;
  initial begin sclk = 1'b0; scs_n = 1'b1; sdi = 1'b0; end

  task automatic xfer(input bit rd, input logic [6:0] addr, input logic [7:0] wdata,
                      output logic [7:0] rdata);
    logic [15:0] f;
    f = {rd, addr, wdata};
    rdata = '0;
    scs_n = 1'b0;
    #(SCLK_NS / 2);
    for (int i = 15; i >= 0; i--) begin
      sdi = f[i];
      #(SCLK_NS / 2);
      sclk = 1'b1;
      if (i < 8) rdata = {rdata[6:0], sdo};
      #(SCLK_NS / 2);
      sclk = 1'b0;
    end
    #(SCLK_NS / 2);
    scs_n = 1'b1;
    #(SCLK_NS);
  endtask
endmodule
