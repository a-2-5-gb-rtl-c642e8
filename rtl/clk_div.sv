// clk_div: derives the clocks of the low-speed side from the system clock.
//
// The upstream (add) port is written at a quarter of the system clock for a 622 Mb/s
// interface (77.76 MHz) or a sixteenth for 155 Mb/s (19.44 MHz); the downstream (drop)
// side runs at a quarter. Those ratios are the paper's; generating the clocks inside the
// chip with a counter is this design's choice. Both outputs come straight from flops of
// a free-running 4-bit counter, with 50% duty cycle. A change of rate155 takes effect at
// once; a clock edge may then be short for one period.
module clk_div (
  input  logic clk,
  input  logic rst_n,
  input  logic rate155,   // 1: upstream at clk/16, 0: upstream at clk/4
  output logic up_clk,
  output logic ds_clk
);
  logic [3:0] cnt;
  logic [3:0] nxt;
  assign nxt = cnt + 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      up_clk <= 1'b0;
      ds_clk <= 1'b0;
    end else begin
      cnt    <= nxt;
      ds_clk <= nxt[1];
      up_clk <= rate155 ? nxt[3] : nxt[1];
    end
  end

endmodule
