// stari_fifo: receiver-side retiming FIFO of a STARI (self-timed at receiver's input) link.
//
// The transmitter and the receiver run at the same clock frequency with an unknown,
// drifting phase. The transmitter's clock comes with the data and writes one beat into
// the FIFO every cycle; the receiver's system clock reads one beat every cycle. Reading
// starts only once the FIFO is about half full, so that in steady state it can neither
// overflow nor underflow, whatever the phase: the data leave retimed to the system clock.
// That principle follows the paper. The paper's FIFO is self-timed (asynchronous ripple
// stages); here it is a dual-clock FIFO with Gray-coded pointers, each crossing through
// two synchronising flops, which does the same job in clocked logic. The depth and the
// start threshold are this design's choice: reading starts when the write pointer seen
// through the synchronisers is START entries ahead; with the synchroniser lag that leaves
// the FIFO about half full, with some 4 entries of margin on both sides at DEPTH = 16.
//
// Interface: write side wclk/wdata (writes every cycle once out of reset); read side
// rclk/rdata/rvalid. rvalid rises once the start threshold is reached and then stays
// high; rdata is registered and changes one rclk after each read. overflow (wclk domain)
// and underflow (rclk domain) are sticky error flags, cleared only by reset.
module stari_fifo #(
  parameter int DEPTH = 16,
  parameter int W     = 11,
  // fill level, as seen through the synchronisers, at which reading starts; the lag of
  // about three cycles is allowed for, so that the real fill is then about DEPTH/2
  parameter int START = DEPTH / 2 - 3
) (
  input  logic         rst_n,
  input  logic         wclk,
  input  logic [W-1:0] wdata,
  output logic         overflow,
  input  logic         rclk,
  output logic [W-1:0] rdata,
  output logic         rvalid,
  output logic         underflow
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in wclk domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in rclk domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wfill;
  logic        wfull;
  assign wfill = wbin - gray2bin(rgray_w2);
  assign wfull = (wfill == (AW+1)'(DEPTH));

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wfull) begin
        overflow <= 1'b1;
      end else begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (!wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  logic [AW:0] rfill;
  logic        rempty;
  assign rfill  = gray2bin(wgray_r2) - rbin;
  assign rempty = (rfill == '0);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
      rvalid    <= 1'b0;
      underflow <= 1'b0;
      rdata     <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (!rvalid) begin
        if (rfill >= (AW+1)'(START)) rvalid <= 1'b1;
      end else if (rempty) begin
        underflow <= 1'b1;
      end else begin
        rdata <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
