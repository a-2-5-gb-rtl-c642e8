// mux_ctrl: add function - puts the buffered upstream cell into the first free slot.
//
// The multiplexing cycle of the paper: a cell waits in cell_buffer; the medium access
// control (MAC, in the auxiliary component) grants permission; the cell is then inserted
// into the first empty slot of the high-speed path; emptying the buffer tells the
// auxiliary component it may write the next cell. An empty slot has neither rs nor vc.
// The decision is taken on the soc beat of each slot: if enabled, a cell is held and the
// (synchronised) grant is high, the whole slot is taken: vc is set for all 53 beats and
// the data come from the buffer, one byte per clk. Other slots pass unchanged.
// The grant is a level, synchronised by two flops (this design's choice).
//
// Interface: in/out high-speed beats, out registered (one clk latency). cell_avail,
// rd_en, rd_data connect to cell_buffer. inserted pulses for one clk at each insertion.
module mux_ctrl
  import amda_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       grant,
  input  hs_beat_t   in,
  output hs_beat_t   out,
  input  logic       cell_avail,
  output logic       rd_en,
  input  logic [7:0] rd_data,
  output logic       inserted
);
  logic grant_s1, grant_s2;
  logic busy;     // currently filling a slot (after its soc beat)

  logic take;
  hs_beat_t nxt;
  always_comb begin
    take  = in.soc && !in.rs && !in.vc && en && grant_s2 && cell_avail;
    rd_en = take || (busy && !in.soc);
    nxt   = in;
    if (rd_en) begin
      nxt.vc = 1'b1;
      nxt.d  = rd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_s1 <= 1'b0; grant_s2 <= 1'b0; busy <= 1'b0; out <= '0; inserted <= 1'b0;
    end else begin
      grant_s1 <= grant;
      grant_s2 <= grant_s1;
      out      <= nxt;
      inserted <= take;
      if (in.soc) busy <= take;
    end
  end

  // A slot is taken only while a whole cell is held
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> cell_avail);

endmodule
