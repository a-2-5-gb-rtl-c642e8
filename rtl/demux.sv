// demux: drop function - extracts cells addressed to this node onto a 32-bit port.
//
// On the soc beat of each valid cell the first header byte is compared with the node
// address under a mask (mask bit 1 = don't care), as the paper describes ("an 8 bit
// address with optional masking"). A matching cell is copied to the downstream port. A
// unicast cell is then removed from the high-speed path: its slot leaves empty (vc low,
// zero data). A multicast or broadcast cell stays valid. This design takes bit 7 of the
// address byte as the multicast/broadcast mark; the paper does not say how they are told.
//
// Downstream packing (this design's choice): header bytes 0-3 form word 0, payload bytes
// 5-52 form words 1-12, the first byte of a word in bits 31:24; the HEC byte is not
// passed. A cell is 13 words; consecutive words are at least 4 clk apart, so the port
// keeps up with a full 2.5 Gb/s drop while being read at a quarter of the system clock.
//
// Interface: in/out high-speed beats, out registered (one clk latency). ds_valid pulses
// for one clk with each word; ds_data holds the word until the next one; ds_sop and ds_eop
// flag words 0 and 12. dropped pulses on the soc beat of every extracted cell.
module demux
  import amda_pkg::*;
#(
  parameter int CELL_BYTES_P = CELL_BYTES,
  parameter int DS_W         = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [7:0]      addr,
  input  logic [7:0]      mask,
  input  hs_beat_t        in,
  output hs_beat_t        out,
  output logic            ds_valid,
  output logic            ds_sop,
  output logic            ds_eop,
  output logic [DS_W-1:0] ds_data,
  output logic            dropped
);
  localparam int BW  = $clog2(CELL_BYTES_P);
  localparam int BPW = DS_W / 8;      // bytes per downstream word

  logic [BW-1:0]   pos;
  logic            cap;      // current slot is being copied downstream
  logic            rem;      // current slot is being removed
  localparam int NW = $clog2(BPW + 1);
  logic [DS_W-9:0] shreg;    // bytes of the word being gathered
  logic [NW-1:0]   nbytes;   // how many of them
  logic            first_word;

  logic [BW-1:0] cur_pos;
  logic          match, cur_cap, cur_rem, keep_byte;
  logic [NW-1:0] cur_nb;
  always_comb begin
    cur_pos   = in.soc ? '0 : pos;
    cur_nb    = in.soc ? '0 : nbytes;
    match     = in.vc && !in.rs && en && (((in.d ^ addr) & ~mask) == 8'h00);
    cur_cap   = in.soc ? match : cap;
    cur_rem   = in.soc ? (match && !in.d[7]) : rem;
    keep_byte = cur_cap && (cur_pos != BW'(HEC_BYTE));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; cap <= 1'b0; rem <= 1'b0; out <= '0;
      shreg <= '0; nbytes <= '0; first_word <= 1'b0;
      ds_valid <= 1'b0; ds_sop <= 1'b0; ds_eop <= 1'b0; ds_data <= '0; dropped <= 1'b0;
    end else begin
      pos     <= (cur_pos == BW'(CELL_BYTES_P - 1)) ? '0 : cur_pos + 1'b1;
      cap     <= cur_cap;
      rem     <= cur_rem;
      dropped <= in.soc && match;
      // high-speed path
      out <= in;
      if (cur_rem) begin
        out.vc <= 1'b0;
        out.d  <= 8'h00;
      end
      // downstream packer
      ds_valid <= 1'b0;
      ds_sop   <= 1'b0;
      ds_eop   <= 1'b0;
      if (in.soc) begin
        nbytes     <= '0;
        first_word <= match;
      end
      if (keep_byte) begin
        if (cur_nb == NW'(BPW - 1)) begin
          ds_data    <= {shreg, in.d};
          ds_valid   <= 1'b1;
          ds_sop     <= in.soc ? 1'b1 : first_word;
          ds_eop     <= (cur_pos == BW'(CELL_BYTES_P - 1));
          first_word <= 1'b0;
          nbytes     <= '0;
        end else begin
          nbytes <= cur_nb + 1'b1;
        end
        shreg <= {shreg[DS_W-17:0], in.d};
      end
    end
  end

  // Downstream words never come closer than 4 clk (the port is read at clk/4)
  assert property (@(posedge clk) disable iff (!rst_n) ds_valid |=> !ds_valid [*3]);

endmodule
