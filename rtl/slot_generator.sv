// slot_generator: head-end source of the slotted cell stream.
//
// The first add-drop node of a string generates a continuous flow of 53-byte cell slots
// that every following node passes on, filling or emptying slots. Every slot is empty
// (VC low, zero data) except that one OAM slot (RS high) is sent, then PERIOD empty slots,
// then the next OAM slot, and so on. The OAM period is programmable from 1 to 255 slots
// as in the paper; a value of 0 is treated as 1 (this design's choice). The first slot
// after enable is an OAM slot; the OAM contents are filled in later by oam_inserter.
//
// Interface: en starts (1) or stops and rewinds (0) the generator; period is sampled at
// each OAM slot. out is registered: a new byte every clk, soc every 53 cycles.
module slot_generator
  import amda_pkg::*;
#(
  parameter int CELL_BYTES_P = CELL_BYTES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic [7:0] period,
  output hs_beat_t out
);
  localparam int BW = $clog2(CELL_BYTES_P);

  logic [BW-1:0] byte_cnt;
  logic [7:0]    slot_cnt;   // empty slots still to send before the next OAM slot
  logic          oam_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_cnt <= '0;
      slot_cnt <= '0;
      oam_slot <= 1'b0;
      out      <= '0;
    end else if (!en) begin
      byte_cnt <= '0;
      slot_cnt <= '0;
      oam_slot <= 1'b0;
      out      <= '0;
    end else begin
      if (byte_cnt == '0) begin
        // start of a slot: decide its kind
        if (slot_cnt == '0) begin
          oam_slot <= 1'b1;
          slot_cnt <= (period == 8'd0) ? 8'd1 : period;
          out      <= '{soc: 1'b1, rs: 1'b1, vc: 1'b0, d: 8'h00};
        end else begin
          oam_slot <= 1'b0;
          slot_cnt <= slot_cnt - 8'd1;
          out      <= '{soc: 1'b1, rs: 1'b0, vc: 1'b0, d: 8'h00};
        end
      end else begin
        out <= '{soc: 1'b0, rs: oam_slot, vc: 1'b0, d: 8'h00};
      end
      byte_cnt <= (byte_cnt == BW'(CELL_BYTES_P - 1)) ? '0 : byte_cnt + 1'b1;
    end
  end

endmodule
