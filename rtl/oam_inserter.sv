// oam_inserter: Output module - writes the frame check values into the outgoing OAM cells.
//
// Mirror of oam_monitor. Over each outgoing frame (the slots between two OAM slots) it
// counts the valid cells and XORs all their bytes (BIP-8); when the OAM slot that closes
// the frame passes, those two values replace bytes OAM_CNT_BYTE and OAM_BIP_BYTE of the
// OAM cell, so that the next node's input monitor can check the link. Counting and
// insertion follow the paper; the byte positions and BIP-8 are this design's choice.
// Byte position is tracked from soc.
//
// Interface: in/out are high-speed beats; out is in delayed by one clk register.
module oam_inserter
  import amda_pkg::*;
#(
  parameter int CELL_BYTES_P = CELL_BYTES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  hs_beat_t in,
  output hs_beat_t out
);
  localparam int BW = $clog2(CELL_BYTES_P);

  logic [BW-1:0] pos;
  logic          slot_rs, slot_vc;
  logic [7:0]    acc_cnt, acc_bip, oam_cnt, oam_bip;

  logic [BW-1:0] cur_pos;
  hs_beat_t      nxt;
  always_comb begin
    cur_pos = in.soc ? '0 : pos;
    nxt     = in;
    if (!in.soc && slot_rs) begin
      if (cur_pos == BW'(OAM_CNT_BYTE)) nxt.d = oam_cnt;
      if (cur_pos == BW'(OAM_BIP_BYTE)) nxt.d = oam_bip;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; slot_rs <= 1'b0; slot_vc <= 1'b0;
      acc_cnt <= '0; acc_bip <= '0; oam_cnt <= '0; oam_bip <= '0;
      out <= '0;
    end else begin
      out <= nxt;
      pos <= (cur_pos == BW'(CELL_BYTES_P - 1)) ? '0 : cur_pos + 1'b1;
      if (in.soc) begin
        slot_rs <= in.rs;
        slot_vc <= in.vc;
        if (in.rs) begin
          oam_cnt <= acc_cnt;
          oam_bip <= acc_bip;
          acc_cnt <= '0;
          acc_bip <= '0;
        end else if (in.vc) begin
          acc_cnt <= acc_cnt + 8'd1;
          acc_bip <= acc_bip ^ in.d;
        end
      end else if (slot_vc && !slot_rs) begin
        acc_bip <= acc_bip ^ in.d;
      end
    end
  end

endmodule
