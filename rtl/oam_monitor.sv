// oam_monitor: transmission check at the input of the chip (Input module OAM).
//
// Two checks, as the paper describes them:
//  * slot check - start-of-cell must come every 53 bytes. A missing or early soc counts a
//    slot error; the monitor then re-aligns to the soc it sees and drops frame sync.
//  * frame check - the stream is cut into frames by OAM slots (rs). Over each frame the
//    monitor counts valid cells (vc at soc) and XORs all their bytes (BIP-8). The OAM slot
//    that closes the frame carries the sender's count and BIP-8 (bytes OAM_CNT_BYTE and
//    OAM_BIP_BYTE, see amda_pkg); a mismatch counts a count error or a parity error.
// The frame format and byte positions are this design's choice; the paper only says that
// OAM cells carry the number of cells and the parity over the frame. The first OAM slot
// after reset or after a slot error only opens a frame and is not checked (in_sync low).
//
// Interface: in is the retimed high-speed beat, sampled when in_valid. Counters are 8-bit,
// saturating, cleared by clr. rx_cnt/rx_bip hold the last values received in an OAM cell.
// Everything is registered; a counter moves one clk after the byte that caused it.
module oam_monitor
  import amda_pkg::*;
#(
  parameter int CELL_BYTES_P = CELL_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  hs_beat_t   in,
  input  logic       in_valid,
  input  logic       clr,
  output logic       in_sync,
  output logic [7:0] slot_err,
  output logic [7:0] cnt_err,
  output logic [7:0] par_err,
  output logic [7:0] rx_cnt,
  output logic [7:0] rx_bip
);
  localparam int BW = $clog2(CELL_BYTES_P);

  logic [BW-1:0] pos;        // byte position of the current beat within its slot
  logic          aligned;    // a soc has been seen
  logic          slot_rs, slot_vc;
  logic [7:0]    acc_cnt, acc_bip;   // running frame values
  logic [7:0]    exp_cnt, exp_bip;   // values of the frame closed by the current OAM slot
  logic          exp_ok;             // the closed frame was a whole frame

  logic [BW-1:0] cur_pos;
  logic          soc_err;
  always_comb begin
    cur_pos = in.soc ? '0 : pos;
    soc_err = aligned && (in.soc != (pos == '0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; aligned <= 1'b0; slot_rs <= 1'b0; slot_vc <= 1'b0;
      acc_cnt <= '0; acc_bip <= '0; exp_cnt <= '0; exp_bip <= '0; exp_ok <= 1'b0;
      in_sync <= 1'b0; slot_err <= '0; cnt_err <= '0; par_err <= '0;
      rx_cnt <= '0; rx_bip <= '0;
    end else begin
      if (clr) begin
        slot_err <= '0; cnt_err <= '0; par_err <= '0;
      end
      if (in_valid && (aligned || in.soc)) begin
        aligned <= 1'b1;
        pos <= (cur_pos == BW'(CELL_BYTES_P - 1)) ? '0 : cur_pos + 1'b1;
        if (soc_err) begin
          if (!clr) slot_err <= sat_inc(slot_err);
          in_sync <= 1'b0;
        end
        if (in.soc) begin
          slot_rs <= in.rs;
          slot_vc <= in.vc;
          if (in.rs) begin
            // OAM slot closes the frame
            exp_cnt <= acc_cnt;
            exp_bip <= acc_bip;
            exp_ok  <= in_sync && !soc_err;
            in_sync <= !soc_err;
            acc_cnt <= '0;
            acc_bip <= '0;
          end else if (in.vc) begin
            acc_cnt <= acc_cnt + 8'd1;
            acc_bip <= acc_bip ^ in.d;
          end
        end else if (slot_vc && !slot_rs) begin
          acc_bip <= acc_bip ^ in.d;
        end
        if (!in.soc && slot_rs) begin
          if (cur_pos == BW'(OAM_CNT_BYTE)) begin
            rx_cnt <= in.d;
            if (exp_ok && in.d != exp_cnt && !clr) cnt_err <= sat_inc(cnt_err);
          end
          if (cur_pos == BW'(OAM_BIP_BYTE)) begin
            rx_bip <= in.d;
            if (exp_ok && in.d != exp_bip && !clr) par_err <= sat_inc(par_err);
          end
        end
      end
    end
  end

endmodule
