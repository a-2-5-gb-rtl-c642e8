// access_if: Internal Access module - slow serial port to the control and status registers.
//
// An external controller (a PC, through a level converter) sets up the chip - mode, drop
// address and mask, OAM period - and reads back the transmission check results. The paper
// gives only the purpose and a rate of about 2 MHz. The protocol is this design's choice,
// SPI-like: while scs_n is low the controller sends 16 bits MSB first on sdi, sampled on
// the rising edge of sclk: bit 15 = 1 for read / 0 for write, bits 14:8 the register
// address, bits 7:0 the write data. In a read, the chip drives the register value on sdo,
// MSB first, changing on the falling edges of sclk from the 8th on, so the controller
// samples it on rising edges 9 to 16. A write takes effect after the 16th rising edge.
// The three pins are oversampled by the system clock through two-flop synchronisers,
// which works for sclk well below a quarter of the system clock.
//
// Register map (see amda_pkg): 0 CTRL, 1 ADDR, 2 MASK, 3 OAM period (read/write);
// 4 STATUS {5'b0, in_sync, stari underflow, stari overflow}, 5-7 error counters (slot,
// count, parity; writing any of them clears all three), 8/9 last received count/BIP-8.
// Unmapped addresses read 0. cfg is registered; clr is a one-clk pulse.
module access_if
  import amda_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       scs_n,
  input  logic       sdi,
  output logic       sdo,
  output amda_cfg_t  cfg,
  input  amda_stat_t stat,
  output logic       clr
);
  logic [2:0] sclk_s;
  logic [1:0] cs_s;
  logic [1:0] sdi_s;
  logic [4:0] bitcnt;
  logic [14:0] shin;
  logic [7:0]  shout;

  logic sclk_rise, sclk_fall, active;
  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sclk_fall = !sclk_s[1] && sclk_s[2];
  assign active    = !cs_s[1];

  logic [15:0] frame;
  assign frame = {shin, sdi_s[1]};

  function automatic logic [7:0] rd_reg(input logic [6:0] a, input amda_cfg_t c,
                                        input amda_stat_t s);
    case (a)
      REG_CTRL:    return {4'b0, c.rate155, c.drop_en, c.add_en, c.head_end};
      REG_ADDR:    return c.addr;
      REG_MASK:    return c.mask;
      REG_PERIOD:  return c.period;
      REG_STATUS:  return {5'b0, s.in_sync, s.stari_unf, s.stari_ovf};
      REG_SLOTERR: return s.slot_err;
      REG_CNTERR:  return s.cnt_err;
      REG_PARERR:  return s.par_err;
      REG_RXCNT:   return s.rx_cnt;
      REG_RXBIP:   return s.rx_bip;
      default:     return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; sdi_s <= '0;
      bitcnt <= '0; shin <= '0; shout <= '0; sdo <= 1'b0; clr <= 1'b0;
      cfg <= '{head_end: 1'b0, add_en: 1'b0, drop_en: 1'b0, rate155: 1'b0,
               addr: 8'h00, mask: 8'h00, period: 8'd1};
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], scs_n};
      sdi_s  <= {sdi_s[0], sdi};
      clr    <= 1'b0;
      if (!active) begin
        bitcnt <= '0;
      end else begin
        if (sclk_rise && bitcnt < 5'd16) begin
          shin   <= frame[14:0];
          bitcnt <= bitcnt + 5'd1;
          if (bitcnt == 5'd7 && frame[7]) shout <= rd_reg(frame[6:0], cfg, stat);
          if (bitcnt == 5'd15 && !frame[15]) begin
            case (frame[14:8])
              REG_CTRL: begin
                cfg.head_end <= frame[CTRL_HEAD_END];
                cfg.add_en   <= frame[CTRL_ADD_EN];
                cfg.drop_en  <= frame[CTRL_DROP_EN];
                cfg.rate155  <= frame[CTRL_RATE155];
              end
              REG_ADDR:   cfg.addr   <= frame[7:0];
              REG_MASK:   cfg.mask   <= frame[7:0];
              REG_PERIOD: cfg.period <= frame[7:0];
              REG_SLOTERR, REG_CNTERR, REG_PARERR: clr <= 1'b1;
              default: ;
            endcase
          end
        end
        if (sclk_fall && bitcnt >= 5'd8 && bitcnt < 5'd16) begin
          sdo   <= shout[7];
          shout <= {shout[6:0], 1'b0};
        end
      end
    end
  end

endmodule
