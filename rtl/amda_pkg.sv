// amda_pkg: types and constants shared by the ATM mux/demux (add-drop) blocks.
//
// The high-speed path carries one byte per system clock cycle together with three
// slot flags. A cell slot is 53 byte-cycles (53 x 3.215 ns = 170 ns at 311.04 MHz).
// Inside the chip all flags are active high; at the pins RS and VC are active low.
//   soc : first byte of a cell slot
//   rs  : reserved slot, i.e. an OAM cell (held for the whole slot)
//   vc  : valid cell, i.e. an ATM cell occupies the slot (held for the whole slot)
//   d   : data byte
// The frame check (this design's choice of format): an OAM slot closes a frame; it
// carries in byte OAM_CNT_BYTE the number of valid cells since the previous OAM slot and
// in byte OAM_BIP_BYTE the bytewise XOR (BIP-8) of all bytes of those cells.
package amda_pkg;

  localparam int CELL_BYTES   = 53;
  localparam int OAM_CNT_BYTE = 5;
  localparam int OAM_BIP_BYTE = 6;
  localparam int HEC_BYTE     = 4;

  typedef struct packed {
    logic       soc;
    logic       rs;
    logic       vc;
    logic [7:0] d;
  } hs_beat_t;

  localparam int HS_W = $bits(hs_beat_t);

  // Register map of the internal access port
  typedef enum logic [6:0] {
    REG_CTRL    = 7'h00,
    REG_ADDR    = 7'h01,
    REG_MASK    = 7'h02,
    REG_PERIOD  = 7'h03,
    REG_STATUS  = 7'h04,
    REG_SLOTERR = 7'h05,
    REG_CNTERR  = 7'h06,
    REG_PARERR  = 7'h07,
    REG_RXCNT   = 7'h08,
    REG_RXBIP   = 7'h09
  } reg_addr_e;

  // CTRL register bits
  localparam int CTRL_HEAD_END = 0;
  localparam int CTRL_ADD_EN   = 1;
  localparam int CTRL_DROP_EN  = 2;
  localparam int CTRL_RATE155  = 3;

  typedef struct packed {
    logic       head_end;
    logic       add_en;
    logic       drop_en;
    logic       rate155;
    logic [7:0] addr;
    logic [7:0] mask;
    logic [7:0] period;
  } amda_cfg_t;

  typedef struct packed {
    logic       stari_ovf;
    logic       stari_unf;
    logic       in_sync;
    logic [7:0] slot_err;
    logic [7:0] cnt_err;
    logic [7:0] par_err;
    logic [7:0] rx_cnt;
    logic [7:0] rx_bip;
  } amda_stat_t;

  function automatic logic [7:0] sat_inc(input logic [7:0] v);
    return (v == 8'hFF) ? v : v + 8'd1;
  endfunction

endpackage
