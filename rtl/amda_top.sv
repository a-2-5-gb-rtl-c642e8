// amda_top: ATM mux/demux chip of an add-drop node for a 2.5 Gb/s slotted cell ring/string.
//
// A string of add-drop nodes shares one 2.5 Gb/s path (8 bits at 311.04 MHz). The first
// node (head end) generates a continuous flow of 53-byte cell slots with periodic OAM
// slots; each node drops the cells addressed to it onto a 32-bit downstream port and adds
// cells from its 8-bit upstream port into empty slots. Along the path, inside this chip:
//
//   rx pins -> stari_fifo (retime rx_clk -> clk) -> [oam_monitor checks the link]
//           -> source select (received stream, or slot_generator in head-end mode)
//           -> demux (drop) -> mux_ctrl (add, cell from cell_buffer) -> oam_inserter
//           -> tx pins (with tx_clk = clk)
//
// access_if holds the configuration and reads the status over a serial port; clk_div
// makes the upstream and downstream port clocks. The block list and their functions
// follow the paper; the order drop-before-add and all formats are this design's choice.
//
// Pins: RS and VC are active low as on the board, everything else active high. Latency
// from the FIFO output to tx is 3 clk (demux, mux_ctrl, oam_inserter registers).
// One asynchronous active-low reset serves all clock domains.
module amda_top
  import amda_pkg::*;
#(
  parameter int STARI_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // high-speed input
  input  logic        rx_clk,
  input  logic        rx_soc,
  input  logic        rx_rs_n,
  input  logic        rx_vc_n,
  input  logic [7:0]  rx_d,
  // high-speed output
  output logic        tx_clk,
  output logic        tx_soc,
  output logic        tx_rs_n,
  output logic        tx_vc_n,
  output logic [7:0]  tx_d,
  // upstream (add) port
  output logic        up_clk,
  input  logic        up_wr,
  input  logic        up_soc,
  input  logic [7:0]  up_d,
  output logic        up_ready,
  input  logic        up_grant,
  // downstream (drop) port
  output logic        ds_clk,
  output logic        ds_valid,
  output logic        ds_sop,
  output logic        ds_eop,
  output logic [31:0] ds_data,
  // internal access port
  input  logic        sclk,
  input  logic        scs_n,
  input  logic        sdi,
  output logic        sdo
);
  amda_cfg_t  cfg;
  amda_stat_t stat;
  logic       clr;

  // ---------------- Input module ----------------
  hs_beat_t rx_beat, fifo_beat, in_beat;
  logic     fifo_valid, ovf_w, ovf_s1, ovf_s2, unf;
  assign rx_beat = '{soc: rx_soc, rs: !rx_rs_n, vc: !rx_vc_n, d: rx_d};

  stari_fifo #(.DEPTH(STARI_DEPTH), .W(HS_W)) u_stari (
    .rst_n, .wclk(rx_clk), .wdata(rx_beat), .overflow(ovf_w),
    .rclk(clk), .rdata(fifo_beat), .rvalid(fifo_valid), .underflow(unf)
  );
  assign in_beat = fifo_valid ? fifo_beat : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_s1 <= 1'b0; ovf_s2 <= 1'b0;
    end else begin
      ovf_s1 <= ovf_w; ovf_s2 <= ovf_s1;
    end
  end

  oam_monitor u_mon (
    .clk, .rst_n, .in(in_beat), .in_valid(fifo_valid), .clr,
    .in_sync(stat.in_sync), .slot_err(stat.slot_err), .cnt_err(stat.cnt_err),
    .par_err(stat.par_err), .rx_cnt(stat.rx_cnt), .rx_bip(stat.rx_bip)
  );
  assign stat.stari_ovf = ovf_s2;
  assign stat.stari_unf = unf;

  // ---------------- slot source ----------------
  hs_beat_t gen_beat, src_beat;
  slot_generator u_gen (.clk, .rst_n, .en(cfg.head_end), .period(cfg.period), .out(gen_beat));
  assign src_beat = cfg.head_end ? gen_beat : in_beat;

  // ---------------- Demux module ----------------
  hs_beat_t dmx_beat;
  demux u_demux (
    .clk, .rst_n, .en(cfg.drop_en), .addr(cfg.addr), .mask(cfg.mask),
    .in(src_beat), .out(dmx_beat),
    .ds_valid, .ds_sop, .ds_eop, .ds_data, .dropped()
  );

  // ---------------- Mux module ----------------
  logic       cell_avail, rd_en;
  logic [7:0] rd_data;
  hs_beat_t   mux_beat;
  cell_buffer u_buf (
    .rst_n, .wclk(up_clk), .up_wr, .up_soc, .up_d, .up_ready,
    .clk, .cell_avail, .rd_en, .rd_data
  );
  mux_ctrl u_mux (
    .clk, .rst_n, .en(cfg.add_en), .grant(up_grant), .in(dmx_beat), .out(mux_beat),
    .cell_avail, .rd_en, .rd_data, .inserted()
  );

  // ---------------- Output module ----------------
  hs_beat_t tx_beat;
  oam_inserter u_out (.clk, .rst_n, .in(mux_beat), .out(tx_beat));
  assign tx_clk  = clk;
  assign tx_soc  = tx_beat.soc;
  assign tx_rs_n = !tx_beat.rs;
  assign tx_vc_n = !tx_beat.vc;
  assign tx_d    = tx_beat.d;

  // ---------------- Internal Access module, clocks ----------------
  access_if u_acc (.clk, .rst_n, .sclk, .scs_n, .sdi, .sdo, .cfg, .stat, .clr);
  clk_div   u_div (.clk, .rst_n, .rate155(cfg.rate155), .up_clk, .ds_clk);

endmodule
