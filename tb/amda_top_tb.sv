// amda_top_tb: end-to-end test of two add-drop nodes in a string.
//
// Node A is the head end (155 Mb/s upstream rate): it generates the slotted stream and
// adds cells from its upstream port. Node B (622 Mb/s upstream rate) receives A's output
// over a link that delays clock and data by 2.3 ns while B's system clock runs at the same
// frequency with its own phase, so B's STARI FIFO has to retime the stream. B drops the
// cells addressed to it (address 0x21, mask 0x80, so 0xA1 multicast cells match too) and
// adds cells of its own. Both nodes are configured through their serial ports.
//
// Checked: B's downstream port delivers exactly A's cells for B, in order and intact; B's
// high-speed output carries A's other cells, the multicast cells and B's own cells, each
// source in order; slots are 53 clk apart; the OAM cells leaving B carry the right count
// and BIP-8; B's link monitor reports no errors and the FIFO neither over- nor underflows.
// Then faults are put on the link: a corrupted BIP byte, a corrupted count byte and a lost
// start-of-cell must each be counted by B, and the counters must clear.
// Each mechanism (slot and OAM generation, add, wait for grant, unicast drop, multicast
// copy, error detection, counter clear) is counted and must have happened.
module amda_top_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam real HALF = 1.6075;      // 311.04 MHz
  localparam int  N_A = 36, N_B = 16; // cells added by A and B

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // ---------------- clocks and reset ----------------
  logic a_clk = 0, b_clk = 0, rst_n = 1;
  initial #0.5 rst_n = 0;   // a falling edge, so that every asynchronous reset acts
  initial forever #HALF a_clk = ~a_clk;
  initial begin #1.1; forever #HALF b_clk = ~b_clk; end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("written A %0d B %0d, inserted A %0d B %0d, inj_req %0d", a_written, b_written, n_ins_a, n_ins_b, inj_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- node A ----------------
  logic a_tx_clk, a_tx_soc, a_tx_rs_n, a_tx_vc_n;
  logic [7:0] a_tx_d;
  logic a_up_clk, a_up_wr = 0, a_up_soc = 0, a_up_ready, a_grant = 0;
  logic [7:0] a_up_d = 0;
  logic a_ds_clk, a_ds_valid, a_ds_sop, a_ds_eop;
  logic [31:0] a_ds_data;
  logic a_sclk, a_scs_n, a_sdi, a_sdo;

  amda_top u_a (
    .clk(a_clk), .rst_n,
    .rx_clk(a_clk), .rx_soc(1'b0), .rx_rs_n(1'b1), .rx_vc_n(1'b1), .rx_d(8'h00),
    .tx_clk(a_tx_clk), .tx_soc(a_tx_soc), .tx_rs_n(a_tx_rs_n), .tx_vc_n(a_tx_vc_n), .tx_d(a_tx_d),
    .up_clk(a_up_clk), .up_wr(a_up_wr), .up_soc(a_up_soc), .up_d(a_up_d), .up_ready(a_up_ready),
    .up_grant(a_grant),
    .ds_clk(a_ds_clk), .ds_valid(a_ds_valid), .ds_sop(a_ds_sop), .ds_eop(a_ds_eop), .ds_data(a_ds_data),
    .sclk(a_sclk), .scs_n(a_scs_n), .sdi(a_sdi), .sdo(a_sdo)
  );
  spi_master a_spi (.sclk(a_sclk), .scs_n(a_scs_n), .sdi(a_sdi), .sdo(a_sdo));

  // ---------------- link A -> B, with fault injection ----------------
  logic [10:0] inj = '0;             // xor mask on {soc, rs_n, vc_n, d}
  logic [10:0] link_src, link_dst;
  logic        b_rx_clk;
  assign link_src = {a_tx_soc, a_tx_rs_n, a_tx_vc_n, a_tx_d} ^ inj;
  always @(link_src) link_dst <= #2.3 link_src;
  always @(a_tx_clk) b_rx_clk <= #2.3 a_tx_clk;

  // ---------------- node B ----------------
  logic b_tx_clk, b_tx_soc, b_tx_rs_n, b_tx_vc_n;
  logic [7:0] b_tx_d;
  logic b_up_clk, b_up_wr = 0, b_up_soc = 0, b_up_ready, b_grant = 0;
  logic [7:0] b_up_d = 0;
  logic b_ds_clk, b_ds_valid, b_ds_sop, b_ds_eop;
  logic [31:0] b_ds_data;
  logic b_sclk, b_scs_n, b_sdi, b_sdo;

  amda_top u_b (
    .clk(b_clk), .rst_n,
    .rx_clk(b_rx_clk), .rx_soc(link_dst[10]), .rx_rs_n(link_dst[9]), .rx_vc_n(link_dst[8]),
    .rx_d(link_dst[7:0]),
    .tx_clk(b_tx_clk), .tx_soc(b_tx_soc), .tx_rs_n(b_tx_rs_n), .tx_vc_n(b_tx_vc_n), .tx_d(b_tx_d),
    .up_clk(b_up_clk), .up_wr(b_up_wr), .up_soc(b_up_soc), .up_d(b_up_d), .up_ready(b_up_ready),
    .up_grant(b_grant),
    .ds_clk(b_ds_clk), .ds_valid(b_ds_valid), .ds_sop(b_ds_sop), .ds_eop(b_ds_eop), .ds_data(b_ds_data),
    .sclk(b_sclk), .scs_n(b_scs_n), .sdi(b_sdi), .sdo(b_sdo)
  );
  spi_master b_spi (.sclk(b_sclk), .scs_n(b_scs_n), .sdi(b_sdi), .sdo(b_sdo));

  // ---------------- cells ----------------
  // byte 0 address, 1-4 random, 5 source (1 = A, 2 = B), 6 sequence number, rest random
  typedef byte unsigned cell_t[CELL_BYTES];
  cell_t a_cells[N_A], b_cells[N_B];
  localparam byte unsigned ADDR_B = 8'h21, MULTI_B = 8'hA1, OTHER = 8'h33;

  function automatic bit for_b(input byte unsigned a);
    return ((a ^ ADDR_B) & 8'h7F) == 0;   // B: address 0x21 with mask 0x80
  endfunction

  initial begin
    for (int i = 0; i < N_A; i++) begin
      int k;
      k = $urandom_range(0, 9);
      for (int b = 0; b < CELL_BYTES; b++) a_cells[i][b] = 8'($urandom);
      a_cells[i][0] = (k < 4) ? ADDR_B : (k < 6) ? MULTI_B : OTHER;
      a_cells[i][5] = 1; a_cells[i][6] = 8'(i);
    end
    for (int i = 0; i < N_B; i++) begin
      for (int b = 0; b < CELL_BYTES; b++) b_cells[i][b] = 8'($urandom);
      b_cells[i][0] = OTHER; b_cells[i][5] = 2; b_cells[i][6] = 8'(i);
    end
  end

  // upstream writer of the auxiliary component: one cell whenever the buffer is free
  int a_written = 0, b_written = 0;
  task automatic up_write_a(input int i);
    @(posedge a_up_clk);
    while (!a_up_ready) @(posedge a_up_clk);
    for (int b = 0; b < CELL_BYTES; b++) begin
      #0.5 a_up_wr = 1; a_up_soc = (b == 0); a_up_d = a_cells[i][b];
      @(posedge a_up_clk);
    end
    #0.5 a_up_wr = 0; a_up_soc = 0;
    a_written++;
  endtask
  task automatic up_write_b(input int i);
    @(posedge b_up_clk);
    while (!b_up_ready) @(posedge b_up_clk);
    for (int b = 0; b < CELL_BYTES; b++) begin
      #0.5 b_up_wr = 1; b_up_soc = (b == 0); b_up_d = b_cells[i][b];
      @(posedge b_up_clk);
    end
    #0.5 b_up_wr = 0; b_up_soc = 0;
    b_written++;
  endtask

  // ---------------- mechanism counters (peeking at the blocks' own strobes) ----------------
  int n_oam_a = 0, n_ins_a = 0, n_ins_b = 0, n_uni = 0, n_multi = 0, n_wait = 0;
  always @(posedge a_clk) if (rst_n) begin
    if (u_a.u_mux.inserted) n_ins_a++;
    if (u_a.gen_beat.soc && u_a.gen_beat.rs) n_oam_a++;
    // a cell waits in the buffer at an empty slot because the grant is off
    if (u_a.src_beat.soc && !u_a.src_beat.rs && !u_a.src_beat.vc && u_a.cell_avail && !u_a.u_mux.grant_s2)
      n_wait++;
  end
  always @(posedge b_clk) if (rst_n) begin
    if (u_b.u_mux.inserted) n_ins_b++;
    if (u_b.u_demux.dropped) begin
      if (u_b.src_beat.d[7]) n_multi++; else n_uni++;
    end
  end

  // ---------------- B downstream checker ----------------
  int exp_ds[$];         // indices of A cells B must drop
  int ds_cells = 0, ds_word = 0, ds_bad = 0;
  initial for (int i = 0; i < N_A; i++) ;
  always @(posedge b_clk) if (rst_n && b_ds_valid) begin
    int c, o;
    if (exp_ds.size() == 0) begin
      ds_bad++;
    end else begin
      c = exp_ds[0];
      o = (ds_word == 0) ? 0 : 4 * ds_word + 1;
      if (b_ds_data != {a_cells[c][o], a_cells[c][o+1], a_cells[c][o+2], a_cells[c][o+3]} ||
          b_ds_sop != (ds_word == 0) || b_ds_eop != (ds_word == 12)) ds_bad++;
      if (ds_word == 12) begin
        ds_word = 0; void'(exp_ds.pop_front()); ds_cells++;
      end else ds_word++;
    end
  end

  // ---------------- B high-speed output checker ----------------
  bit   tx_check = 1;
  int   tx_pos = 0, tx_aligned = 0, tx_soc_bad = 0, tx_cell_bad = 0, tx_oam = 0, tx_oam_bad = 0;
  int   next_a = 0, next_b = 0, a_seen = 0, b_seen = 0;
  byte unsigned cur[CELL_BYTES];
  bit   cur_vc, cur_rs;
  byte unsigned f_cnt = 0, f_bip = 0, o_cnt = 0, o_bip = 0;
  int   frames = 0;

  function automatic bit a_passes(input int i);
    return !for_b(a_cells[i][0]) || a_cells[i][0][7];
  endfunction

  always @(posedge b_tx_clk) if (rst_n && tx_check) begin
    if (b_tx_soc) begin
      if (tx_aligned && tx_pos != 53) tx_soc_bad++;
      tx_aligned = 1; tx_pos = 0;
      cur_vc = !b_tx_vc_n; cur_rs = !b_tx_rs_n;
      if (cur_rs) begin
        o_cnt = f_cnt; o_bip = f_bip; f_cnt = 0; f_bip = 0;
      end else if (cur_vc) f_cnt++;
    end
    if (tx_aligned && tx_pos < CELL_BYTES) begin
      cur[tx_pos] = b_tx_d;
      if (cur_vc && !cur_rs) f_bip ^= b_tx_d;
      if (tx_pos == CELL_BYTES - 1) begin
        if (cur_rs) begin
          if (frames > 0 && (cur[OAM_CNT_BYTE] != o_cnt || cur[OAM_BIP_BYTE] != o_bip)) tx_oam_bad++;
          frames++; tx_oam++;
        end else if (cur_vc) begin
          if (cur[5] == 1) begin
            while (next_a < N_A && !a_passes(next_a)) next_a++;
            if (next_a >= N_A || cur != a_cells[next_a]) tx_cell_bad++;
            next_a++; a_seen++;
          end else if (cur[5] == 2) begin
            if (next_b >= N_B || cur != b_cells[next_b]) tx_cell_bad++;
            next_b++; b_seen++;
          end else tx_cell_bad++;
        end
      end
      tx_pos++;
    end
  end

  // ---------------- A output: slot timing ----------------
  int a_soc_last = -1, a_cyc = 0, a_soc_bad = 0, a_slots = 0;
  always @(posedge a_clk) begin
    a_cyc++;
    if (rst_n && a_tx_soc) begin
      if (a_soc_last >= 0 && a_cyc - a_soc_last != 53) a_soc_bad++;
      a_soc_last = a_cyc; a_slots++;
    end
  end

  // ---------------- fault injection on the link ----------------
  // kind 1: flip BIP byte of an OAM cell, 2: flip count byte, 3: drop one soc
  int inj_req = 0, inj_done = 0, a_pos = 0;
  bit a_rs;
  always @(posedge a_clk) begin
    #0.1;
    if (a_tx_soc) begin a_pos = 0; a_rs = !a_tx_rs_n; end else a_pos++;
    inj = '0;
    if (inj_req == 1 && a_rs && a_pos == OAM_BIP_BYTE) begin inj[0] = 1'b1; inj_req = 0; inj_done++; end
    if (inj_req == 2 && a_rs && a_pos == OAM_CNT_BYTE) begin inj[1] = 1'b1; inj_req = 0; inj_done++; end
    if (inj_req == 3 && !a_rs && a_tx_soc)             begin inj[10] = 1'b1; inj_req = 0; inj_done++; end
  end

  // ---------------- register access helpers ----------------
  task automatic a_wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] r; a_spi.xfer(1'b0, a, d, r);
  endtask
  task automatic b_wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] r; b_spi.xfer(1'b0, a, d, r);
  endtask
  task automatic b_rd(input logic [6:0] a, output logic [7:0] d);
    b_spi.xfer(1'b1, a, 8'h00, d);
  endtask

  // ---------------- MAC model: grants come and go ----------------
  bit traffic = 0;
  initial begin
    wait (traffic);
    forever begin
      repeat ($urandom_range(100, 600)) @(posedge a_clk);
      a_grant = ~a_grant;
      b_grant = 1;
    end
  end

  logic [7:0] r;
  initial begin
    repeat (40) @(posedge a_clk);   // every clock domain sees reset at a clock edge
    rst_n = 1;
    // configuration: A head end, add enabled, 155 Mb/s, OAM every 6 slots
    fork
      begin
        a_wr(REG_PERIOD, 8'd6);
        a_wr(REG_ADDR, 8'h7E);
        a_wr(REG_CTRL, 8'b0000_1011);
      end
      begin
        b_wr(REG_ADDR, ADDR_B);
        b_wr(REG_MASK, 8'h80);
        b_wr(REG_CTRL, 8'b0000_0110);
      end
    join
    // let B lock on to the stream
    repeat (20 * 53) @(posedge b_clk);
    b_rd(REG_STATUS, r);
    chk(r[2] == 1'b1, $sformatf("B in frame sync (status %h)", r));
    for (int i = 0; i < N_A; i++) if (for_b(a_cells[i][0])) exp_ds.push_back(i);
    $display("%t config done", $time);
    traffic = 1;
    fork
      for (int i = 0; i < N_A; i++) up_write_a(i);
      for (int i = 0; i < N_B; i++) up_write_b(i);
    join
    a_grant = 1;
    // drain
    repeat (30 * 53) @(posedge a_clk);
    chk(n_ins_a == N_A, $sformatf("A inserted %0d of %0d cells", n_ins_a, N_A));
    chk(n_ins_b == N_B, $sformatf("B inserted %0d of %0d cells", n_ins_b, N_B));
    chk(ds_cells == n_uni + n_multi && exp_ds.size() == 0 && ds_bad == 0,
        $sformatf("B downstream: %0d cells, %0d missing, %0d bad", ds_cells, exp_ds.size(), ds_bad));
    chk(tx_cell_bad == 0 && b_seen == N_B, $sformatf("B output: %0d bad cells, %0d of B's cells", tx_cell_bad, b_seen));
    begin
      int n_pass = 0;
      for (int i = 0; i < N_A; i++) if (a_passes(i)) n_pass++;
      chk(a_seen == n_pass, $sformatf("B output: %0d of %0d passing A cells", a_seen, n_pass));
    end
    chk(tx_soc_bad == 0 && a_soc_bad == 0, $sformatf("slot timing errors A %0d B %0d", a_soc_bad, tx_soc_bad));
    chk(tx_oam > 10 && tx_oam_bad == 0, $sformatf("B OAM cells %0d, %0d wrong", tx_oam, tx_oam_bad));
    chk(a_slots > 7 * tx_oam - 14 && a_slots < 7 * tx_oam + 30, $sformatf("OAM every 7th slot (%0d slots, %0d OAM)", a_slots, tx_oam));
    b_rd(REG_STATUS, r);  chk(r == 8'h04, $sformatf("B status %h (sync, no FIFO errors)", r));
    b_rd(REG_SLOTERR, r); chk(r == 0, "B no slot errors");
    b_rd(REG_CNTERR, r);  chk(r == 0, "B no count errors");
    b_rd(REG_PARERR, r);  chk(r == 0, "B no parity errors");
    // faults on the link
    inj_req = 1; wait (inj_req == 0);
    repeat (20 * 53) @(posedge b_clk);
    b_rd(REG_PARERR, r); chk(r == 1, $sformatf("B parity errors after a bad BIP byte: %0d", r));
    inj_req = 2; wait (inj_req == 0);
    repeat (20 * 53) @(posedge b_clk);
    b_rd(REG_CNTERR, r); chk(r == 1, $sformatf("B count errors after a bad count byte: %0d", r));
    tx_check = 0;
    inj_req = 3; wait (inj_req == 0);
    repeat (20 * 53) @(posedge b_clk);
    b_rd(REG_SLOTERR, r); chk(r >= 1, $sformatf("B slot errors after a lost soc: %0d", r));
    b_wr(REG_SLOTERR, 8'h00);
    b_rd(REG_SLOTERR, r); chk(r == 0, "B counters cleared");
    b_rd(REG_PARERR, r);  chk(r == 0, "B counters cleared");
    // every mechanism must have happened
    chk(n_oam_a > 0,  $sformatf("OAM slots generated: %0d", n_oam_a));
    chk(n_wait > 0,   $sformatf("waits for MAC grant: %0d", n_wait));
    chk(n_uni > 0,    $sformatf("unicast drops: %0d", n_uni));
    chk(n_multi > 0,  $sformatf("multicast copies: %0d", n_multi));
    chk(inj_done == 3, "link faults injected");
    $display("slots %0d, OAM %0d, added A %0d B %0d, dropped %0d, multicast %0d, grant waits %0d",
             a_slots, tx_oam, n_ins_a, n_ins_b, n_uni, n_multi, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
