// demux_tb: checks the drop function and the 32-bit downstream port.
// Random slots (OAM, valid, empty) stream past; valid cells get a random first header
// byte, biased towards the programmed address. For several address/mask settings the
// testbench predicts which cells match: those must appear on the downstream port as 13
// words (header bytes 0-3, then payload bytes 5-52, first byte in bits 31:24) with sop on
// the first and eop on the last, never closer than 4 clk apart. Matching unicast cells
// must leave an empty slot behind, multicast ones (bit 7 set) stay valid, all else passes
// unchanged. Unicast drops, multicast copies and masked matches are counted.
module demux_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] addr = 0, mask = 0;
  hs_beat_t in, out;
  logic ds_valid, ds_sop, ds_eop, dropped;
  logic [31:0] ds_data;

  demux dut (.*);
  always #1.6 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hs_beat_t exp_q[$];
  typedef struct packed { logic sop; logic eop; logic [31:0] w; } word_t;
  word_t wq[$];
  always @(negedge clk) begin
    if (exp_q.size() > 1) begin
      hs_beat_t e;
      e = exp_q.pop_front();
      chk(out == e, $sformatf("out %h expected %h", out, e));
    end
  end

  int last_w = -100, cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (ds_valid) begin
      word_t e;
      if (wq.size() == 0) chk(0, "unexpected downstream word");
      else begin
        e = wq.pop_front();
        chk(ds_data == e.w && ds_sop == e.sop && ds_eop == e.eop,
            $sformatf("word %h sop %b eop %b, expected %h %b %b", ds_data, ds_sop, ds_eop, e.w, e.sop, e.eop));
      end
      chk(cyc - last_w >= 4, $sformatf("words %0d clk apart", cyc - last_w));
      last_w = cyc;
    end
  end

  int n_uni = 0, n_multi = 0, n_masked = 0, n_pass = 0;

  task automatic run(input int nslots);
    for (int s = 0; s < nslots; s++) begin
      int kind;
      bit match;
      byte unsigned cb[CELL_BYTES];
      @(posedge clk);
      #0.2;
      kind = $urandom_range(0, 2);
      for (int b = 0; b < CELL_BYTES; b++) cb[b] = 8'($urandom);
      if ($urandom_range(0, 1)) cb[0] = (addr & ~mask) | (8'($urandom) & mask);
      if ($urandom_range(0, 3) == 0) cb[0][7] = 1'b1;
      match = en && (kind == 1) && (((cb[0] ^ addr) & ~mask) == 0);
      if (match) begin
        if (cb[0][7]) n_multi++; else n_uni++;
        if (cb[0] != addr) n_masked++;
        for (int w = 0; w < 13; w++) begin
          word_t x;
          int o;
          o = (w == 0) ? 0 : 4 * w + 1;
          x.w = {cb[o], cb[o+1], cb[o+2], cb[o+3]};
          x.sop = (w == 0); x.eop = (w == 12);
          wq.push_back(x);
        end
      end else if (kind == 1) n_pass++;
      for (int b = 0; b < CELL_BYTES; b++) begin
        hs_beat_t bt, e;
        bt.soc = (b == 0); bt.rs = (kind == 0); bt.vc = (kind == 1); bt.d = cb[b];
        e = bt;
        if (match && !cb[0][7]) begin e.vc = 1'b0; e.d = 8'h00; end
        if (b > 0) begin @(posedge clk); #0.2; end
        in = bt;
        exp_q.push_back(e);
      end
    end
  endtask

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 0; addr = 8'h12; mask = 8'h00;
    run(20);
    en = 1;
    run(100);
    addr = 8'h35; mask = 8'h0F;
    run(100);
    addr = 8'hC0; mask = 8'h03;
    run(100);
    // back-to-back matching cells at full rate
    addr = 8'h00; mask = 8'hFF;
    run(30);
    repeat (4) @(posedge clk);
    chk(wq.size() == 0, $sformatf("%0d downstream words missing", wq.size()));
    chk(n_uni > 0 && n_multi > 0 && n_masked > 0 && n_pass > 0,
        $sformatf("unicast %0d multicast %0d masked %0d passed %0d", n_uni, n_multi, n_masked, n_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
