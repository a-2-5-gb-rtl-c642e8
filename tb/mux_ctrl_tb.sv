// mux_ctrl_tb: checks cell insertion into the high-speed path.
// A model of the cell buffer holds one cell at a time. Slots of random kind (OAM, valid,
// empty) stream past. The grant and enable change only in mid-slot, so the expected
// behaviour is known per slot: a held cell goes into the first empty slot that starts
// while the grant is on, with vc set for the whole slot and the cell's bytes in order;
// every other slot passes unchanged, one clk later. Insertions and waits on the grant are
// counted, and each must have happened.
module mux_ctrl_tb;
  import amda_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, grant = 0;
  hs_beat_t in, out;
  logic cell_avail, rd_en, inserted;
  logic [7:0] rd_data;

  mux_ctrl dut (.*);
  always #1.6 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cell buffer model
  byte unsigned cbuf[CELL_BYTES];
  int  rptr = 0;
  bit  avail = 0;
  assign cell_avail = avail;
  assign rd_data    = cbuf[rptr];
  always @(posedge clk) begin
    if (rd_en && avail) begin
      if (rptr == CELL_BYTES - 1) begin rptr <= 0; avail <= 0; end
      else rptr <= rptr + 1;
    end
  end

  hs_beat_t exp_q[$];
  always @(negedge clk) begin
    if (exp_q.size() > 1) begin
      hs_beat_t e;
      e = exp_q.pop_front();
      chk(out == e, $sformatf("out %h expected %h", out, e));
    end
  end

  int n_ins = 0, n_wait_grant = 0, n_busy_skip = 0;
  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int kind;
      bit take;
      byte unsigned snap[CELL_BYTES];
      // beats are driven just after a clock edge, once the buffer model has settled
      @(posedge clk);
      #0.2;
      kind = $urandom_range(0, 2);   // 0 OAM, 1 valid, 2 empty
      // new cell written whenever the buffer is free
      if (!avail && ($urandom_range(0, 1) == 1)) begin
        for (int b = 0; b < CELL_BYTES; b++) cbuf[b] = 8'($urandom);
        avail = 1;
      end
      take = (kind == 2) && avail && grant && en;
      if (kind == 2 && avail && en && !grant) n_wait_grant++;
      if (kind != 2 && avail && grant && en) n_busy_skip++;
      if (take) n_ins++;
      snap = cbuf;
      for (int b = 0; b < CELL_BYTES; b++) begin
        hs_beat_t bt, e;
        bt.soc = (b == 0); bt.rs = (kind == 0); bt.vc = (kind == 1); bt.d = 8'($urandom);
        e = bt;
        if (take) begin e.vc = 1'b1; e.d = snap[b]; end
        if (b > 0) begin @(posedge clk); #0.2; end
        in = bt;
        exp_q.push_back(e);
        if (b == 1) chk(inserted == take, "inserted pulse");
        if (b == 25) begin
          grant = ($urandom_range(0, 2) != 0);
          en    = (s > 5) && ($urandom_range(0, 9) != 0);
        end
      end
    end
    repeat (3) @(posedge clk);
    chk(n_ins > 5, $sformatf("cells inserted: %0d", n_ins));
    chk(n_wait_grant > 0, $sformatf("waits for the grant: %0d", n_wait_grant));
    chk(n_busy_skip > 0, $sformatf("occupied slots skipped: %0d", n_busy_skip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
