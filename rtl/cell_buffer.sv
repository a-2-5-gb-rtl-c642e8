// cell_buffer: one-cell buffer between the upstream (add) port and the high-speed path.
//
// The auxiliary component writes a 53-byte cell on its own slow write clock (a quarter
// or a sixteenth of the system clock); the mux reads it out at one byte per system clock.
// The paper builds this buffer as a self-timed FIFO. Here it is a 53-byte register file
// whose ownership passes between the two clock domains by a toggle handshake: when the
// writer has stored byte 52 it flips wr_tgl; the reader sees the flip (two synchronising
// flops), reads the 53 bytes, and flips rd_tgl back, which the writer sees as up_ready.
// Because only one side owns the storage at a time, the array needs no synchroniser.
//
// Interface, write side (wclk): up_ready high = buffer empty, a cell may be written;
// up_wr writes up_d at the write pointer, up_soc marks byte 0 and restarts the pointer.
// Read side (clk): cell_avail high = a whole cell is held; rd_data shows the byte at the
// read pointer (combinational); rd_en advances the pointer; after byte 52 the cell is
// released. up_ready returns about three wclk cycles after the release.
module cell_buffer
  import amda_pkg::*;
#(
  parameter int CELL_BYTES_P = CELL_BYTES
) (
  input  logic       rst_n,
  // upstream write side
  input  logic       wclk,
  input  logic       up_wr,
  input  logic       up_soc,
  input  logic [7:0] up_d,
  output logic       up_ready,
  // read side
  input  logic       clk,
  output logic       cell_avail,
  input  logic       rd_en,
  output logic [7:0] rd_data
);
  localparam int BW = $clog2(CELL_BYTES_P);

  logic [7:0]    mem [CELL_BYTES_P];
  logic [BW-1:0] wptr, rptr;
  logic          wr_tgl, rd_tgl;
  logic          rd_tgl_w1, rd_tgl_w2;
  logic          wr_tgl_r1, wr_tgl_r2;

  // write side
  logic [BW-1:0] waddr;
  assign waddr    = up_soc ? '0 : wptr;
  assign up_ready = (wr_tgl == rd_tgl_w2);

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; wr_tgl <= 1'b0; rd_tgl_w1 <= 1'b0; rd_tgl_w2 <= 1'b0;
    end else begin
      rd_tgl_w1 <= rd_tgl;
      rd_tgl_w2 <= rd_tgl_w1;
      if (up_wr && up_ready) begin
        if (waddr == BW'(CELL_BYTES_P - 1)) begin
          wptr   <= '0;
          wr_tgl <= ~wr_tgl;
        end else begin
          wptr <= waddr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (up_wr && up_ready) mem[waddr] <= up_d;
  end

  // read side
  assign cell_avail = (wr_tgl_r2 != rd_tgl);
  assign rd_data    = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0; rd_tgl <= 1'b0; wr_tgl_r1 <= 1'b0; wr_tgl_r2 <= 1'b0;
    end else begin
      wr_tgl_r1 <= wr_tgl;
      wr_tgl_r2 <= wr_tgl_r1;
      if (rd_en && cell_avail) begin
        if (rptr == BW'(CELL_BYTES_P - 1)) begin
          rptr   <= '0;
          rd_tgl <= ~rd_tgl;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

endmodule
