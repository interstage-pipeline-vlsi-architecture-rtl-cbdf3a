// pixel_loader: raster input of the raw image into the stage-1 buffer.
//
// The image arrives in raster order, IN_PIX horizontally adjacent pixels per
// beat, with a valid/ready handshake.  The loader keeps the row and column
// of the next beat and turns each accepted beat into IN_PIX buffer writes
// into the bank the stage-1 controller has free.  After the last beat of an
// n x n frame (n = 2**lg_n) it pulses frame_done together with that beat's
// writes, which hands the bank to stage 1.  in_ready is simply the stage's
// "a bank is free" signal, so a frame is only ever written into a free bank.
//
// Timing: combinational from beat to write; counters update on the clock.
// The beat width, the raster order and the handshake are this design's
// choices; n must be a multiple of IN_PIX.
module pixel_loader
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 16,  // largest image side
  parameter int unsigned IN_PIX = 8,   // pixels per beat
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       lg_n,
  // pixel stream
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix [IN_PIX],
  // stage-1 buffer write side
  input  logic             buf_ready,
  output logic             wr_en   [IN_PIX],
  output logic [AW-1:0]    wr_row  [IN_PIX],
  output logic [AW-1:0]    wr_col  [IN_PIX],
  output logic [PIX_W-1:0] wr_data [IN_PIX],
  output logic             frame_done
);

  logic [AW-1:0] row, col, last;
  logic          accept;

  assign last     = AW'((32'd1 << lg_n) - 32'd1);
  assign in_ready = buf_ready;
  assign accept   = in_valid && buf_ready;

  always_comb begin
    for (int p = 0; p < int'(IN_PIX); p++) begin
      wr_en[p]   = accept;
      wr_row[p]  = row;
      wr_col[p]  = col + AW'(p);
      wr_data[p] = in_pix[p];
    end
  end

  assign frame_done = accept && (row == last) && (col == last - AW'(IN_PIX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (accept) begin
      if (col == last - AW'(IN_PIX - 1)) begin
        col <= '0;
        row <= (row == last) ? '0 : row + 1'b1;
      end else begin
        col <= col + AW'(IN_PIX);
      end
    end
  end

endmodule
