// frame_buffer: the buffer of one pipeline stage.  It holds the data a stage
// scans: the raw image (stage 1) or the LL subband of the previous level
// (later stages).
//
// The buffer has BANKS banks of N x N words so that the upstream side can
// fill one bank with the next frame while the stage scans the other (ping-
// pong); which bank is which is decided by the stage controller, the buffer
// itself is plain storage.  There are WR write ports and RD read ports.
// Writes happen on the rising clock edge; reads are asynchronous (the data
// scanning unit registers what it reads).  Two write ports hitting the same
// word in one cycle is not allowed; the higher-numbered port wins.
//
// That a stage keeps a full frame (rather than a few lines) follows from
// the periodic extension at the borders: the first output row needs the
// last input rows.  Bank count, port counts and the asynchronous read are
// this design's choices.  The array has no reset; a word is only read after
// it has been written.
module frame_buffer #(
  parameter int unsigned N     = 16,   // side of the largest frame held
  parameter int unsigned W     = 16,   // word width
  parameter int unsigned BANKS = 2,
  parameter int unsigned WR    = 1,    // write ports
  parameter int unsigned RD    = 16,   // read ports
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  // write side
  input  logic          wr_en   [WR],
  input  logic [BW-1:0] wr_bank,
  input  logic [AW-1:0] wr_row  [WR],
  input  logic [AW-1:0] wr_col  [WR],
  input  logic [W-1:0]  wr_data [WR],
  // read side
  input  logic [BW-1:0] rd_bank,
  input  logic [AW-1:0] rd_row  [RD],
  input  logic [AW-1:0] rd_col  [RD],
  output logic [W-1:0]  rd_data [RD]
);

  logic [W-1:0] mem [BANKS][N][N];

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(WR); p++) begin
      if (wr_en[p]) mem[wr_bank][wr_row[p]][wr_col[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < int'(RD); p++) begin
      rd_data[p] = mem[rd_bank][rd_row[p]][rd_col[p]];
    end
  end

endmodule
