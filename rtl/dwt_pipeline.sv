// dwt_pipeline: three-stage pipeline for the multi-level 2-D discrete
// wavelet transform of an n x n image (n = 2**cfg_lg_n <= IMG_N).
//
// Stage 1 computes decomposition level 1, stage 2 level 2 and stage 3 all the
// remaining levels 3..cfg_levels.  The amount of work halves-or-better from
// stage to stage (a quarter from stage 1 to 2, less than half from stage 2 to
// 3), so the stages hold PU1 : PU2 : PU3 = 8 : 2 : 1 identical filter units
// and spend about the same number of cycles per frame (n*n/8 for stages 1
// and 2, less than n*n/12 for stage 3; see dwt_stage).  Each stage owns a two-bank buffer; a stage passes its LL
// subband into the next stage's buffer and all stages work at once on three
// successive frames.
//
//   pixels --> pixel_loader --> [stage 1: buf, DSU, 8 units] --LL1-->
//              [stage 2: buf, DSU, 2 units] --LL2--> [stage 3: buf, DSU,
//              1 unit, scratch; levels 3..J]
//
// Interface:
//   cfg_lg_n, cfg_levels  image side (log2, 2..log2 IMG_N) and number of
//                         levels (1..cfg_lg_n); hold them while frames are in
//                         flight.
//   in_valid/in_ready/in_pix  raster-order pixels, IN_PIX per beat.
//   sK_valid[u]/sK_coef[u]    one subband coefficient (level, subband,
//                         row, col, value) per filter unit u of stage K.
//   busy, stall, level_switch  per-stage status (stall: a stage has a frame
//                         but the next stage's buffer is not free).
//
// The three-stage mapping and the unit ratio follow the document; the widths,
// handshakes, beat width and the double buffering are this design's choices.
module dwt_pipeline
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_N  = 256,  // largest image side
  parameter int unsigned PU1    = 8,    // filter units, stage 1
  parameter int unsigned PU2    = 2,    // filter units, stage 2
  parameter int unsigned PU3    = 1,    // filter units, stage 3
  parameter int unsigned IN_PIX = 8,    // pixels per input beat
  localparam int unsigned N1 = IMG_N,
  localparam int unsigned N2 = IMG_N / 2,
  localparam int unsigned N3 = IMG_N / 4,
  localparam int unsigned A1 = $clog2(N1),
  localparam int unsigned A2 = $clog2(N2),
  localparam int unsigned A3 = $clog2(N3),
  localparam int unsigned G1 = (PU1 >= 4) ? PU1 / 4 : 1,
  localparam int unsigned G2 = (PU2 >= 4) ? PU2 / 4 : 1,
  localparam int unsigned G3 = (PU3 >= 4) ? PU3 / 4 : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       cfg_lg_n,
  input  logic [LVL_W-1:0] cfg_levels,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix [IN_PIX],
  output logic             s1_valid [PU1],
  output coef_out_t        s1_coef  [PU1],
  output logic             s2_valid [PU2],
  output coef_out_t        s2_coef  [PU2],
  output logic             s3_valid [PU3],
  output coef_out_t        s3_coef  [PU3],
  output logic [2:0]       busy,
  output logic [2:0]       stall,
  output logic             level_switch
);

  // loader -> stage 1
  logic             b1_ready, b1_done;
  logic             b1_en   [IN_PIX];
  logic [A1-1:0]    b1_row  [IN_PIX];
  logic [A1-1:0]    b1_col  [IN_PIX];
  logic [PIX_W-1:0] b1_data [IN_PIX];

  pixel_loader #(.N(N1), .IN_PIX(IN_PIX)) u_load (
    .clk        (clk),
    .rst_n      (rst_n),
    .lg_n       (cfg_lg_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_pix     (in_pix),
    .buf_ready  (b1_ready),
    .wr_en      (b1_en),
    .wr_row     (b1_row),
    .wr_col     (b1_col),
    .wr_data    (b1_data),
    .frame_done (b1_done)
  );

  // stage 1 -> stage 2
  logic          b2_ready, b2_done;
  logic          b2_en   [G1];
  logic [A2-1:0] b2_row  [G1];
  logic [A2-1:0] b2_col  [G1];
  logic [DATA_W-1:0] b2_data [G1];

  // stage 2 -> stage 3
  logic          b3_ready, b3_done;
  logic          b3_en   [G2];
  logic [A3-1:0] b3_row  [G2];
  logic [A3-1:0] b3_col  [G2];
  logic [DATA_W-1:0] b3_data [G2];

  // stage 3 has no successor
  logic          x_en   [G3];
  logic [A3-2:0] x_row  [G3];
  logic [A3-2:0] x_col  [G3];
  logic [DATA_W-1:0] x_data [G3];
  logic          x_done;
  logic [2:0]    lsw;

  dwt_stage #(.N(N1), .NUM_PU(PU1), .FIRST_LEVEL(1), .MULTI(1'b0),
              .RAW_IN(1'b1), .WR(IN_PIX)) u_s1 (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_lg_n      (cfg_lg_n),
    .cfg_levels    (cfg_levels),
    .in_ready      (b1_ready),
    .in_wr_en      (b1_en),
    .in_wr_row     (b1_row),
    .in_wr_col     (b1_col),
    .in_wr_data    (b1_data),
    .in_frame_done (b1_done),
    .nx_ready      (b2_ready),
    .nx_wr_en      (b2_en),
    .nx_wr_row     (b2_row),
    .nx_wr_col     (b2_col),
    .nx_wr_data    (b2_data),
    .nx_frame_done (b2_done),
    .out_valid     (s1_valid),
    .out_coef      (s1_coef),
    .busy          (busy[0]),
    .stall         (stall[0]),
    .level_switch  (lsw[0])
  );

  dwt_stage #(.N(N2), .NUM_PU(PU2), .FIRST_LEVEL(2), .MULTI(1'b0),
              .RAW_IN(1'b0), .WR(G1)) u_s2 (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_lg_n      (cfg_lg_n),
    .cfg_levels    (cfg_levels),
    .in_ready      (b2_ready),
    .in_wr_en      (b2_en),
    .in_wr_row     (b2_row),
    .in_wr_col     (b2_col),
    .in_wr_data    (b2_data),
    .in_frame_done (b2_done),
    .nx_ready      (b3_ready),
    .nx_wr_en      (b3_en),
    .nx_wr_row     (b3_row),
    .nx_wr_col     (b3_col),
    .nx_wr_data    (b3_data),
    .nx_frame_done (b3_done),
    .out_valid     (s2_valid),
    .out_coef      (s2_coef),
    .busy          (busy[1]),
    .stall         (stall[1]),
    .level_switch  (lsw[1])
  );

  dwt_stage #(.N(N3), .NUM_PU(PU3), .FIRST_LEVEL(3), .MULTI(1'b1),
              .RAW_IN(1'b0), .WR(G2)) u_s3 (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_lg_n      (cfg_lg_n),
    .cfg_levels    (cfg_levels),
    .in_ready      (b3_ready),
    .in_wr_en      (b3_en),
    .in_wr_row     (b3_row),
    .in_wr_col     (b3_col),
    .in_wr_data    (b3_data),
    .in_frame_done (b3_done),
    .nx_ready      (1'b1),
    .nx_wr_en      (x_en),
    .nx_wr_row     (x_row),
    .nx_wr_col     (x_col),
    .nx_wr_data    (x_data),
    .nx_frame_done (x_done),
    .out_valid     (s3_valid),
    .out_coef      (s3_coef),
    .busy          (busy[2]),
    .stall         (stall[2]),
    .level_switch  (lsw[2])
  );

  assign level_switch = lsw[2];

endmodule
