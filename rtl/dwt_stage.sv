// dwt_stage: one stage of the three-stage 2-D DWT pipeline.
//
// A stage holds its buffer (frame_buffer, two banks), a data scanning unit
// (dsu), a computation block of NUM_PU identical filter units and the stage
// controller.  Stage 1 computes level 1 from the raw image, stage 2 level 2
// from the LL1 subband, and the last stage (MULTI = 1) all levels from 3 to
// cfg_levels, looping over them with a two-bank scratch buffer for the LL
// data it produces itself.  Every subband sample a stage computes leaves on
// out_valid/out_coef; the LL samples are also written into the next stage's
// buffer (or into the scratch buffer).
//
// Work is scheduled as items (position, subband), position-major, subband-
// minor, NUM_PU items per cycle.  With NUM_PU >= 4 a cycle covers
// G = NUM_PU/4 horizontally adjacent positions and all four subbands; with
// NUM_PU < 4 a position takes 4/NUM_PU cycles and each cycle covers NUM_PU
// subbands of it.  With the 8:2:1 unit counts of the pipeline, stage 1
// spends n*n/8 cycles on an n x n frame, stage 2 also n*n/8 and stage 3
// less than n*n/12 for all its levels together.
//
// Synchronisation between stages is per frame, through the banks:
//   * the upstream side writes a frame into bank wptr while it is not full
//     (in_ready) and then pulses in_frame_done, which marks it full;
//   * the controller starts a frame when bank rptr is full and, if the stage
//     passes LL data on, the next stage has a free bank (nx_ready); otherwise
//     it waits (stall);
//   * when the last result of the frame has been written it frees bank rptr
//     and pulses nx_frame_done to the next stage.
// Thus three frames can be in flight, one per stage.
//
// Timing: issue register -> DSU window register -> two filter-unit
// registers; results appear four cycles after a position is issued.  The
// controller waits DRAIN cycles after the last issue of a level before the
// next level (which reads the LL data just written) or the end of the frame.
// cfg_lg_n and cfg_levels must stay constant while frames are in flight.
//
// The stage/level mapping, the identical units, the DSU and the buffer
// follow the document; the item schedule, the ping-pong banks, the
// scratch buffer of the last stage and the handshake are this design's
// choices.
module dwt_stage
  import dwt_pkg::*;
#(
  parameter int unsigned N           = 16,  // side of the data entering the stage
  parameter int unsigned NUM_PU      = 1,   // filter units
  parameter int unsigned FIRST_LEVEL = 1,   // level computed from the input
  parameter bit          MULTI       = 1'b0, // last stage: levels FIRST_LEVEL..cfg_levels
  parameter bit          RAW_IN      = 1'b0, // buffer holds raw PIX_W-bit pixels
  parameter int unsigned WR          = 1,   // write ports of the input buffer
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BUF_W = RAW_IN ? PIX_W : DATA_W,
  localparam int unsigned G     = (NUM_PU >= 4) ? NUM_PU / 4 : 1,
  localparam int unsigned CPP   = (NUM_PU >= 4) ? 1 : 4 / NUM_PU
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       cfg_lg_n,    // log2 of the original image side
  input  logic [LVL_W-1:0] cfg_levels,  // decomposition levels
  // input buffer write side
  output logic             in_ready,
  input  logic             in_wr_en   [WR],
  input  logic [AW-1:0]    in_wr_row  [WR],
  input  logic [AW-1:0]    in_wr_col  [WR],
  input  logic [BUF_W-1:0] in_wr_data [WR],
  input  logic             in_frame_done,
  // LL data toward the next stage
  input  logic             nx_ready,
  output logic             nx_wr_en   [G],
  output logic [AW-2:0]    nx_wr_row  [G],
  output logic [AW-2:0]    nx_wr_col  [G],
  output logic [DATA_W-1:0] nx_wr_data [G],
  output logic             nx_frame_done,
  // subband coefficients
  output logic             out_valid [NUM_PU],
  output coef_out_t        out_coef  [NUM_PU],
  // status
  output logic             busy,
  output logic             stall,
  output logic             level_switch
);

  localparam int unsigned RD    = G * FL * FM;
  localparam int unsigned DRAIN = 3;

  typedef struct packed {
    logic [LVL_W-1:0] level;
    subband_e         sb;
    logic [AW-1:0]    row;
    logic [AW-1:0]    col;
  } meta_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  // ---------------------------------------------------------------- control
  state_e           state;
  logic [1:0]       full;
  logic             wptr, rptr;
  logic [LVL_W-1:0] level;
  logic [3:0]       lg;          // log2 of the side of the level's input
  logic             src_scr;     // reading the scratch buffer
  logic             scr_rb;      // scratch bank read at this level
  logic [AW-1:0]    prow, pcol;  // next position to issue
  logic [1:0]       phase;
  logic [1:0]       dcnt;

  logic [AW-1:0]    hlast;       // h - 1, h = output side at this level
  logic             has_next;
  logic             start, last_item, lvl_more, nx_ok;

  assign hlast    = AW'((32'd1 << (lg - 4'd1)) - 32'd1);
  assign has_next = !MULTI && (cfg_levels > LVL_W'(FIRST_LEVEL));
  assign in_ready = !full[wptr];
  // nx_ready is not trusted in the cycle of our own nx_frame_done pulse: the
  // next stage marks that bank full only at the end of this cycle.
  assign nx_ok    = nx_ready && !nx_frame_done;
  assign start    = (state == S_IDLE) && full[rptr] && (!has_next || nx_ok);
  assign stall    = (state == S_IDLE) && full[rptr] && has_next && !nx_ok;
  assign busy     = (state != S_IDLE);
  assign last_item = (prow == hlast) && (pcol == hlast - AW'(G - 1)) &&
                     (phase == 2'(CPP - 1));
  assign lvl_more = MULTI && (level < cfg_levels);
  assign level_switch = (state == S_DRAIN) && (dcnt == 0) && lvl_more;

  // issue register
  logic             iss_valid;
  logic [AW-1:0]    iss_row [G];
  logic [AW-1:0]    iss_col [G];
  logic [1:0]       iss_phase;
  logic [LVL_W-1:0] iss_level;
  logic [3:0]       iss_lg;
  logic             iss_scr;
  logic             iss_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      full          <= '0;
      wptr          <= 1'b0;
      rptr          <= 1'b0;
      level         <= LVL_W'(FIRST_LEVEL);
      lg            <= '0;
      src_scr       <= 1'b0;
      scr_rb        <= 1'b0;
      prow          <= '0;
      pcol          <= '0;
      phase         <= '0;
      dcnt          <= '0;
      iss_valid     <= 1'b0;
      nx_frame_done <= 1'b0;
    end else begin
      iss_valid     <= 1'b0;
      nx_frame_done <= 1'b0;
      if (in_frame_done) begin
        full[wptr] <= 1'b1;
        wptr       <= ~wptr;
      end
      case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          level   <= LVL_W'(FIRST_LEVEL);
          lg      <= cfg_lg_n - 4'(FIRST_LEVEL - 1);
          src_scr <= 1'b0;
          scr_rb  <= 1'b1;   // first scratch write goes to bank 0
          prow    <= '0;
          pcol    <= '0;
          phase   <= '0;
        end
        S_RUN: begin
          iss_valid <= 1'b1;
          if (last_item) begin
            state <= S_DRAIN;
            dcnt  <= 2'(DRAIN);
          end else if (phase != 2'(CPP - 1)) begin
            phase <= phase + 2'd1;
          end else begin
            phase <= '0;
            if (pcol == hlast - AW'(G - 1)) begin
              pcol <= '0;
              prow <= prow + 1'b1;
            end else begin
              pcol <= pcol + AW'(G);
            end
          end
        end
        default: begin  // S_DRAIN
          if (dcnt != 0) begin
            dcnt <= dcnt - 2'd1;
          end else if (lvl_more) begin
            state   <= S_RUN;
            level   <= level + 1'b1;
            lg      <= lg - 4'd1;
            src_scr <= 1'b1;
            scr_rb  <= ~scr_rb;
            prow    <= '0;
            pcol    <= '0;
            phase   <= '0;
          end else begin
            state         <= S_IDLE;
            full[rptr]    <= 1'b0;
            rptr          <= ~rptr;
            nx_frame_done <= has_next;
          end
        end
      endcase
    end
  end

  // issue data (no reset: qualified by iss_valid)
  always_ff @(posedge clk) begin
    if (state == S_RUN) begin
      for (int g = 0; g < int'(G); g++) begin
        iss_row[g] <= prow;
        iss_col[g] <= pcol + AW'(g);
      end
      iss_phase <= phase;
      iss_level <= level;
      iss_lg    <= lg;
      iss_scr   <= src_scr;
      iss_bank  <= scr_rb;
    end
  end

  // ---------------------------------------------------------------- buffers
  logic [AW-1:0]    rd_row  [RD];
  logic [AW-1:0]    rd_col  [RD];
  logic [BUF_W-1:0] in_rd   [RD];
  sample_t          rd_data [RD];

  frame_buffer #(.N(N), .W(BUF_W), .BANKS(2), .WR(WR), .RD(RD)) u_buf (
    .clk     (clk),
    .wr_en   (in_wr_en),
    .wr_bank (wptr),
    .wr_row  (in_wr_row),
    .wr_col  (in_wr_col),
    .wr_data (in_wr_data),
    .rd_bank (rptr),
    .rd_row  (rd_row),
    .rd_col  (rd_col),
    .rd_data (in_rd)
  );

  // ---------------------------------------------------------------- DSU
  logic             d_valid;
  subwin_t          win [G];
  logic [1:0]       d_phase;
  logic [LVL_W-1:0] d_level;
  logic [AW-1:0]    d_row [G];
  logic [AW-1:0]    d_col [G];

  dsu #(.N(N), .G(G)) u_dsu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (iss_valid),
    .in_row    (iss_row),
    .in_col    (iss_col),
    .lg_n      (iss_lg),
    .rd_row    (rd_row),
    .rd_col    (rd_col),
    .rd_data   (rd_data),
    .out_valid (d_valid),
    .win       (win)
  );

  always_ff @(posedge clk) begin
    if (iss_valid) begin
      d_phase <= iss_phase;
      d_level <= iss_level;
      d_row   <= iss_row;
      d_col   <= iss_col;
    end
  end

  // ------------------------------------------------------- computation block
  logic  u_valid [NUM_PU];
  meta_t u_meta  [NUM_PU];
  sample_t u_data [NUM_PU];

  for (genvar u = 0; u < int'(NUM_PU); u++) begin : g_pu
    localparam int unsigned GI = (NUM_PU >= 4) ? u / 4 : 0;
    subband_e sb;
    meta_t    m_in;
    assign sb = (NUM_PU >= 4) ? subband_e'(u % 4)
                              : subband_e'(2'(d_phase * 2'(NUM_PU) + 2'(u)));
    assign m_in = '{level: d_level, sb: sb, row: d_row[GI], col: d_col[GI]};

    filter_unit #(.TAG_W($bits(meta_t))) u_fu (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (d_valid),
      .in_sb     (sb),
      .in_win    (win[GI]),
      .in_tag    (m_in),
      .out_valid (u_valid[u]),
      .out_data  (u_data[u]),
      .out_tag   (u_meta[u])
    );

    assign out_valid[u] = u_valid[u];
    assign out_coef[u]  = '{level: u_meta[u].level, sb: u_meta[u].sb,
                            row: CRD_W'(u_meta[u].row), col: CRD_W'(u_meta[u].col),
                            data: u_data[u]};
  end

  // LL results: unit 4g (NUM_PU >= 4) or unit 0 in phase 0 (NUM_PU < 4).
  logic    ll_en   [G];
  logic [AW-2:0] ll_row [G];
  logic [AW-2:0] ll_col [G];
  sample_t ll_data [G];

  always_comb begin
    for (int g = 0; g < int'(G); g++) begin
      ll_en[g]   = u_valid[(NUM_PU >= 4) ? 4*g : 0] &&
                   (u_meta[(NUM_PU >= 4) ? 4*g : 0].sb == SB_LL);
      ll_row[g]  = u_meta[(NUM_PU >= 4) ? 4*g : 0].row[AW-2:0];
      ll_col[g]  = u_meta[(NUM_PU >= 4) ? 4*g : 0].col[AW-2:0];
      ll_data[g] = u_data[(NUM_PU >= 4) ? 4*g : 0];
      nx_wr_en[g]   = ll_en[g] && has_next;
      nx_wr_row[g]  = ll_row[g];
      nx_wr_col[g]  = ll_col[g];
      nx_wr_data[g] = ll_data[g];
    end
  end

  // ------------------------------------------------- last stage: scratch
  if (MULTI) begin : g_scr
    localparam int unsigned SN = (N > 2) ? N / 2 : 1;
    localparam int unsigned SW = (SN > 1) ? $clog2(SN) : 1;
    logic          s_en   [G];
    logic [SW-1:0] s_row  [G];
    logic [SW-1:0] s_col  [G];
    logic [SW-1:0] s_rrow [RD];
    logic [SW-1:0] s_rcol [RD];
    sample_t       s_rd   [RD];
    logic [DATA_W-1:0] s_wdata [G];
    logic [DATA_W-1:0] s_rdata [RD];

    always_comb begin
      for (int g = 0; g < int'(G); g++) begin
        // the level being written is the one after the level being read
        s_en[g]    = ll_en[g] && (u_meta[(NUM_PU >= 4) ? 4*g : 0].level < cfg_levels);
        s_row[g]   = SW'(ll_row[g]);
        s_col[g]   = SW'(ll_col[g]);
        s_wdata[g] = ll_data[g];
      end
      for (int p = 0; p < int'(RD); p++) begin
        s_rrow[p] = SW'(rd_row[p]);
        s_rcol[p] = SW'(rd_col[p]);
        s_rd[p]   = sample_t'(s_rdata[p]);
        rd_data[p] = iss_scr ? s_rd[p] : sample_t'(DATA_W'(in_rd[p]));
      end
    end

    // Writes of level j go to the bank not read at level j.
    frame_buffer #(.N(SN), .W(DATA_W), .BANKS(2), .WR(G), .RD(RD)) u_scr (
      .clk     (clk),
      .wr_en   (s_en),
      .wr_bank (~scr_rb),
      .wr_row  (s_row),
      .wr_col  (s_col),
      .wr_data (s_wdata),
      .rd_bank (iss_bank),
      .rd_row  (s_rrow),
      .rd_col  (s_rcol),
      .rd_data (s_rdata)
    );
  end else begin : g_noscr
    always_comb begin
      for (int p = 0; p < int'(RD); p++)
        rd_data[p] = sample_t'(DATA_W'(in_rd[p]));
    end
  end

endmodule
