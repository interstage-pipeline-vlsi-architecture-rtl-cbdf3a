// tb_dwt_stage: two stand-alone stages.
//   A: a last stage (MULTI) with one filter unit, fed an 8 x 8 LL2 frame of
//      a 32 x 32 image, must compute levels 3, 4 and 5 by itself, looping
//      through its scratch buffer; two frames back to back.
//   B: a first stage with four units on raw 8 x 8 pixels whose successor
//      is held not-ready at first: the stage must stall, then compute level
//      1, pass exactly the LL samples to the next stage and pulse
//      nx_frame_done once per frame.
// All coefficients are checked against a direct evaluation of the level
// equations with periodic extension.
module tb_dwt_stage;
  import dwt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  function automatic int tap(bit hi, int k);
    int h [4] = '{31, 54, 14, -8};
    if (!hi) return h[k];
    return ((k % 2) == 0 ? 1 : -1) * h[3 - k];
  endfunction

  // expected[level][sb][m][c], levels computed from an n x n input
  int exp_a [2][6][4][4][4];
  int exp_b [2][4][4][4];
  bit seen_a [2][6][4][4][4];
  int img_a [2][8][8];
  int img_b [2][8][8];

  task automatic levels(input int in [8][8], input int n0, input int first, input int last,
                        output int e [6][4][4][4]);
    int cur [8][8];
    int n;
    cur = in; n = n0;
    for (int l = first; l <= last; l++) begin
      int nxt [8][8];
      for (int sb = 0; sb < 4; sb++)
        for (int m = 0; m < n / 2; m++)
          for (int c = 0; c < n / 2; c++) begin
            longint acc = 0, r;
            for (int k = 0; k < 4; k++)
              for (int i = 0; i < 4; i++)
                acc += longint'(tap(sb[0], k) * tap(sb[1], i)) *
                       longint'(cur[(2 * m - k + 4 * n) % n][(2 * c - i + 4 * n) % n]);
            r = (acc + 4096) >>> 13;
            if (r > 32767) r = 32767;
            if (r < -32768) r = -32768;
            e[l][sb][m][c] = int'(r);
            if (sb == 0) nxt[m][c] = int'(r);
          end
      cur = nxt; n = n / 2;
    end
  endtask

  // ------------------------------------------------------------------ A
  logic        a_in_ready, a_wen [1], a_done, a_nx_en [1], a_nx_done;
  logic [2:0]  a_wrow [1], a_wcol [1];
  logic [15:0] a_wdata [1];
  logic [1:0]  a_nx_row [1], a_nx_col [1];
  logic [15:0] a_nx_data [1];
  logic        a_ov [1];
  coef_out_t   a_co [1];
  logic        a_busy, a_stall, a_lsw;
  int          a_frame = 0, a_got = 0, a_lsw_cnt = 0;

  dwt_stage #(.N(8), .NUM_PU(1), .FIRST_LEVEL(3), .MULTI(1'b1), .RAW_IN(1'b0), .WR(1)) u_a (
    .clk(clk), .rst_n(rst_n), .cfg_lg_n(4'd5), .cfg_levels(LVL_W'(5)),
    .in_ready(a_in_ready), .in_wr_en(a_wen), .in_wr_row(a_wrow), .in_wr_col(a_wcol),
    .in_wr_data(a_wdata), .in_frame_done(a_done),
    .nx_ready(1'b1), .nx_wr_en(a_nx_en), .nx_wr_row(a_nx_row), .nx_wr_col(a_nx_col),
    .nx_wr_data(a_nx_data), .nx_frame_done(a_nx_done),
    .out_valid(a_ov), .out_coef(a_co), .busy(a_busy), .stall(a_stall), .level_switch(a_lsw));

  always @(posedge clk) if (rst_n) begin
    if (a_lsw) a_lsw_cnt++;
    if (a_nx_en[0] || a_nx_done) begin failures++; $display("A: last stage wrote downstream"); end
    if (a_ov[0]) begin
      coef_out_t co;
      co = a_co[0];
      checks++;
      if (co.level < 3 || co.level > 5 || seen_a[a_frame][co.level][co.sb][co.row][co.col] ||
          int'(co.data) != exp_a[a_frame][co.level][co.sb][co.row][co.col]) begin
        failures++;
        $display("A frame %0d lvl %0d sb %0d (%0d,%0d): got %0d expected %0d", a_frame,
                 co.level, co.sb, co.row, co.col, co.data,
                 exp_a[a_frame][co.level][co.sb][co.row][co.col]);
      end
      seen_a[a_frame][co.level][co.sb][co.row][co.col] = 1'b1;
      a_got++;
      if (a_got == 4 * (16 + 4 + 1)) begin a_got = 0; a_frame++; end
    end
  end

  // ------------------------------------------------------------------ B
  logic        b_in_ready, b_wen [2], b_done, b_nx_en [1], b_nx_done, b_nx_ready;
  logic [2:0]  b_wrow [2], b_wcol [2];
  logic [7:0]  b_wdata [2];
  logic [1:0]  b_nx_row [1], b_nx_col [1];
  logic [15:0] b_nx_data [1];
  logic        b_ov [4];
  coef_out_t   b_co [4];
  logic        b_busy, b_stall, b_lsw;
  int          b_frame = 0, b_got = 0, b_ll = 0, b_stall_cnt = 0, b_done_cnt = 0;

  dwt_stage #(.N(8), .NUM_PU(4), .FIRST_LEVEL(1), .MULTI(1'b0), .RAW_IN(1'b1), .WR(2)) u_b (
    .clk(clk), .rst_n(rst_n), .cfg_lg_n(4'd3), .cfg_levels(LVL_W'(2)),
    .in_ready(b_in_ready), .in_wr_en(b_wen), .in_wr_row(b_wrow), .in_wr_col(b_wcol),
    .in_wr_data(b_wdata), .in_frame_done(b_done),
    .nx_ready(b_nx_ready), .nx_wr_en(b_nx_en), .nx_wr_row(b_nx_row), .nx_wr_col(b_nx_col),
    .nx_wr_data(b_nx_data), .nx_frame_done(b_nx_done),
    .out_valid(b_ov), .out_coef(b_co), .busy(b_busy), .stall(b_stall), .level_switch(b_lsw));

  always @(posedge clk) if (rst_n) begin
    if (b_stall) b_stall_cnt++;
    if (b_nx_done) b_done_cnt++;
    if (b_busy && !b_nx_ready && b_got == 0 && !b_ov[0]) begin
      failures++; $display("B: started without a free successor bank");
    end
    if (b_nx_en[0]) begin
      checks++;
      if (int'($signed(b_nx_data[0])) != exp_b[b_frame][0][b_nx_row[0]][b_nx_col[0]]) begin
        failures++; $display("B: wrong LL sample passed on");
      end
      b_ll++;
    end
    for (int u = 0; u < 4; u++) if (b_ov[u]) begin
      coef_out_t co;
      co = b_co[u];
      checks++;
      if (co.level != 1 || int'(co.sb) != u ||
          int'(co.data) != exp_b[b_frame][co.sb][co.row][co.col]) begin
        failures++;
        $display("B frame %0d sb %0d (%0d,%0d): got %0d expected %0d", b_frame, co.sb,
                 co.row, co.col, co.data, exp_b[b_frame][co.sb][co.row][co.col]);
      end
      b_got++;
    end
    if (b_got == 64) begin b_got = 0; b_frame++; end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int ea [6][4][4][4];
    int eb [6][4][4][4];
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
        img_a[f][r][c] = int'($urandom_range(0, 400)) - 100;
        img_b[f][r][c] = int'($urandom_range(0, 255));
      end
      levels(img_a[f], 8, 3, 5, ea);
      levels(img_b[f], 8, 1, 1, eb);
      for (int l = 0; l < 6; l++) for (int s = 0; s < 4; s++)
        for (int m = 0; m < 4; m++) for (int c = 0; c < 4; c++) begin
          exp_a[f][l][s][m][c] = ea[l][s][m][c];
          seen_a[f][l][s][m][c] = 1'b0;
          if (l == 1) exp_b[f][s][m][c] = eb[l][s][m][c];
        end
    end
    rst_n = 1'b0; a_wen[0] = 1'b0; a_done = 1'b0; b_wen[0] = 1'b0; b_wen[1] = 1'b0;
    b_done = 1'b0; b_nx_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      while (!a_in_ready || !b_in_ready) @(negedge clk);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c += 2) begin
        for (int p = 0; p < 2; p++) begin
          b_wen[p] = 1'b1; b_wrow[p] = 3'(r); b_wcol[p] = 3'(c + p);
          b_wdata[p] = 8'(img_b[f][r][c + p]);
        end
        for (int p = 0; p < 2; p++) begin
          a_wen[0] = 1'b1; a_wrow[0] = 3'(r); a_wcol[0] = 3'(c + p);
          a_wdata[0] = 16'(img_a[f][r][c + p]);
          a_done = (r == 7 && c + p == 7);
          b_done = a_done;
          @(negedge clk);
          b_wen[0] = 1'b0; b_wen[1] = 1'b0; b_done = 1'b0;
        end
      end
      a_wen[0] = 1'b0; a_done = 1'b0;
    end
  end

  initial begin
    // successor not ready for a while, then ready
    wait (rst_n);
    repeat (150) @(negedge clk);
    b_nx_ready = 1'b1;
    wait (a_frame == 2 && b_frame == 2);
    repeat (3) @(negedge clk);
    checks += 5;
    if (b_stall_cnt == 0) begin failures++; $display("B never stalled"); end
    if (b_ll != 32) begin failures++; $display("B passed on %0d LL samples", b_ll); end
    if (b_done_cnt != 2) begin failures++; $display("B: %0d frame-done pulses", b_done_cnt); end
    if (a_lsw_cnt != 4) begin failures++; $display("A: %0d level switches", a_lsw_cnt); end
    if (a_busy || b_busy) begin failures++; $display("stage still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog: A frames %0d B frames %0d", a_frame, b_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
