// pipeline_checker: stimulus and scoreboard for dwt_pipeline.
//
// Generates NF random n x n images (n = 2**LG), streams them into the
// pipeline in raster order (with occasional idle beats in the first frame),
// and checks every coefficient the three stages emit against a reference
// model that evaluates the level equations directly:
//   Y_P(m,c) = sum_k sum_i H_P(k,i) * S((2m-k) mod n, (2c-i) mod n)
// with its own copy of the 4-tap integer filter pair, rounding and
// saturation.  Each coefficient must arrive exactly once, from the stage
// that owns its level (1, 2, or 3 for levels 3..LEVELS).
//
// It also counts how often each pipeline mechanism occurred: input back-
// pressure, a stage stalled on a full successor, a level switch in the last
// stage, and three stages busy at once (inter-stage parallelism); a
// mechanism listed in REQUIRE that never happened counts as a failure.  It
// checks that the whole run fits the cycle budget MAX_CYCLES.
module pipeline_checker
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_N      = 16,
  parameter int unsigned PU1        = 8,
  parameter int unsigned PU2        = 2,
  parameter int unsigned PU3        = 1,
  parameter int unsigned IN_PIX     = 8,
  parameter int unsigned LG         = 4,
  parameter int unsigned LEVELS     = 4,
  parameter int unsigned NF         = 3,
  parameter bit [3:0]    REQUIRE    = 4'b1101, // {overlap, level switch, stall, backpressure}
  parameter int unsigned MAX_CYCLES = 100000
) (
  input  logic             clk,
  output logic             rst_n,
  output logic [3:0]       cfg_lg_n,
  output logic [LVL_W-1:0] cfg_levels,
  output logic             in_valid,
  input  logic             in_ready,
  output logic [PIX_W-1:0] in_pix [IN_PIX],
  input  logic             s1_valid [PU1],
  input  coef_out_t        s1_coef  [PU1],
  input  logic             s2_valid [PU2],
  input  coef_out_t        s2_coef  [PU2],
  input  logic             s3_valid [PU3],
  input  coef_out_t        s3_coef  [PU3],
  input  logic [2:0]       busy,
  input  logic [2:0]       stall,
  input  logic             level_switch,
  output logic             done,
  output int               checks,
  output int               failures
);

  localparam int unsigned NN = 1 << LG;

  int img [NF][NN][NN];
  int exp_aa [longint];
  bit seen_aa [longint];
  int per_stage [3];            // coefficients expected per frame per stage
  int got [3];                  // received in the current frame
  int fidx [3];                 // frame each stage is on
  int cnt_bp, cnt_stall, cnt_lsw, cnt_ovl;
  longint cyc, t_first, t_last;
  int stage_done_cyc [3][NF];

  function automatic longint key(int f, int lvl, int sb, int r, int c);
    return ((((longint'(f) * 16 + lvl) * 4 + sb) * 4096 + r) * 4096) + c;
  endfunction

  function automatic int tap(bit hi, int k);
    int h [4] = '{31, 54, 14, -8};
    if (!hi) return h[k];
    return ((k % 2) == 0 ? 1 : -1) * h[3 - k];
  endfunction

  function automatic int rnd(longint acc);
    longint r;
    r = (acc + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // Reference model: all levels of frame f.
  task automatic build_reference(int f);
    int cur [][];
    int nxt [][];
    int n;
    n = NN;
    cur = new[n];
    for (int r = 0; r < n; r++) begin
      cur[r] = new[n];
      for (int c = 0; c < n; c++) cur[r][c] = img[f][r][c];
    end
    for (int lvl = 1; lvl <= int'(LEVELS); lvl++) begin
      int h;
      h = n / 2;
      nxt = new[h];
      for (int r = 0; r < h; r++) nxt[r] = new[h];
      for (int sb = 0; sb < 4; sb++) begin
        for (int m = 0; m < h; m++) begin
          for (int c = 0; c < h; c++) begin
            longint acc;
            int v;
            acc = 0;
            for (int k = 0; k < 4; k++)
              for (int i = 0; i < 4; i++)
                acc += longint'(tap(sb[0], k) * tap(sb[1], i)) *
                       longint'(cur[(2*m - k + n) % n][(2*c - i + n) % n]);
            // sb: 0 LL, 1 HL (rows high), 2 LH (cols high), 3 HH
            v = rnd(acc);
            exp_aa[key(f, lvl, sb, m, c)] = v;
            if (sb == 0) nxt[m][c] = v;
          end
        end
      end
      cur = nxt;
      n = h;
    end
  endtask

  task automatic take(int s, coef_out_t co);
    longint kk;
    kk = key(fidx[s], int'(co.level), int'(co.sb), int'(co.row), int'(co.col));
    checks++;
    if (!exp_aa.exists(kk)) begin
      failures++;
      $display("stage %0d frame %0d: unexpected coefficient lvl %0d sb %0d (%0d,%0d)",
               s + 1, fidx[s], co.level, co.sb, co.row, co.col);
    end else if (seen_aa.exists(kk)) begin
      failures++;
      $display("stage %0d: duplicate coefficient lvl %0d sb %0d (%0d,%0d)",
               s + 1, co.level, co.sb, co.row, co.col);
    end else begin
      seen_aa[kk] = 1'b1;
      if (int'(co.data) != exp_aa[kk]) begin
        failures++;
        if (failures < 20)
          $display("stage %0d frame %0d lvl %0d sb %0d (%0d,%0d): got %0d expected %0d",
                   s + 1, fidx[s], co.level, co.sb, co.row, co.col, co.data, exp_aa[kk]);
      end
    end
    // level ownership
    if (!((s == 0 && co.level == 1) || (s == 1 && co.level == 2) ||
          (s == 2 && co.level >= 3))) begin
      failures++;
      $display("stage %0d emitted level %0d", s + 1, co.level);
    end
    got[s]++;
    t_last = cyc;
    if (got[s] == per_stage[s]) begin
      stage_done_cyc[s][fidx[s]] = int'(cyc);
      got[s] = 0;
      fidx[s]++;
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    cnt_bp = 0; cnt_stall = 0; cnt_lsw = 0; cnt_ovl = 0;
    cyc = 0; t_first = -1; t_last = 0;
    for (int s = 0; s < 3; s++) begin got[s] = 0; fidx[s] = 0; end
    per_stage[0] = NN * NN;
    per_stage[1] = (LEVELS >= 2) ? NN * NN / 4 : 0;
    per_stage[2] = 0;
    for (int l = 3; l <= int'(LEVELS); l++) per_stage[2] += 4 * (NN >> l) * (NN >> l);
    for (int f = 0; f < int'(NF); f++)
      for (int r = 0; r < int'(NN); r++)
        for (int c = 0; c < int'(NN); c++)
          img[f][r][c] = (f == 0 && r < 2) ? 255 : int'($urandom_range(0, 255));
    for (int f = 0; f < int'(NF); f++) build_reference(f);
  end

  // stimulus
  initial begin
    rst_n      = 1'b0;
    cfg_lg_n   = 4'(LG);
    cfg_levels = LVL_W'(LEVELS);
    in_valid   = 1'b0;
    for (int p = 0; p < int'(IN_PIX); p++) in_pix[p] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < int'(NF); f++) begin
      for (int r = 0; r < int'(NN); r++) begin
        for (int c = 0; c < int'(NN); c += int'(IN_PIX)) begin
          // a few idle beats in the first frame
          if (f == 0 && ($urandom_range(0, 7) == 0)) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
          in_valid <= 1'b1;
          for (int p = 0; p < int'(IN_PIX); p++) in_pix[p] <= PIX_W'(img[f][r][c + p]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
      end
    end
    in_valid <= 1'b0;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && t_first < 0) t_first = cyc;
      if (in_valid && !in_ready) cnt_bp++;
      if (stall != 3'b000) cnt_stall++;
      if (level_switch) cnt_lsw++;
      if (busy == 3'b111) cnt_ovl++;
      for (int u = 0; u < int'(PU1); u++) if (s1_valid[u]) take(0, s1_coef[u]);
      for (int u = 0; u < int'(PU2); u++) if (s2_valid[u]) take(1, s2_coef[u]);
      for (int u = 0; u < int'(PU3); u++) if (s3_valid[u]) take(2, s3_coef[u]);
      if (!done && fidx[0] == int'(NF) && (LEVELS < 2 || fidx[1] == int'(NF)) &&
          (LEVELS < 3 || fidx[2] == int'(NF))) begin
        done <= 1'b1;
        // every expected coefficient seen exactly once
        checks++;
        if (seen_aa.num() != exp_aa.num()) begin
          failures++;
          $display("received %0d of %0d coefficients", seen_aa.num(), exp_aa.num());
        end
        checks++;
        if (t_last - t_first > longint'(MAX_CYCLES)) begin
          failures++;
          $display("run took %0d cycles, budget %0d", t_last - t_first, MAX_CYCLES);
        end
        // steady-state frame interval of stage 1: n*n/8 cycles plus control overhead
        if (NF >= 3 && PU2 * 4 >= PU1) begin
          checks++;
          if (stage_done_cyc[0][2] - stage_done_cyc[0][1] > int'(NN * NN / PU1 + 8)) begin
            failures++;
            $display("stage 1 frame interval %0d cycles",
                     stage_done_cyc[0][2] - stage_done_cyc[0][1]);
          end
        end
        $display("pipeline n=%0d levels=%0d frames=%0d: %0d cycles first pixel to last coefficient",
                 NN, LEVELS, NF, t_last - t_first + 1);
        $display("mechanisms: backpressure=%0d stall=%0d level_switch=%0d three_busy=%0d",
                 cnt_bp, cnt_stall, cnt_lsw, cnt_ovl);
        checks += 4;
        if (REQUIRE[0] && cnt_bp == 0)    begin failures++; $display("no input backpressure"); end
        if (REQUIRE[1] && cnt_stall == 0) begin failures++; $display("no stage stall"); end
        if (REQUIRE[2] && cnt_lsw == 0)   begin failures++; $display("no level switch"); end
        if (REQUIRE[3] && cnt_ovl == 0)   begin failures++; $display("never three stages busy"); end
      end
    end
  end

endmodule
