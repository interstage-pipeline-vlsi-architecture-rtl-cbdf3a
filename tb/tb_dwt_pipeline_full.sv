// tb_dwt_pipeline_full: the pipeline at its default size (IMG_N = 256,
// 8 : 2 : 1 filter units, 8 pixels per beat) taking three 256 x 256 images
// through the full 8-level decomposition back to back.  Every coefficient
// of every level is checked against the direct evaluation of the level
// equations; the stage-1 frame interval must stay within n*n/8 + 8 cycles
// and the whole run (pipeline fill: one frame load, three stage-1 frames,
// one stage-2 frame and the stage-3 levels) within 48500 cycles.
module tb_dwt_pipeline_full;
  import dwt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, lsw, done;
  logic [3:0] lg;
  logic [LVL_W-1:0] lev;
  logic [PIX_W-1:0] pix [8];
  logic v1 [8]; coef_out_t c1 [8];
  logic v2 [2]; coef_out_t c2 [2];
  logic v3 [1]; coef_out_t c3 [1];
  logic [2:0] busy, stall;
  int checks, failures;

  dwt_pipeline u_dut (
    .clk(clk), .rst_n(rst_n), .cfg_lg_n(lg), .cfg_levels(lev),
    .in_valid(in_valid), .in_ready(in_ready), .in_pix(pix),
    .s1_valid(v1), .s1_coef(c1), .s2_valid(v2), .s2_coef(c2),
    .s3_valid(v3), .s3_coef(c3), .busy(busy), .stall(stall),
    .level_switch(lsw));

  pipeline_checker #(.IMG_N(256), .LG(8), .LEVELS(8), .NF(3), .REQUIRE(4'b1101),
                     .MAX_CYCLES(48500)) u_chk (
    .clk(clk), .rst_n(rst_n), .cfg_lg_n(lg), .cfg_levels(lev),
    .in_valid(in_valid), .in_ready(in_ready), .in_pix(pix),
    .s1_valid(v1), .s1_coef(c1), .s2_valid(v2), .s2_coef(c2),
    .s3_valid(v3), .s3_coef(c3), .busy(busy), .stall(stall),
    .level_switch(lsw), .done(done), .checks(checks), .failures(failures));

  initial begin
    wait (done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
