// tb_dwt_pipeline: end-to-end test of the three-stage DWT pipeline at a
// reduced image size (IMG_N = 16).
//   a: 16 x 16 images, full decomposition (4 levels), four frames back to
//      back: checks every coefficient, input back-pressure, the level loop
//      of stage 3 and all three stages busy on different frames.
//   b: one 16 x 16 image, 3 levels, must finish within 1639 cycles
//      (16.395 us at 100 MHz).
//   c: 8 x 8 images in the same 16 x 16 buffers with stage 2 given a single
//      filter unit, so that stage 1 has to wait for a free stage-2 bank.
module tb_dwt_pipeline;
  import dwt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  // ------------------------------------------------------------ config a
  logic a_rst_n, a_in_valid, a_in_ready, a_lsw, a_done;
  logic [3:0] a_lg;
  logic [LVL_W-1:0] a_lev;
  logic [PIX_W-1:0] a_pix [8];
  logic a_v1 [8]; coef_out_t a_c1 [8];
  logic a_v2 [2]; coef_out_t a_c2 [2];
  logic a_v3 [1]; coef_out_t a_c3 [1];
  logic [2:0] a_busy, a_stall;
  int a_checks, a_fail;

  dwt_pipeline #(.IMG_N(16)) u_a (
    .clk(clk), .rst_n(a_rst_n), .cfg_lg_n(a_lg), .cfg_levels(a_lev),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_pix(a_pix),
    .s1_valid(a_v1), .s1_coef(a_c1), .s2_valid(a_v2), .s2_coef(a_c2),
    .s3_valid(a_v3), .s3_coef(a_c3), .busy(a_busy), .stall(a_stall),
    .level_switch(a_lsw));

  pipeline_checker #(.IMG_N(16), .LG(4), .LEVELS(4), .NF(4), .REQUIRE(4'b1101),
                     .MAX_CYCLES(400)) u_ca (
    .clk(clk), .rst_n(a_rst_n), .cfg_lg_n(a_lg), .cfg_levels(a_lev),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_pix(a_pix),
    .s1_valid(a_v1), .s1_coef(a_c1), .s2_valid(a_v2), .s2_coef(a_c2),
    .s3_valid(a_v3), .s3_coef(a_c3), .busy(a_busy), .stall(a_stall),
    .level_switch(a_lsw), .done(a_done), .checks(a_checks), .failures(a_fail));

  // ------------------------------------------------------------ config b
  logic b_rst_n, b_in_valid, b_in_ready, b_lsw, b_done;
  logic [3:0] b_lg;
  logic [LVL_W-1:0] b_lev;
  logic [PIX_W-1:0] b_pix [8];
  logic b_v1 [8]; coef_out_t b_c1 [8];
  logic b_v2 [2]; coef_out_t b_c2 [2];
  logic b_v3 [1]; coef_out_t b_c3 [1];
  logic [2:0] b_busy, b_stall;
  int b_checks, b_fail;

  dwt_pipeline #(.IMG_N(16)) u_b (
    .clk(clk), .rst_n(b_rst_n), .cfg_lg_n(b_lg), .cfg_levels(b_lev),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_pix(b_pix),
    .s1_valid(b_v1), .s1_coef(b_c1), .s2_valid(b_v2), .s2_coef(b_c2),
    .s3_valid(b_v3), .s3_coef(b_c3), .busy(b_busy), .stall(b_stall),
    .level_switch(b_lsw));

  pipeline_checker #(.IMG_N(16), .LG(4), .LEVELS(3), .NF(1), .REQUIRE(4'b0000),
                     .MAX_CYCLES(1639)) u_cb (
    .clk(clk), .rst_n(b_rst_n), .cfg_lg_n(b_lg), .cfg_levels(b_lev),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_pix(b_pix),
    .s1_valid(b_v1), .s1_coef(b_c1), .s2_valid(b_v2), .s2_coef(b_c2),
    .s3_valid(b_v3), .s3_coef(b_c3), .busy(b_busy), .stall(b_stall),
    .level_switch(b_lsw), .done(b_done), .checks(b_checks), .failures(b_fail));

  // ------------------------------------------------------------ config c
  logic c_rst_n, c_in_valid, c_in_ready, c_lsw, c_done;
  logic [3:0] c_lg;
  logic [LVL_W-1:0] c_lev;
  logic [PIX_W-1:0] c_pix [8];
  logic c_v1 [8]; coef_out_t c_c1 [8];
  logic c_v2 [1]; coef_out_t c_c2 [1];
  logic c_v3 [1]; coef_out_t c_c3 [1];
  logic [2:0] c_busy, c_stall;
  int c_checks, c_fail;

  dwt_pipeline #(.IMG_N(16), .PU2(1)) u_c (
    .clk(clk), .rst_n(c_rst_n), .cfg_lg_n(c_lg), .cfg_levels(c_lev),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_pix(c_pix),
    .s1_valid(c_v1), .s1_coef(c_c1), .s2_valid(c_v2), .s2_coef(c_c2),
    .s3_valid(c_v3), .s3_coef(c_c3), .busy(c_busy), .stall(c_stall),
    .level_switch(c_lsw));

  pipeline_checker #(.IMG_N(16), .PU2(1), .LG(3), .LEVELS(3), .NF(6),
                     .REQUIRE(4'b0010), .MAX_CYCLES(400)) u_cc (
    .clk(clk), .rst_n(c_rst_n), .cfg_lg_n(c_lg), .cfg_levels(c_lev),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_pix(c_pix),
    .s1_valid(c_v1), .s1_coef(c_c1), .s2_valid(c_v2), .s2_coef(c_c2),
    .s3_valid(c_v3), .s3_coef(c_c3), .busy(c_busy), .stall(c_stall),
    .level_switch(c_lsw), .done(c_done), .checks(c_checks), .failures(c_fail));

  initial begin
    wait (a_done && b_done && c_done);
    repeat (2) @(posedge clk);
    checks   = a_checks + b_checks + c_checks;
    failures = a_fail + b_fail + c_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: a=%0d b=%0d c=%0d", a_done, b_done, c_done);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_fail + b_fail + c_fail + 1);
    $finish;
  end
endmodule
