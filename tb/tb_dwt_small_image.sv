// tb_dwt_small_image: the pipeline at its default size (IMG_N = 256) given
// small images at run time: three 16 x 16 frames with 3 levels, every
// coefficient checked, and the whole run held to 1,639 cycles, the time
// budget of 16.395 us at 100 MHz for a 16 x 16, 3-level transform.
module tb_dwt_small_image;
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

  pipeline_checker #(.IMG_N(256), .LG(4), .LEVELS(3), .NF(3), .REQUIRE(4'b1001),
                     .MAX_CYCLES(1639)) u_chk (
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
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
