// tb_pixel_loader: three 8 x 8 frames in 4-pixel beats into a loader sized
// for 16 x 16, with the buffer's ready signal toggling.  Checks that beats
// are only taken when the buffer is ready, that every write lands on the
// right row and columns with the right pixels, and that frame_done comes
// with the last beat of each frame and at no other time.
module tb_pixel_loader;
  import dwt_pkg::*;
  localparam int N = 16, IP = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, in_valid, in_ready, buf_ready, frame_done;
  logic [3:0]       lg_n;
  logic [PIX_W-1:0] in_pix  [IP];
  logic             wr_en   [IP];
  logic [3:0]       wr_row  [IP];
  logic [3:0]       wr_col  [IP];
  logic [PIX_W-1:0] wr_data [IP];
  int checks = 0, failures = 0;
  int beat = 0, frames = 0;

  pixel_loader #(.N(N), .IN_PIX(IP)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (in_ready != buf_ready) begin failures++; $display("in_ready != buf_ready"); end
    if (in_valid && buf_ready) begin
      int r, c0;
      r = (beat % 16) / 2; c0 = (beat % 2) * IP;
      for (int p = 0; p < IP; p++) begin
        checks++;
        if (!wr_en[p] || int'(wr_row[p]) != r || int'(wr_col[p]) != c0 + p ||
            wr_data[p] != in_pix[p]) begin
          failures++;
          $display("beat %0d port %0d: en %0d (%0d,%0d) expected (%0d,%0d)", beat, p,
                   wr_en[p], wr_row[p], wr_col[p], r, c0 + p);
        end
      end
      checks++;
      if (frame_done != (beat % 16 == 15)) begin
        failures++; $display("frame_done %0d at beat %0d", frame_done, beat);
      end
      if (frame_done) frames++;
      beat++;
    end else begin
      checks++;
      if (wr_en[0] || frame_done) begin failures++; $display("write without a beat"); end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; buf_ready = 1'b0; lg_n = 4'd3;
    for (int p = 0; p < IP; p++) in_pix[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (beat < 48) begin
      @(negedge clk);
      buf_ready = ($urandom_range(0, 3) != 0);
      in_valid  = ($urandom_range(0, 4) != 0);
      for (int p = 0; p < IP; p++) in_pix[p] = PIX_W'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    checks++;
    if (frames != 3) begin failures++; $display("%0d frames completed", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
