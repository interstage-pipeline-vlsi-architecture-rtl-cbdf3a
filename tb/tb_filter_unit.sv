// tb_filter_unit: streams random sub-windows and subband selections into a
// filter unit, one per cycle with random gaps, and checks each result, and
// its two-cycle latency, against a direct L x M evaluation with the 4-tap
// integer filter pair {31, 54, 14, -8}, rounding and a 13-bit shift.
module tb_filter_unit;
  import dwt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst_n, in_valid, out_valid;
  subband_e in_sb;
  subwin_t  in_win;
  logic [15:0] in_tag, out_tag;
  sample_t  out_data;
  int checks = 0, failures = 0;
  int exp_q [$];
  int tag_q [$];
  int cyc = 0, sent_cyc [$];

  filter_unit #(.TAG_W(16)) dut (.*);

  function automatic int tap(bit hi, int k);
    int h [4] = '{31, 54, 14, -8};
    if (!hi) return h[k];
    return ((k % 2) == 0 ? 1 : -1) * h[3 - k];
  endfunction

  function automatic int expect_of(subband_e sb, subwin_t w);
    longint acc = 0, r;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 4; i++)
        acc += longint'(tap(sb[0], k) * tap(sb[1], i)) * longint'(w[k % 2][i % 2][k / 2][i / 2]);
    r = (acc + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      int e, t, s;
      e = exp_q.pop_front(); t = tag_q.pop_front(); s = sent_cyc.pop_front();
      if (int'(out_data) != e || int'(out_tag) != t || cyc - s != 2) begin
        failures++;
        $display("got %0d tag %0d after %0d cycles, expected %0d tag %0d after 2",
                 out_data, out_tag, cyc - s, e, t);
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sb = SB_LL; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sb    = subband_e'($urandom_range(0, 3));
      in_tag   = 16'(t);
      for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++)
        for (int k = 0; k < 2; k++) for (int i = 0; i < 2; i++)
          in_win[a][b][k][i] = (t < 20) ? sample_t'(t < 10 ? 32767 : -32768)
                                        : sample_t'($urandom_range(0, 600)) - 16'sd300;
      if (in_valid) begin
        exp_q.push_back(expect_of(in_sb, in_win));
        tag_q.push_back(t);
        sent_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
