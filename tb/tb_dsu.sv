// tb_dsu: a model 16 x 16 buffer answers the DSU's read ports; random
// position pairs and level sizes (n = 2..16) are presented and every sorted
// sub-window element is checked one cycle later against
//   S((2m - (2kk+ro)) mod n, (2c - (2ii+co)) mod n).
module tb_dsu;
  import dwt_pkg::*;
  localparam int N = 16, G = 2, RD = G * 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, in_valid, out_valid;
  logic [3:0] in_row [G];
  logic [3:0] in_col [G];
  logic [3:0] lg_n;
  logic [3:0] rd_row [RD];
  logic [3:0] rd_col [RD];
  sample_t    rd_data [RD];
  subwin_t    win [G];
  int mem [N][N];
  int checks = 0, failures = 0;

  dsu #(.N(N), .G(G)) dut (.*);

  always_comb for (int p = 0; p < RD; p++) rd_data[p] = sample_t'(mem[rd_row[p]][rd_col[p]]);

  initial begin
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) mem[r][c] = r * 100 + c;
    rst_n = 1'b0; in_valid = 1'b0; lg_n = 4'd4;
    for (int g = 0; g < G; g++) begin in_row[g] = '0; in_col[g] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int n, m [G], c [G];
      @(negedge clk);
      lg_n = 4'($urandom_range(1, 4));
      n = 1 << lg_n;
      in_valid = 1'b1;
      for (int g = 0; g < G; g++) begin
        m[g] = $urandom_range(0, n / 2 - 1);
        c[g] = $urandom_range(0, n / 2 - 1);
        in_row[g] = 4'(m[g]); in_col[g] = 4'(c[g]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      for (int g = 0; g < G; g++)
        for (int ro = 0; ro < 2; ro++) for (int co = 0; co < 2; co++)
          for (int kk = 0; kk < 2; kk++) for (int ii = 0; ii < 2; ii++) begin
            int er, ec;
            er = ((2 * m[g] - (2 * kk + ro)) % n + n) % n;
            ec = ((2 * c[g] - (2 * ii + co)) % n + n) % n;
            checks++;
            if (int'(win[g][ro][co][kk][ii]) != mem[er][ec]) begin
              failures++;
              if (failures < 10)
                $display("n=%0d pos (%0d,%0d) [%0d][%0d][%0d][%0d]: got %0d expected %0d",
                         n, m[g], c[g], ro, co, kk, ii, win[g][ro][co][kk][ii], mem[er][ec]);
            end
          end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
