// tb_frame_buffer: random writes through two write ports into both banks of
// an 8 x 8 buffer, checked through four asynchronous read ports against a
// model array.
module tb_frame_buffer;
  localparam int N = 8, W = 16, WR = 2, RD = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         wr_en   [WR];
  logic         wr_bank;
  logic [2:0]   wr_row  [WR];
  logic [2:0]   wr_col  [WR];
  logic [W-1:0] wr_data [WR];
  logic         rd_bank;
  logic [2:0]   rd_row  [RD];
  logic [2:0]   rd_col  [RD];
  logic [W-1:0] rd_data [RD];
  int model [2][N][N];
  int checks = 0, failures = 0;

  frame_buffer #(.N(N), .W(W), .BANKS(2), .WR(WR), .RD(RD)) dut (.*);

  task automatic check_reads();
    for (int p = 0; p < RD; p++) begin
      rd_row[p] = 3'($urandom_range(0, N - 1));
      rd_col[p] = 3'($urandom_range(0, N - 1));
    end
    rd_bank = 1'($urandom_range(0, 1));
    #1;
    for (int p = 0; p < RD; p++) begin
      checks++;
      if (int'(rd_data[p]) != model[rd_bank][rd_row[p]][rd_col[p]]) begin
        failures++;
        $display("bank %0d (%0d,%0d): got %h expected %h", rd_bank, rd_row[p], rd_col[p],
                 rd_data[p], model[rd_bank][rd_row[p]][rd_col[p]]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < WR; p++) wr_en[p] = 1'b0;
    // fill everything once
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c += 2) begin
          @(negedge clk);
          wr_bank = 1'(b);
          for (int p = 0; p < WR; p++) begin
            wr_en[p] = 1'b1; wr_row[p] = 3'(r); wr_col[p] = 3'(c + p);
            wr_data[p] = W'($urandom);
            model[b][r][c + p] = int'(wr_data[p]);
          end
        end
    @(negedge clk);
    for (int p = 0; p < WR; p++) wr_en[p] = 1'b0;
    // random updates interleaved with reads
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      check_reads();
      wr_bank = 1'($urandom_range(0, 1));
      for (int p = 0; p < WR; p++) begin
        wr_en[p]   = 1'($urandom_range(0, 1));
        wr_row[p]  = 3'($urandom_range(0, N - 1));
        wr_col[p]  = 3'(p * 4 + $urandom_range(0, 3));  // ports never collide
        wr_data[p] = W'($urandom);
      end
      @(posedge clk);
      for (int p = 0; p < WR; p++)
        if (wr_en[p]) model[wr_bank][wr_row[p]][wr_col[p]] = int'(wr_data[p]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
