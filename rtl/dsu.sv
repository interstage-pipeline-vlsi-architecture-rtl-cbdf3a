// dsu: data scanning unit of a stage.
//
// For each of G output positions (m, c) presented in a cycle, the DSU reads
// the L x M window of the stage buffer that the decimated filters need,
//   S((2m - k) mod n, (2c - i) mod n),   0 <= k < L, 0 <= i < M,
// where n = 2**lg_n is the side of the data at the current level, so that the
// mod is a bit mask (periodic extension at the borders).  It then sorts the
// window into the four L/2 x M/2 sub-windows of even/odd rows and even/odd
// columns, the four channels the filter units work on:
//   win[g][ro][co][kk][ii] = S(2m - (2kk+ro), 2c - (2ii+co)).
//
// Timing: address generation and the buffer read are combinational; the
// sorted sub-windows and out_valid are registered, one cycle after in_valid.
// The scan order itself (which positions are presented when) belongs to
// the stage controller.  The window orientation (taps reaching back to
// 2m-k, as in the level equations) follows the document; the one-cycle
// register and the read-port layout are this design's choice.
module dsu
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 16,  // buffer side (largest n)
  parameter int unsigned G  = 1,   // positions per cycle
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned RD = G * FL * FM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_row [G],   // output position m
  input  logic [AW-1:0] in_col [G],   // output position c
  input  logic [3:0]    lg_n,         // log2 of the current data side
  // buffer read ports
  output logic [AW-1:0] rd_row  [RD],
  output logic [AW-1:0] rd_col  [RD],
  input  sample_t       rd_data [RD],
  // sub-windows
  output logic          out_valid,
  output subwin_t       win [G]
);

  logic [AW-1:0] mask;
  assign mask = AW'((32'd1 << lg_n) - 32'd1);

  always_comb begin
    for (int g = 0; g < int'(G); g++) begin
      for (int k = 0; k < int'(FL); k++) begin
        for (int i = 0; i < int'(FM); i++) begin
          rd_row[(g*FL + k)*FM + i] = (AW'(in_row[g] << 1) - AW'(k)) & mask;
          rd_col[(g*FL + k)*FM + i] = (AW'(in_col[g] << 1) - AW'(i)) & mask;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int g = 0; g < int'(G); g++)
        for (int ro = 0; ro < 2; ro++)
          for (int co = 0; co < 2; co++)
            for (int kk = 0; kk < int'(HL2); kk++)
              for (int ii = 0; ii < int'(HM2); ii++)
                win[g][ro][co][kk][ii] <= rd_data[(g*FL + 2*kk + ro)*FM + 2*ii + co];
    end
  end

endmodule
