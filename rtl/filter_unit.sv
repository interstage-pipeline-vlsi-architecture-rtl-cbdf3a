// filter_unit: one processing unit of a stage's computation block.
//
// It computes one sample of one subband per cycle from the four sub-windows
// the DSU supplies:
//   Y_P(m,c) = sum_{ro,co in {0,1}} sum_{kk<L/2} sum_{ii<M/2}
//              H_P(2kk+ro, 2ii+co) * win[ro][co][kk][ii]
// i.e. the L x M filter is split into four independent (L/2 x M/2)-tap
// channels (ee, eo, oe, oo), each with its own coefficient sub-matrix, whose
// results are added.  All units of the pipeline are identical; stages
// differ only in how many they hold.  The subband P is chosen per cycle by
// in_sb, which selects the coefficient set from dwt_pkg.
//
// Timing: two register stages.  Cycle 1 forms the four channel sums, cycle 2
// adds them, rounds, shifts right by COEF_FRAC and saturates to DATA_W.
// out_valid follows in_valid two cycles later; in_tag travels alongside.
// The four-channel split follows the document; the two-stage pipelining,
// the rounding and saturation are this design's choices.
module filter_unit
  import dwt_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  subband_e         in_sb,
  input  subwin_t          in_win,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output sample_t          out_data,
  output logic [TAG_W-1:0] out_tag
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t             ch_sum [2][2];
  acc_t             ch_next [2][2];
  logic             v1;
  logic [TAG_W-1:0] tag1;

  // Channel sums: four (L/2 x M/2)-tap filters.
  always_comb begin
    for (int ro = 0; ro < 2; ro++) begin
      for (int co = 0; co < 2; co++) begin
        ch_next[ro][co] = '0;
        for (int kk = 0; kk < int'(HL2); kk++) begin
          for (int ii = 0; ii < int'(HM2); ii++) begin
            ch_next[ro][co] += acc_t'(in_win[ro][co][kk][ii]) *
                               acc_t'(coef(in_sb, 2*kk + ro, 2*ii + co));
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    ch_sum   <= ch_next;
    tag1     <= in_tag;
    out_data <= scale_sat(ch_sum[0][0] + ch_sum[0][1] + ch_sum[1][0] + ch_sum[1][1]);
    out_tag  <= tag1;
  end

endmodule
