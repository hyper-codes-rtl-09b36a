// hc_demapper: starting LLRs for the four bits of a Gray-coded 16QAM symbol.
//
// For each bit the LLR is the squared distance from the received point to
// the nearest constellation point carrying a 1 in that bit, minus the squared
// distance to the nearest point carrying a 0. This is the thesis'
// approximation of the exact LLR (keep only the dominant term of each sum);
// the noise-dependent scale factor is dropped because max-log-APP decoding
// is insensitive to a common scale. No square roots or exponentials are
// needed: 16 squared distances, two minimum searches per bit and a subtract.
// The difference is shifted right by SHIFT and saturated to the LLR range;
// SHIFT and the point spacing A are this design's choices.
//
// Points sit at x, y in {-3A, -A, A, 3A} with the labels of
// hc_pkg::qam16_label; out_llr[3] belongs to label bit 3 (leftmost).
// Timing: one register stage, out_valid follows in_valid by one clock.
module hc_demapper
  import hc_pkg::*;
#(
  parameter int unsigned SW    = 8,   // sample width, signed
  parameter int          A     = 32,  // half the spacing of adjacent points
  parameter int unsigned SHIFT = 6    // right shift of the distance difference
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  output logic                 out_valid,
  output llr_t                 out_llr [4]
);

  localparam int unsigned DW = 2 * (SW + 2) + 1;  // squared-distance width
  typedef logic signed [DW:0] dist_t;

  dist_t d    [16];
  dist_t d0   [4];
  dist_t d1   [4];
  llr_t  llr  [4];

  always_comb begin
    for (int unsigned r = 0; r < 4; r++) begin
      for (int unsigned c = 0; c < 4; c++) begin
        dist_t dx, dy;
        dx = dist_t'(in_i) - dist_t'((2 * int'(c) - 3) * A);
        dy = dist_t'(in_q) - dist_t'((3 - 2 * int'(r)) * A);
        d[r*4+c] = dx * dx + dy * dy;
      end
    end
    for (int unsigned b = 0; b < 4; b++) begin
      d0[b] = '1;
      d1[b] = '1;
      d0[b][DW] = 1'b0;
      d1[b][DW] = 1'b0;
      for (int unsigned r = 0; r < 4; r++) begin
        for (int unsigned c = 0; c < 4; c++) begin
          if (qam16_label(r, c)[b]) begin
            if (d[r*4+c] < d1[b]) d1[b] = d[r*4+c];
          end else begin
            if (d[r*4+c] < d0[b]) d0[b] = d[r*4+c];
          end
        end
      end
      llr[b] = sat_shift(d1[b] - d0[b]);
    end
  end

  function automatic llr_t sat_shift(input dist_t v);
    dist_t s;
    s = v >>> SHIFT;
    if (s > dist_t'(LLR_MAX))
      return LLR_MAX;
    else if (s < -dist_t'(LLR_MAX))
      return -LLR_MAX;
    else
      return llr_t'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int b = 0; b < 4; b++) out_llr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int b = 0; b < 4; b++) out_llr[b] <= llr[b];
    end
  end

endmodule
