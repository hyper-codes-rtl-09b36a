// hc_psk8_demapper: starting LLRs for the three bits of a Gray-coded 8PSK
// symbol.
//
// The same rule as the 16QAM demapper, applied to the eight points of
// hc_psk8_mapper: for each bit, the squared distance to the nearest point
// carrying a 1 minus the squared distance to the nearest point carrying a 0.
// This keeps only the dominant term of each sum of the exact LLR and drops
// the common noise scale, which max-log-APP decoding does not need. The
// difference is shifted right by SHIFT and saturated to the LLR range.
//
// Interface: in_i/in_q is the received point; out_llr[2] belongs to label
// bit 2, the first channel bit of the symbol. Timing: one register stage,
// out_valid follows in_valid by one clock. Point positions, SHIFT and the
// Gray sequence are this design's choices.
module hc_psk8_demapper
  import hc_pkg::*;
#(
  parameter int unsigned SW    = 8,   // sample width, signed
  parameter int          R     = 64,  // circle radius
  parameter int unsigned SHIFT = 6    // right shift of the distance difference
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_i,
  input  logic signed [SW-1:0] in_q,
  output logic                 out_valid,
  output llr_t                 out_llr [3]
);

  localparam int unsigned DW = 2 * (SW + 2) + 1;  // squared-distance width
  typedef logic signed [DW:0] dist_t;

  dist_t d    [8];
  dist_t d0   [3];
  dist_t d1   [3];
  llr_t  llr  [3];

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

  always_comb begin
    for (int unsigned m = 0; m < 8; m++) begin
      dist_t dx, dy;
      dx = dist_t'(in_i) - dist_t'(psk8_x(m, R));
      dy = dist_t'(in_q) - dist_t'(psk8_y(m, R));
      d[m] = dx * dx + dy * dy;
    end
    for (int unsigned b = 0; b < 3; b++) begin
      d0[b] = '1;
      d1[b] = '1;
      d0[b][DW] = 1'b0;
      d1[b][DW] = 1'b0;
      for (int unsigned m = 0; m < 8; m++) begin
        if (psk8_label(m)[b]) begin
          if (d[m] < d1[b]) d1[b] = d[m];
        end else begin
          if (d[m] < d0[b]) d0[b] = d[m];
        end
      end
      llr[b] = sat_shift(d1[b] - d0[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int b = 0; b < 3; b++) out_llr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int b = 0; b < 3; b++) out_llr[b] <= llr[b];
    end
  end

endmodule
