// hc_ext_expand: rebuilds the scaled extrinsic value of one element of a
// parity equation from the equation's compressed extrinsic record.
//
// The magnitude is min2 for the element that holds the minimum and min for
// every other element; it is scaled by 0.625, realised as (m>>1)+(m>>3) as
// the thesis suggests for hardware. The sign is the element's stored sign,
// inverted when the equation's parity was odd. Scaling is applied to the
// magnitude before the sign, so positive and negative values round alike;
// that detail is this design's choice. Purely combinational.
module hc_ext_expand
  import hc_pkg::*;
#(
  parameter int unsigned MAXLEN = HC_PLANES,
  localparam int unsigned KW    = $clog2(MAXLEN + 1)
) (
  input  mag_t              min1,
  input  mag_t              min2,
  input  logic [KW-1:0]     loc,
  input  logic              parity,
  input  logic [MAXLEN-1:0] signs,
  input  logic [KW-1:0]     k,
  output llr_t              ext
);

  mag_t m, sm;
  logic neg;

  always_comb begin
    m   = (k == loc) ? min2 : min1;
    sm  = scale_5_8(m);
    neg = signs[k] ^ parity;
    ext = neg ? -llr_t'({1'b0, sm}) : llr_t'({1'b0, sm});
  end

endmodule
