// hc_siso: max-log-APP soft-in/soft-out core for one even-parity equation,
// producing the equation's extrinsic information in compressed form.
//
// The elements of one equation arrive one per clock (`in_valid`, element
// index `in_k`, `in_first` on element 0). For each element the core keeps the
// running parity of the signs, the smallest magnitude and its position, the
// second smallest magnitude and a sign word with one bit per element. These
// five fields are the compressed extrinsic record described in the thesis:
// the extrinsic value of element k has magnitude min2 when k is the position
// of the minimum and min otherwise, and its sign is the element's own sign,
// inverted when the parity is odd (see hc_ext_expand). Ties keep the first
// minimum, and zero counts as positive, as in the thesis' reference routine.
//
// Timing: the record outputs are registered and are valid the clock after the
// last element of the equation; they hold until the next `in_first`.
module hc_siso
  import hc_pkg::*;
#(
  parameter int unsigned MAXLEN = HC_PLANES,
  localparam int unsigned KW    = $clog2(MAXLEN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic [KW-1:0]     in_k,
  input  llr_t              in_x,
  output mag_t              min1,
  output mag_t              min2,
  output logic [KW-1:0]     loc,
  output logic              parity,
  output logic [MAXLEN-1:0] signs
);

  logic neg;
  mag_t mag;

  assign neg = in_x[LLR_W-1];
  assign mag = neg ? mag_t'(-in_x) : mag_t'(in_x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min1   <= '1;
      min2   <= '1;
      loc    <= '0;
      parity <= 1'b0;
      signs  <= '0;
    end else if (in_valid) begin
      if (in_first) begin
        min1   <= mag;
        min2   <= '1;
        loc    <= in_k;
        parity <= neg;
        signs  <= MAXLEN'(neg) << in_k;
      end else begin
        if (mag < min1) begin
          min2 <= min1;
          min1 <= mag;
          loc  <= in_k;
        end else if (mag < min2) begin
          min2 <= mag;
        end
        parity        <= parity ^ neg;
        signs[in_k]   <= neg;
      end
    end
  end

endmodule
