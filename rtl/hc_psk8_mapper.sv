// hc_psk8_mapper: maps three channel bits onto a Gray-coded 8PSK point.
//
// The eight points lie on a circle of radius R at multiples of 45 degrees;
// point m carries the label m ^ (m >> 1) (hc_pkg::psk8_label), so adjacent
// points differ in exactly one bit. The thesis evaluates its codes with
// Gray-coded 8PSK but does not print the assignment: the point positions and
// this particular Gray sequence are this design's choice. `bits[2]` is the
// first of the three channel bits. Purely combinational.
module hc_psk8_mapper
  import hc_pkg::*;
#(
  parameter int unsigned SW = 8,   // sample width, signed
  parameter int          R  = 64   // circle radius
) (
  input  logic [2:0]           bits,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q
);

  always_comb begin
    out_i = '0;
    out_q = '0;
    for (int unsigned m = 0; m < 8; m++)
      if (psk8_label(m) == bits) begin
        out_i = SW'(psk8_x(m, R));
        out_q = SW'(psk8_y(m, R));
      end
  end

endmodule
