// hc_qam_mapper: maps four channel bits onto a Gray-coded 16QAM point.
//
// Label bits 3 and 1 select the grid row (y = +3A, +A, -A, -3A from the top),
// label bits 2 and 0 the grid column (x = -3A, -A, +A, +3A from the left),
// so that neighbouring points differ in one bit, following the bit
// assignment printed in the thesis (hc_pkg::qam16_label). `bits[3]` is the
// first of the four channel bits. Purely combinational.
module hc_qam_mapper
  import hc_pkg::*;
#(
  parameter int unsigned SW = 8,
  parameter int          A  = 32
) (
  input  logic [3:0]           bits,
  output logic signed [SW-1:0] out_i,
  output logic signed [SW-1:0] out_q
);

  always_comb begin
    out_i = '0;
    out_q = '0;
    for (int unsigned r = 0; r < 4; r++)
      for (int unsigned c = 0; c < 4; c++)
        if (qam16_label(r, c) == bits) begin
          out_i = SW'((2 * int'(c) - 3) * A);
          out_q = SW'((3 - 2 * int'(r)) * A);
        end
  end

endmodule
