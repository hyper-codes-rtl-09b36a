// hc_ext_mem: compressed extrinsic information store, one record per parity
// equation.
//
// Instead of one extrinsic value per element, each equation keeps the
// smallest and second smallest input magnitude, the position of the
// smallest, the parity and a sign word with one bit per element. This is
// what the max-log-APP rule needs to rebuild and subtract every element's
// extrinsic value on the next decoding cycle, and the sign word also serves
// the convergence test. For the default code a record is 2*9+5+1+18 = 42
// bits against 18*10 = 180 bits stored uncompressed.
//
// One synchronous write port and one asynchronous read port.
module hc_ext_mem
  import hc_pkg::*;
#(
  parameter int unsigned DEPTH  = HC_PLANES * HC_ROWS + HC_PLANES * HC_COLS + 2 * HC_ROWS * HC_COLS,
  parameter int unsigned MAXLEN = HC_PLANES,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned KW    = $clog2(MAXLEN + 1)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  mag_t              w_min1,
  input  mag_t              w_min2,
  input  logic [KW-1:0]     w_loc,
  input  logic              w_parity,
  input  logic [MAXLEN-1:0] w_signs,
  input  logic [AW-1:0]     raddr,
  output mag_t              r_min1,
  output mag_t              r_min2,
  output logic [KW-1:0]     r_loc,
  output logic              r_parity,
  output logic [MAXLEN-1:0] r_signs
);

  typedef struct packed {
    mag_t              min1;
    mag_t              min2;
    logic [KW-1:0]     loc;
    logic              parity;
    logic [MAXLEN-1:0] signs;
  } rec_t;

  rec_t mem [DEPTH];
  rec_t r;

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= '{min1: w_min1, min2: w_min2, loc: w_loc, parity: w_parity, signs: w_signs};
  end

  assign r        = mem[raddr];
  assign r_min1   = r.min1;
  assign r_min2   = r.min2;
  assign r_loc    = r.loc;
  assign r_parity = r.parity;
  assign r_signs  = r.signs;

endmodule
