// hc_llr_mem: composite LLR store of the decoder, one soft value per channel
// bit. It holds the channel LLRs on load and the running a-posteriori LLRs
// (channel value plus every set's current extrinsic information) during
// decoding, so its size is the block length.
//
// One synchronous write port and one asynchronous read port. The
// asynchronous read lets the decoder read and update one element per clock
// without a read pipeline; this is the design's own choice.
module hc_llr_mem
  import hc_pkg::*;
#(
  parameter int unsigned DEPTH = HC_ROWS * HC_COLS * HC_PLANES,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  llr_t          wdata,
  input  logic [AW-1:0] raddr,
  output llr_t          rdata
);

  llr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
