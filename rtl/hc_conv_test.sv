// hc_conv_test: the decoder's early-stopping test.
//
// A flag is set at the start of every set of parity equations. Each
// processed equation reports whether its parity (extrinsic removed) was odd
// and whether any element changed sign since the previous decoding cycle;
// either clears the flag. At the end of a set a counter of consecutive
// passing sets is incremented if the flag survived and zeroed otherwise.
// When the counter reaches the number of sets in the code, every equation
// has passed once since the last change and further cycles cannot alter the
// decisions, so decoding may stop after any set, not only at a cycle
// boundary. This follows the thesis' convergence test.
//
// Interface: `clear` restarts the test (start of a block). `eq_done` pulses
// once per equation with `eq_odd` and `eq_changed`; `set_done` pulses with
// the last `eq_done` of a set. `hit` is combinational and rises in that same
// cycle when the counter is about to reach NSETS; `converged` is its
// registered, sticky version.
module hc_conv_test #(
  parameter int unsigned NSETS = 4,
  localparam int unsigned CW   = $clog2(NSETS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          eq_done,
  input  logic          eq_odd,
  input  logic          eq_changed,
  input  logic          set_done,
  output logic          hit,
  output logic          converged,
  output logic [CW-1:0] count
);

  logic flag_q, flag_nxt;

  always_comb begin
    flag_nxt = flag_q;
    if (eq_done && (eq_odd || eq_changed))
      flag_nxt = 1'b0;
  end

  assign hit = set_done && flag_nxt && (count == CW'(NSETS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q    <= 1'b1;
      count     <= '0;
      converged <= 1'b0;
    end else if (clear) begin
      flag_q    <= 1'b1;
      count     <= '0;
      converged <= 1'b0;
    end else begin
      if (set_done) begin
        flag_q <= 1'b1;
        count  <= flag_nxt ? ((count == CW'(NSETS)) ? count : count + CW'(1)) : '0;
      end else begin
        flag_q <= flag_nxt;
      end
      if (hit)
        converged <= 1'b1;
    end
  end

endmodule
