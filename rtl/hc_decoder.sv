// hc_decoder: iterative max-log-APP decoder for the parity cube plus roll
// parity hyper-code.
//
// The block's channel LLRs are loaded into the composite LLR store
// (hc_llr_mem). A decoding cycle then visits every parity equation in the
// order of hc_eq_walker: rows, columns, depth, roll. Each equation takes two
// passes of one element per clock:
//   READ  - read the composite LLR, subtract the element's extrinsic value
//           from the previous cycle (rebuilt from the compressed record in
//           hc_ext_mem by hc_ext_expand; zero in the first cycle), keep the
//           result in a small buffer and feed it to the SISO core (hc_siso).
//   WRITE - rebuild the new, scaled extrinsic value from the SISO record,
//           add it to the buffered value and write the sum back; after the
//           last element store the new record and report the equation to
//           the convergence test (hc_conv_test).
// Extrinsic information is applied immediately, so later sets see the
// earlier sets' updates within the same cycle. Decoding stops when the
// convergence test passes, possibly in the middle of a cycle, or after
// `num_cycles` cycles. Hard decisions are the signs of the composite LLRs.
//
// With CUBES > 1 the code is the four-dimensional one of hc_eq_walker4
// (five sets of equations); CUBES = 1 gives the three-dimensional code.
//
// Interface: while idle, `ld_valid`/`ld_llr` load one LLR per clock in
// channel-bit address order; values beyond the block length are ignored.
// `start` (idle only) begins decoding; the load counter restarts with it.
// `done` pulses when decoding ends, with `converged` and `cycles_run`
// (started cycles) valid from then until the next start. `rd_addr` reads the
// result asynchronously while idle.
// Timing: 2 clocks per equation element, 41038 clocks per decoding cycle for
// the default code, plus one clock for start.
module hc_decoder
  import hc_pkg::*;
#(
  parameter int unsigned ROWS   = HC_ROWS,
  parameter int unsigned COLS   = HC_COLS,
  parameter int unsigned PLANES = HC_PLANES,
  parameter int unsigned CUBES  = 1,
  localparam int unsigned NBITS  = ROWS * COLS * PLANES * CUBES,
  localparam int unsigned NEQ    = (CUBES > 1)
                                   ? CUBES * PLANES * ROWS + CUBES * PLANES * COLS
                                     + CUBES * ROWS * COLS + 2 * PLANES * ROWS * COLS
                                   : PLANES * ROWS + PLANES * COLS + 2 * ROWS * COLS,
  localparam int unsigned M1     = (ROWS > COLS) ? ROWS : COLS,
  localparam int unsigned M2     = (PLANES > CUBES) ? PLANES : CUBES,
  localparam int unsigned MAXLEN = (M1 > M2) ? M1 : M2,
  localparam int unsigned NSETS  = (CUBES > 1) ? NUM_SETS + 1 : NUM_SETS,
  localparam int unsigned AW     = $clog2(NBITS),
  localparam int unsigned EW     = $clog2(NEQ),
  localparam int unsigned KW     = $clog2(MAXLEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // channel LLR load
  input  logic          ld_valid,
  input  llr_t          ld_llr,
  // control
  input  logic          start,
  input  logic [7:0]    num_cycles,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [7:0]    cycles_run,
  // result read port
  input  logic [AW-1:0] rd_addr,
  output llr_t          rd_llr,
  output logic          rd_bit
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e state;

  logic [7:0]    cycle;
  logic          first_cycle;
  logic [AW-1:0] ld_cnt;

  // ---------------------------------------------------------------- walker
  logic [KW-1:0] w_k, w_len;
  logic [AW-1:0] w_addr;
  logic [EW-1:0] w_eq;
  logic          w_last_k, w_last_in_set, w_last_eq;
  logic          w_step, w_rewind;

  assign w_step   = (state == S_READ && !w_last_k) || state == S_WRITE;
  assign w_rewind = state == S_READ && w_last_k;

  if (CUBES > 1) begin : g_walk4
    hc_eq_walker4 #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES), .CUBES(CUBES)) u_walk (
      .clk, .rst_n,
      .clear(state == S_IDLE), .step(w_step), .rewind(w_rewind),
      .set(), .k(w_k), .len(w_len), .addr(w_addr), .eq_id(w_eq),
      .last_k(w_last_k), .last_in_set(w_last_in_set), .last_eq(w_last_eq)
    );
  end else begin : g_walk3
    hc_eq_walker #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES)) u_walk (
      .clk, .rst_n,
      .clear(state == S_IDLE), .step(w_step), .rewind(w_rewind),
      .set(), .k(w_k), .len(w_len), .addr(w_addr), .eq_id(w_eq),
      .last_k(w_last_k), .last_in_set(w_last_in_set), .last_eq(w_last_eq)
    );
  end

  // ------------------------------------------------------- composite LLRs
  logic          m_we;
  logic [AW-1:0] m_waddr, m_raddr;
  llr_t          m_wdata, m_rdata;

  hc_llr_mem #(.DEPTH(NBITS)) u_llr (
    .clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata), .raddr(m_raddr), .rdata(m_rdata)
  );

  // ------------------------------------------------ compressed extrinsics
  mag_t              o_min1, o_min2, s_min1, s_min2;
  logic [KW-1:0]     o_loc, s_loc;
  logic              o_par, s_par;
  logic [MAXLEN-1:0] o_signs, s_signs;

  hc_ext_mem #(.DEPTH(NEQ), .MAXLEN(MAXLEN)) u_ext (
    .clk,
    .we(state == S_WRITE && w_last_k), .waddr(w_eq),
    .w_min1(s_min1), .w_min2(s_min2), .w_loc(s_loc), .w_parity(s_par), .w_signs(s_signs),
    .raddr(w_eq),
    .r_min1(o_min1), .r_min2(o_min2), .r_loc(o_loc), .r_parity(o_par), .r_signs(o_signs)
  );

  llr_t old_ext, new_ext;
  hc_ext_expand #(.MAXLEN(MAXLEN)) u_old (
    .min1(o_min1), .min2(o_min2), .loc(o_loc), .parity(o_par), .signs(o_signs),
    .k(w_k), .ext(old_ext)
  );
  hc_ext_expand #(.MAXLEN(MAXLEN)) u_new (
    .min1(s_min1), .min2(s_min2), .loc(s_loc), .parity(s_par), .signs(s_signs),
    .k(w_k), .ext(new_ext)
  );

  // ------------------------------------------------------- SISO datapath
  llr_t x_in;
  llr_t xbuf [MAXLEN];

  always_comb
    x_in = sat_llr((LLR_W+2)'(m_rdata) - (LLR_W+2)'(first_cycle ? llr_t'(0) : old_ext));

  hc_siso #(.MAXLEN(MAXLEN)) u_siso (
    .clk, .rst_n,
    .in_valid(state == S_READ), .in_first(w_k == '0), .in_k(w_k), .in_x(x_in),
    .min1(s_min1), .min2(s_min2), .loc(s_loc), .parity(s_par), .signs(s_signs)
  );

  always_ff @(posedge clk) begin
    if (state == S_READ)
      xbuf[w_k] <= x_in;
  end

  // ------------------------------------------------------ memory port muxes
  always_comb begin
    m_raddr = (state == S_IDLE) ? rd_addr : w_addr;
    if (state == S_WRITE) begin
      m_we    = 1'b1;
      m_waddr = w_addr;
      m_wdata = sat_llr((LLR_W+2)'(xbuf[w_k]) + (LLR_W+2)'(new_ext));
    end else begin
      m_we    = (state == S_IDLE) && ld_valid && (ld_cnt < AW'(NBITS)) && !start;
      m_waddr = ld_cnt;
      m_wdata = ld_llr;
    end
  end

  assign rd_llr = m_rdata;
  assign rd_bit = m_rdata[LLR_W-1];

  // --------------------------------------------------- convergence test
  logic conv_hit, eq_done;
  assign eq_done = (state == S_WRITE) && w_last_k;

  hc_conv_test #(.NSETS(NSETS)) u_conv (
    .clk, .rst_n,
    .clear(state == S_IDLE),
    .eq_done(eq_done),
    .eq_odd(s_par),
    .eq_changed(!first_cycle && (s_signs != o_signs)),
    .set_done(eq_done && w_last_in_set),
    .hit(conv_hit), .converged(), .count()
  );

  // --------------------------------------------------------- control FSM
  assign busy        = (state != S_IDLE);
  assign first_cycle = (cycle == 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cycle      <= '0;
      ld_cnt     <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      cycles_run <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            ld_cnt    <= '0;
            cycle     <= '0;
            converged <= 1'b0;
            if (num_cycles == 8'd0) begin
              done       <= 1'b1;
              cycles_run <= '0;
            end else begin
              state <= S_READ;
            end
          end else if (ld_valid && ld_cnt < AW'(NBITS)) begin
            ld_cnt <= ld_cnt + AW'(1);
          end
        end
        S_READ: if (w_last_k) state <= S_WRITE;
        default: begin
          if (w_last_k) begin
            state <= S_READ;
            if (conv_hit) begin
              state      <= S_IDLE;
              done       <= 1'b1;
              converged  <= 1'b1;
              cycles_run <= cycle + 8'd1;
            end else if (w_last_eq) begin
              if (cycle + 8'd1 == num_cycles) begin
                state      <= S_IDLE;
                done       <= 1'b1;
                cycles_run <= cycle + 8'd1;
              end else begin
                cycle <= cycle + 8'd1;
              end
            end
          end
        end
      endcase
    end
  end

  // The walker's set and length are used only through its flags here.
  logic unused;
  assign unused = ^w_len;

endmodule
