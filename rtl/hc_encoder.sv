// hc_encoder: systematic hyper-code encoder for the parity cube plus roll
// parity code.
//
// Operation has three phases. LOAD accepts the K information bits as a
// stream and places them in the cube in (plane, row, column) order, skipping
// the parity positions. ENCODE walks every parity equation with
// hc_eq_walker, one element per clock: the parity of the elements before the
// last is accumulated and written to the last (parity) position. The walk
// order guarantees that every parity bit's final value is computed from
// bits that are already final, so one pass gives a valid codeword in which
// every row, column, depth and roll equation has even parity, including the
// rows and columns of the roll parity plane. OUTPUT streams the N channel
// bits in address order (plane-major, then row, then column) and returns to
// LOAD.
//
// With CUBES > 1 the code is four-dimensional (hc_eq_walker4): CUBES cubes
// of PLANES x ROWS x COLS, the last two being the parity cube and the roll
// cube, and information bits fill cubes 0..CUBES-3 in (cube, plane, row,
// column) order. CUBES = 1 gives the three-dimensional code above.
//
// Interface: valid/ready streams on both sides; `out_last` marks the final
// bit of a block. Timing: K load cycles, then sum-of-equation-lengths encode
// cycles (20519 for the default code), then N output cycles.
module hc_encoder
  import hc_pkg::*;
#(
  parameter int unsigned ROWS   = HC_ROWS,
  parameter int unsigned COLS   = HC_COLS,
  parameter int unsigned PLANES = HC_PLANES,
  parameter int unsigned CUBES  = 1,
  localparam int unsigned NBITS  = ROWS * COLS * PLANES * CUBES,
  localparam int unsigned AW     = $clog2(NBITS),
  localparam int unsigned M1     = (ROWS > COLS) ? ROWS : COLS,
  localparam int unsigned M2     = (PLANES > CUBES) ? PLANES : CUBES,
  localparam int unsigned CW     = $clog2(((M1 > M2) ? M1 : M2) + 1),
  // Last information plane and cube.
  localparam int unsigned P_INFO = (CUBES > 1) ? PLANES - 2 : PLANES - 3,
  localparam int unsigned Q_INFO = (CUBES > 1) ? CUBES - 3 : 0
) (
  input  logic clk,
  input  logic rst_n,
  // information bits in
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  // channel bits out
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_last,
  output logic encoding
);

  typedef enum logic [1:0] {S_LOAD, S_ENC, S_OUT} state_e;
  state_e state;

  logic mem [NBITS];

  // Info-bit position counters.
  logic [CW-1:0] lq, lp, lr, lc;
  logic [AW-1:0] laddr, ocnt;
  assign laddr = AW'(((AW'(lq) * AW'(PLANES) + AW'(lp)) * AW'(ROWS) + AW'(lr)) * AW'(COLS) + AW'(lc));
  logic load_last;
  assign load_last = (lq == CW'(Q_INFO)) && (lp == CW'(P_INFO)) && (lr == CW'(ROWS - 2))
                     && (lc == CW'(COLS - 2));

  // Equation walker.
  logic          w_step;
  logic [AW-1:0] w_addr;
  logic          w_last_k, w_last_eq;
  if (CUBES > 1) begin : g_walk4
    hc_eq_walker4 #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES), .CUBES(CUBES)) u_walk (
      .clk, .rst_n,
      .clear(state != S_ENC), .step(w_step), .rewind(1'b0),
      .set(), .k(), .len(), .addr(w_addr), .eq_id(),
      .last_k(w_last_k), .last_in_set(), .last_eq(w_last_eq)
    );
  end else begin : g_walk3
    hc_eq_walker #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES)) u_walk (
      .clk, .rst_n,
      .clear(state != S_ENC), .step(w_step), .rewind(1'b0),
      .set(), .k(), .len(), .addr(w_addr), .eq_id(),
      .last_k(w_last_k), .last_in_set(), .last_eq(w_last_eq)
    );
  end

  logic par;

  assign in_ready  = (state == S_LOAD);
  assign w_step    = (state == S_ENC);
  assign encoding  = (state == S_ENC);
  assign out_valid = (state == S_OUT);
  assign out_bit   = mem[ocnt];
  assign out_last  = (state == S_OUT) && (ocnt == AW'(NBITS - 1));

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      mem[laddr] <= in_bit;
    else if (state == S_ENC && w_last_k)
      mem[w_addr] <= par;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      lq <= '0; lp <= '0; lr <= '0; lc <= '0;
      ocnt <= '0;
      par <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (load_last) begin
            lq <= '0; lp <= '0; lr <= '0; lc <= '0;
            par   <= 1'b0;
            state <= S_ENC;
          end else if (lc == CW'(COLS - 2)) begin
            lc <= '0;
            if (lr == CW'(ROWS - 2)) begin
              lr <= '0;
              if (lp == CW'(P_INFO)) begin
                lp <= '0;
                lq <= lq + CW'(1);
              end else begin
                lp <= lp + CW'(1);
              end
            end else begin
              lr <= lr + CW'(1);
            end
          end else begin
            lc <= lc + CW'(1);
          end
        end
        S_ENC: begin
          par <= w_last_k ? 1'b0 : (par ^ mem[w_addr]);
          if (w_last_k && w_last_eq) begin
            ocnt  <= '0;
            state <= S_OUT;
          end
        end
        default: if (out_ready) begin
          if (ocnt == AW'(NBITS - 1)) begin
            ocnt  <= '0;
            state <= S_LOAD;
          end else begin
            ocnt <= ocnt + AW'(1);
          end
        end
      endcase
    end
  end

endmodule
