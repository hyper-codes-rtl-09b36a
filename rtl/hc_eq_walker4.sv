// hc_eq_walker4: steps through every parity equation of a four-dimensional
// hyper-code (a parity hyper-cube plus one cube of roll parity), one element
// per step, and gives the channel-bit address of each element.
//
// The box is CUBES cubes of PLANES x ROWS x COLS bits, all lengths with
// parity. Cubes 0..CUBES-3 hold information and their own row, column and
// depth parity, cube CUBES-2 is the parity across cubes, and cube CUBES-1
// holds the roll parity. Bit (cube, plane, row, col) lives at address
// ((cube*PLANES + plane)*ROWS + row)*COLS + col. Five sets of equations are
// walked in order:
//   row    one per (cube, plane, row),  along the columns, length COLS
//   column one per (cube, plane, col),  along the rows,    length ROWS
//   depth  one per (cube, row, col),    along the planes,  length PLANES
//   cube   one per (plane, row, col),   across cubes 0..CUBES-2
//   roll   one per (plane, row, col),   bit ((p+rd(k)), (r+rr(k)), (c+rc(k)))
//          of every rolled cube k, then (p, r, c) of the roll cube.
// Every cube, the roll cube included, is decoded as a three-dimensional
// sub-code. The parity position is always the last element, so the same
// order serves the encoder and the decoder, as in hc_eq_walker. The rolls
// come from hc_pkg: depth roll k, row roll roll4_row, column roll roll4_col.
// The thesis gives the principle (interleave only within each cube, no
// roll difference with more than one half-length count) and a 4x4x4x4
// example; the general assignment is this design's own.
//
// Interface and timing are those of hc_eq_walker, except that `set` is a
// plain 3-bit set number (0 row .. 4 roll).
module hc_eq_walker4
  import hc_pkg::*;
#(
  parameter int unsigned ROWS   = 8,
  parameter int unsigned COLS   = 8,
  parameter int unsigned PLANES = 8,
  parameter int unsigned CUBES  = 9,
  localparam int unsigned NBITS  = ROWS * COLS * PLANES * CUBES,
  localparam int unsigned NEQ    = CUBES * PLANES * ROWS + CUBES * PLANES * COLS
                                   + CUBES * ROWS * COLS + 2 * PLANES * ROWS * COLS,
  localparam int unsigned M1     = (ROWS > COLS) ? ROWS : COLS,
  localparam int unsigned M2     = (PLANES > CUBES) ? PLANES : CUBES,
  localparam int unsigned MAXLEN = (M1 > M2) ? M1 : M2,
  localparam int unsigned AW     = $clog2(NBITS),
  localparam int unsigned EW     = $clog2(NEQ),
  localparam int unsigned KW     = $clog2(MAXLEN + 1),
  localparam int unsigned CW     = $clog2(MAXLEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic          rewind,
  output logic [2:0]    set,
  output logic [KW-1:0] k,
  output logic [KW-1:0] len,
  output logic [AW-1:0] addr,
  output logic [EW-1:0] eq_id,
  output logic          last_k,
  output logic          last_in_set,
  output logic          last_eq
);

  localparam logic [2:0] S_ROW = 3'd0, S_COL = 3'd1, S_DEP = 3'd2, S_CUBE = 3'd3, S_ROLL = 3'd4;

  // Every rolled cube needs its own roll in each dimension.
  if (CUBES - 1 > PLANES || CUBES - 1 > ROWS || CUBES - 1 > COLS) begin : g_bad_geometry
    $error("hc_eq_walker4: %0d rolled cubes exceed a side (%0d x %0d x %0d)",
           CUBES - 1, PLANES, ROWS, COLS);
  end

  // Equation coordinates (u outermost, w innermost) within the set.
  logic [CW-1:0] u_q, v_q, w_q;
  logic [KW-1:0] k_q;
  logic [2:0]    set_q;
  logic [EW-1:0] eq_q;

  logic [CW-1:0] u_max, v_max, w_max;

  always_comb begin
    unique case (set_q)
      S_ROW:  begin u_max = CW'(CUBES-1);  v_max = CW'(PLANES-1); w_max = CW'(ROWS-1); len = KW'(COLS);    end
      S_COL:  begin u_max = CW'(CUBES-1);  v_max = CW'(PLANES-1); w_max = CW'(COLS-1); len = KW'(ROWS);    end
      S_DEP:  begin u_max = CW'(CUBES-1);  v_max = CW'(ROWS-1);   w_max = CW'(COLS-1); len = KW'(PLANES);  end
      S_CUBE: begin u_max = CW'(PLANES-1); v_max = CW'(ROWS-1);   w_max = CW'(COLS-1); len = KW'(CUBES-1); end
      default:begin u_max = CW'(PLANES-1); v_max = CW'(ROWS-1);   w_max = CW'(COLS-1); len = KW'(CUBES);   end
    endcase
  end

  assign last_k      = (k_q == len - KW'(1));
  assign last_in_set = (u_q == u_max) && (v_q == v_max) && (w_q == w_max);
  assign last_eq     = last_in_set && (set_q == S_ROLL);

  // Roll amounts of rolled cube k.
  logic [CW-1:0] rd_tab [CUBES];
  logic [CW-1:0] rr_tab [CUBES];
  logic [CW-1:0] rc_tab [CUBES];
  always_comb begin
    for (int unsigned q = 0; q < CUBES; q++) begin
      rd_tab[q] = CW'(q % PLANES);
      rr_tab[q] = CW'(roll4_row(q, ROWS, CUBES - 1));
      rc_tab[q] = CW'(roll4_col(q, COLS, CUBES - 1));
    end
  end

  function automatic logic [CW-1:0] add_mod(input logic [CW-1:0] a, input logic [CW-1:0] b,
                                            input logic [CW:0] m);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= m) ? CW'(s - m) : CW'(s);
  endfunction

  // Address of the current element.
  logic [CW-1:0] cu, pl, rw, cl;
  always_comb begin
    unique case (set_q)
      S_ROW:  begin cu = u_q;      pl = v_q;      rw = w_q;      cl = CW'(k_q); end
      S_COL:  begin cu = u_q;      pl = v_q;      rw = CW'(k_q); cl = w_q;      end
      S_DEP:  begin cu = u_q;      pl = CW'(k_q); rw = v_q;      cl = w_q;      end
      S_CUBE: begin cu = CW'(k_q); pl = u_q;      rw = v_q;      cl = w_q;      end
      default: begin
        cu = CW'(k_q);
        if (k_q == KW'(CUBES - 1)) begin
          pl = u_q; rw = v_q; cl = w_q;
        end else begin
          pl = add_mod(u_q, rd_tab[k_q], (CW+1)'(PLANES));
          rw = add_mod(v_q, rr_tab[k_q], (CW+1)'(ROWS));
          cl = add_mod(w_q, rc_tab[k_q], (CW+1)'(COLS));
        end
      end
    endcase
    addr = AW'(((AW'(cu) * AW'(PLANES) + AW'(pl)) * AW'(ROWS) + AW'(rw)) * AW'(COLS) + AW'(cl));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_q <= S_ROW; u_q <= '0; v_q <= '0; w_q <= '0; k_q <= '0; eq_q <= '0;
    end else if (clear) begin
      set_q <= S_ROW; u_q <= '0; v_q <= '0; w_q <= '0; k_q <= '0; eq_q <= '0;
    end else if (rewind) begin
      k_q <= '0;
    end else if (step) begin
      if (!last_k) begin
        k_q <= k_q + KW'(1);
      end else begin
        k_q <= '0;
        if (last_eq) begin
          set_q <= S_ROW; u_q <= '0; v_q <= '0; w_q <= '0; eq_q <= '0;
        end else begin
          eq_q <= eq_q + EW'(1);
          if (last_in_set) begin
            set_q <= set_q + 3'd1;
            u_q <= '0; v_q <= '0; w_q <= '0;
          end else if (w_q != w_max) begin
            w_q <= w_q + CW'(1);
          end else begin
            w_q <= '0;
            if (v_q != v_max) begin
              v_q <= v_q + CW'(1);
            end else begin
              v_q <= '0;
              u_q <= u_q + CW'(1);
            end
          end
        end
      end
    end
  end

  assign set   = set_q;
  assign k     = k_q;
  assign eq_id = eq_q;

endmodule
