// hc_eq_walker: steps through every parity equation of the hyper-code, one
// element per step, and gives the channel-bit address of each element.
//
// The equations are walked set by set: first the row equations of every
// plane (roll-parity plane included), then the column equations of every
// plane, then the depth equations across the cube planes, and last the roll
// parity equations. Within an equation the parity position is always the
// last element, so the same order serves the encoder (each parity bit is
// written after the bits it depends on, and a bit first written by a
// redundant equation is later overwritten by the one that defines it) and
// the decoder. Roll parity equation (i,j) takes bit
// ((i+roll_row(k)) mod ROWS, (j+roll_col(k)) mod COLS) of cube plane k and
// ends at (i,j) of the last plane, as in the thesis' diagonal parity formula;
// with an odd side this is plain diagonal parity.
//
// The thesis requires the depth (number of cube planes) to be no longer
// than the rows or the columns, so that every plane gets its own row and
// column roll; a geometry that breaks this stops elaboration.
//
// Interface: `clear` returns to element 0 of the first equation; `step`
// advances by one element, moving to the next equation after the last one
// (and back to the first after the last equation of the code); `rewind`
// returns to element 0 of the current equation, for a second pass. Outputs
// describe the current position and are combinational from the registers.
module hc_eq_walker
  import hc_pkg::*;
#(
  parameter int unsigned ROWS   = HC_ROWS,
  parameter int unsigned COLS   = HC_COLS,
  parameter int unsigned PLANES = HC_PLANES,
  localparam int unsigned NBITS  = ROWS * COLS * PLANES,
  localparam int unsigned NEQ    = PLANES * ROWS + PLANES * COLS + 2 * ROWS * COLS,
  localparam int unsigned MAXLEN = (PLANES > ROWS) ? ((PLANES > COLS) ? PLANES : COLS)
                                                   : ((ROWS > COLS) ? ROWS : COLS),
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
  output hc_set_e       set,
  output logic [KW-1:0] k,
  output logic [KW-1:0] len,
  output logic [AW-1:0] addr,
  output logic [EW-1:0] eq_id,
  output logic          last_k,
  output logic          last_in_set,
  output logic          last_eq
);

  // The roll rule needs a distinct row roll and a distinct column roll for
  // every cube plane, so the depth (cube planes) may not exceed either side.
  if (PLANES - 1 > ROWS || PLANES - 1 > COLS) begin : g_bad_geometry
    $error("hc_eq_walker: %0d cube planes exceed the rows (%0d) or columns (%0d)",
           PLANES - 1, ROWS, COLS);
  end

  // Equation coordinates: (a, b) name the equation within its set.
  logic [CW-1:0] a_q, b_q;
  logic [KW-1:0] k_q;
  hc_set_e       set_q;
  logic [EW-1:0] eq_q;

  logic [CW-1:0] a_max, b_max;  // last value of a and b in the current set

  always_comb begin
    unique case (set_q)
      SET_ROW:   begin a_max = CW'(PLANES - 1); b_max = CW'(ROWS - 1); len = KW'(COLS);       end
      SET_COL:   begin a_max = CW'(PLANES - 1); b_max = CW'(COLS - 1); len = KW'(ROWS);       end
      SET_DEPTH: begin a_max = CW'(ROWS - 1);   b_max = CW'(COLS - 1); len = KW'(PLANES - 1); end
      default:   begin a_max = CW'(ROWS - 1);   b_max = CW'(COLS - 1); len = KW'(PLANES);     end
    endcase
  end

  assign last_k      = (k_q == len - KW'(1));
  assign last_in_set = (a_q == a_max) && (b_q == b_max);
  assign last_eq     = last_in_set && (set_q == SET_ROLL);

  // Roll amounts of cube plane k, from the package rule, as small tables.
  logic [CW-1:0] rr_tab [PLANES];
  logic [CW-1:0] rc_tab [PLANES];
  always_comb begin
    for (int unsigned p = 0; p < PLANES; p++) begin
      rr_tab[p] = CW'(roll_row(p, ROWS));
      rc_tab[p] = CW'(roll_col(p, ROWS, COLS, PLANES - 1));
    end
  end

  // Address of the current element.
  logic [CW-1:0] pl, rw, cl;
  logic [CW:0]   rsum, csum;
  always_comb begin
    rsum = '0;
    csum = '0;
    unique case (set_q)
      SET_ROW:   begin pl = a_q;      rw = b_q;      cl = CW'(k_q); end
      SET_COL:   begin pl = a_q;      rw = CW'(k_q); cl = b_q;      end
      SET_DEPTH: begin pl = CW'(k_q); rw = a_q;      cl = b_q;      end
      default: begin
        if (k_q == KW'(PLANES - 1)) begin
          pl = CW'(PLANES - 1); rw = a_q; cl = b_q;
        end else begin
          rsum = {1'b0, a_q} + {1'b0, rr_tab[k_q]};
          csum = {1'b0, b_q} + {1'b0, rc_tab[k_q]};
          pl = CW'(k_q);
          rw = (rsum >= (CW+1)'(ROWS)) ? CW'(rsum - (CW+1)'(ROWS)) : CW'(rsum);
          cl = (csum >= (CW+1)'(COLS)) ? CW'(csum - (CW+1)'(COLS)) : CW'(csum);
        end
      end
    endcase
    addr = AW'((AW'(pl) * AW'(ROWS) + AW'(rw)) * AW'(COLS) + AW'(cl));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_q <= SET_ROW; a_q <= '0; b_q <= '0; k_q <= '0; eq_q <= '0;
    end else if (clear) begin
      set_q <= SET_ROW; a_q <= '0; b_q <= '0; k_q <= '0; eq_q <= '0;
    end else if (rewind) begin
      k_q <= '0;
    end else if (step) begin
      if (!last_k) begin
        k_q <= k_q + KW'(1);
      end else begin
        k_q <= '0;
        if (last_eq) begin
          set_q <= SET_ROW; a_q <= '0; b_q <= '0; eq_q <= '0;
        end else begin
          eq_q <= eq_q + EW'(1);
          if (last_in_set) begin
            set_q <= hc_set_e'(set_q + 2'd1);
            a_q   <= '0;
            b_q   <= '0;
          end else if (b_q == b_max) begin
            a_q <= a_q + CW'(1);
            b_q <= '0;
          end else begin
            b_q <= b_q + CW'(1);
          end
        end
      end
    end
  end

  assign set   = set_q;
  assign k     = k_q;
  assign eq_id = eq_q;

endmodule
