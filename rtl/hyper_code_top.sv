// hyper_code_top: a complete hyper-code link end point, transmit and receive.
//
// Transmit: information bits stream into hc_encoder, which fills the
// 16x16x16 information cube, adds row, column and depth parity and one
// plane of roll (diagonal) parity, and streams the 5202 channel bits out.
// mod_sel picks how channel bits become samples:
//   MOD_ANTIPODAL  each bit is one sample, "0" -> +A and "1" -> -A, on tx_i
//                  (two such streams make QPSK);
//   MOD_8PSK       three consecutive bits form one Gray-coded 8PSK symbol
//                  of radius R (hc_psk8_mapper);
//   MOD_16QAM      four consecutive bits form one Gray-coded 16QAM symbol
//                  (hc_qam_mapper).
// The first bit of a symbol goes to its leftmost label bit. A last symbol
// left incomplete at the end of a block is padded with zero bits (16QAM
// with the default code; 5202 is a multiple of three).
//
// Receive: in antipodal mode each rx_i sample is itself the starting LLR,
// since the max-log-APP decoder needs no channel scaling. In the symbol
// modes the matching demapper turns each symbol into three or four LLRs,
// which are handed to the decoder one per clock, first label bit first;
// while they drain rx_ready is low. LLRs of padding bits fall beyond the
// block and are dropped by the decoder. hc_decoder then decodes on
// dec_start and the result is read through dec_rd_addr.
//
// CUBES > 1 builds a four-dimensional 4D+ code instead (see hc_eq_walker4),
// e.g. ROWS = COLS = PLANES = 8, CUBES = 9 for 2401 information bits in a
// 4608-bit block; the default CUBES = 1 is the three-dimensional code.
//
// Interfaces are valid/ready streams (info, tx, rx) plus the decoder's
// start/done handshake; these, the sample width and the point spacing are
// this design's choices. Both directions share mod_sel, which must only
// change between blocks. The two paths are otherwise independent and may
// run at the same time.
module hyper_code_top
  import hc_pkg::*;
#(
  parameter int unsigned ROWS   = HC_ROWS,
  parameter int unsigned COLS   = HC_COLS,
  parameter int unsigned PLANES = HC_PLANES,
  parameter int unsigned CUBES  = 1,
  parameter int unsigned SW     = 8,
  parameter int          A      = 32,   // 16QAM half spacing, antipodal amplitude
  parameter int          R      = 64,   // 8PSK radius
  parameter int unsigned SHIFT  = 6,
  localparam int unsigned NBITS = ROWS * COLS * PLANES * CUBES,
  localparam int unsigned AW    = $clog2(NBITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  hc_mod_e              mod_sel,
  // information bits in
  input  logic                 info_valid,
  output logic                 info_ready,
  input  logic                 info_bit,
  // transmit samples / symbols out
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output logic signed [SW-1:0] tx_i,
  output logic signed [SW-1:0] tx_q,
  output logic                 tx_last,
  // received samples / symbols in
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  logic signed [SW-1:0] rx_i,
  input  logic signed [SW-1:0] rx_q,
  // decoder control and result
  input  logic                 dec_start,
  input  logic [7:0]           dec_num_cycles,
  output logic                 dec_busy,
  output logic                 dec_done,
  output logic                 dec_converged,
  output logic [7:0]           dec_cycles_run,
  input  logic [AW-1:0]        dec_rd_addr,
  output llr_t                 dec_rd_llr,
  output logic                 dec_rd_bit
);

  // ---------------------------------------------------------------- TX
  logic enc_valid, enc_ready, enc_bit, enc_last;

  hc_encoder #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES), .CUBES(CUBES)) u_enc (
    .clk, .rst_n,
    .in_valid(info_valid), .in_ready(info_ready), .in_bit(info_bit),
    .out_valid(enc_valid), .out_ready(enc_ready), .out_bit(enc_bit), .out_last(enc_last),
    .encoding()
  );

  // Symbol assembly: bit n of a symbol goes to label bit nb-1-n.
  logic       sym_mode;     // 8PSK or 16QAM
  logic [1:0] sym_top;      // label bits per symbol minus one
  logic [3:0] sym_bits;
  logic [1:0] sym_cnt;
  logic       sym_full, sym_last;
  logic signed [SW-1:0] qam_i, qam_q, psk_i, psk_q;

  assign sym_mode = (mod_sel == MOD_8PSK) || (mod_sel == MOD_16QAM);
  assign sym_top  = (mod_sel == MOD_8PSK) ? 2'd2 : 2'd3;

  hc_qam_mapper  #(.SW(SW), .A(A)) u_qmap (.bits(sym_bits),      .out_i(qam_i), .out_q(qam_q));
  hc_psk8_mapper #(.SW(SW), .R(R)) u_pmap (.bits(sym_bits[2:0]), .out_i(psk_i), .out_q(psk_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_bits <= '0;
      sym_cnt  <= '0;
      sym_full <= 1'b0;
      sym_last <= 1'b0;
    end else if (sym_mode) begin
      if (sym_full) begin
        if (tx_ready) begin
          sym_full <= 1'b0;
          sym_bits <= '0;
          sym_cnt  <= '0;
          sym_last <= 1'b0;
        end
      end else if (enc_valid) begin
        sym_bits[sym_top - sym_cnt] <= enc_bit;
        sym_cnt  <= sym_cnt + 2'd1;
        if (sym_cnt == sym_top || enc_last) begin
          sym_full <= 1'b1;
          sym_last <= enc_last;
        end
      end
    end
  end

  always_comb begin
    if (sym_mode) begin
      enc_ready = !sym_full;
      tx_valid  = sym_full;
      tx_i      = (mod_sel == MOD_8PSK) ? psk_i : qam_i;
      tx_q      = (mod_sel == MOD_8PSK) ? psk_q : qam_q;
      tx_last   = sym_full && sym_last;
    end else begin
      enc_ready = tx_ready;
      tx_valid  = enc_valid;
      tx_i      = enc_bit ? SW'(-A) : SW'(A);
      tx_q      = '0;
      tx_last   = enc_last;
    end
  end

  // ---------------------------------------------------------------- RX
  logic qdm_valid, pdm_valid, dm_valid;
  llr_t qdm_llr [4];
  llr_t pdm_llr [3];
  llr_t ser [4];
  logic [2:0] ser_cnt;
  logic rx_take;
  logic ld_valid;
  llr_t ld_llr;

  assign rx_take = rx_valid && rx_ready;

  hc_demapper #(.SW(SW), .A(A), .SHIFT(SHIFT)) u_qdemap (
    .clk, .rst_n,
    .in_valid(rx_take && mod_sel == MOD_16QAM), .in_i(rx_i), .in_q(rx_q),
    .out_valid(qdm_valid), .out_llr(qdm_llr)
  );

  hc_psk8_demapper #(.SW(SW), .R(R), .SHIFT(SHIFT)) u_pdemap (
    .clk, .rst_n,
    .in_valid(rx_take && mod_sel == MOD_8PSK), .in_i(rx_i), .in_q(rx_q),
    .out_valid(pdm_valid), .out_llr(pdm_llr)
  );

  assign dm_valid = qdm_valid || pdm_valid;

  // Serializer: holds one symbol's LLRs and counts them out, label bit
  // ser_cnt-1 first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_cnt <= '0;
      for (int b = 0; b < 4; b++) ser[b] <= '0;
    end else if (qdm_valid) begin
      ser_cnt <= 3'd4;
      for (int b = 0; b < 4; b++) ser[b] <= qdm_llr[b];
    end else if (pdm_valid) begin
      ser_cnt <= 3'd3;
      for (int b = 0; b < 3; b++) ser[b] <= pdm_llr[b];
      ser[3] <= '0;
    end else if (ser_cnt != '0) begin
      ser_cnt <= ser_cnt - 3'd1;
    end
  end

  always_comb begin
    if (sym_mode) begin
      rx_ready = !dec_busy && (ser_cnt == '0) && !dm_valid;
      ld_valid = (ser_cnt != '0);
      ld_llr   = ser[ser_cnt[1:0] - 2'd1];  // 4 -> bit 3, ..., 1 -> bit 0
    end else begin
      rx_ready = !dec_busy;
      ld_valid = rx_valid;
      ld_llr   = llr_t'(rx_i);
    end
  end

  hc_decoder #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES), .CUBES(CUBES)) u_dec (
    .clk, .rst_n,
    .ld_valid(ld_valid && !dec_busy), .ld_llr(ld_llr),
    .start(dec_start), .num_cycles(dec_num_cycles),
    .busy(dec_busy), .done(dec_done), .converged(dec_converged), .cycles_run(dec_cycles_run),
    .rd_addr(dec_rd_addr), .rd_llr(dec_rd_llr), .rd_bit(dec_rd_bit)
  );

endmodule
