// hc_link_tester: end-to-end link test of hyper_code_top at one code size,
// used by the workload testbench to run the smaller 3D+ codes and a 4D+
// code (CUBES > 1).
//
// For each block: random information bits are encoded, the transmitted
// samples are checked against an independently encoded reference codeword,
// Gaussian noise is added, the noisy samples are received and decoded, and
// the decoder's final LLRs, stop cycle, convergence flag and clock count are
// compared bit-exactly with the reference decoder of hc_ref_pkg. Blocks are
// run antipodal, 8PSK and 16QAM at moderate noise, and antipodal at heavy
// noise with a two-cycle limit. Also checks the information and channel
// block sizes against K_EXP and N_EXP.
//
// Interface: runs by itself after `go`; raises `done` with its own check
// and failure counts. Has its own clock.
module hc_link_tester
  import hc_pkg::*;
  import hc_ref_pkg::*;
#(
  parameter int ROWS  = 9,
  parameter int COLS  = 9,
  parameter int PLANES = 10,
  parameter int CUBES = 1,
  parameter int K_EXP = 512,
  parameter int N_EXP = 810,
  parameter int SEED  = 1
) (
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int R = ROWS, C = COLS, P = PLANES;
  localparam int N = R * C * P * CUBES;
  localparam int AW = $clog2(N);
  localparam int A = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = go ? ~clk : clk;  // runs only once started

  hc_mod_e mod_sel = MOD_ANTIPODAL;
  logic info_valid = 0, info_ready, info_bit = 0;
  logic tx_valid, tx_ready = 1, tx_last;
  logic signed [7:0] tx_i, tx_q;
  logic rx_valid = 0, rx_ready;
  logic signed [7:0] rx_i = '0, rx_q = '0;
  logic dec_start = 0, dec_busy, dec_done, dec_converged, dec_rd_bit;
  logic [7:0] dec_num_cycles = '0, dec_cycles_run;
  logic [AW-1:0] dec_rd_addr = '0;
  llr_t dec_rd_llr;

  hyper_code_top #(.ROWS(ROWS), .COLS(COLS), .PLANES(PLANES), .CUBES(CUBES)) dut (.*);

  int n_antipodal = 0, n_psk = 0, n_qam = 0, n_padded = 0, n_early = 0, n_limit = 0, n_corrected = 0;
  hc_ref ref_m;
  string nm;

  // Printed Gray 16QAM constellation, top row first, leftmost point first.
  string qam_rows[4] = '{"1101 1001 1000 1100", "0101 0001 0000 0100",
                         "0111 0011 0010 0110", "1111 1011 1010 1110"};

  function automatic int label_of(int r, int c);
    int v = 0;
    for (int i = 0; i < 4; i++) v = v * 2 + (qam_rows[r][c * 5 + i] == "1");
    return v;
  endfunction

  // Points and labels of a symbol constellation; returns bits per symbol.
  int pt_x[16], pt_y[16], pt_lab[16];
  function automatic int constellation(hc_mod_e m);
    if (m == MOD_16QAM) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        pt_x[r * 4 + c] = (2 * c - 3) * A; pt_y[r * 4 + c] = (3 - 2 * r) * A;
        pt_lab[r * 4 + c] = label_of(r, c);
      end
      return 4;
    end
    for (int k = 0; k < 8; k++) begin
      real vx, vy;
      vx = 64.0 * $cos(3.14159265358979 * k / 4.0);
      vy = 64.0 * $sin(3.14159265358979 * k / 4.0);
      pt_x[k] = $rtoi(vx + (vx < 0 ? -0.5 : 0.5));
      pt_y[k] = $rtoi(vy + (vy < 0 ? -0.5 : 0.5));
      pt_lab[k] = k ^ (k >> 1);
    end
    return 3;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int q8(real v);
    int x = int'(v);
    if (x > 127) x = 127;
    if (x < -128) x = -128;
    return x;
  endfunction

  task automatic block(hc_mod_e mode, real sigma, int ncyc, string name);
    bit info[$], cw[$];
    int txi[$], txq[$], rxi[$], rxq[$], llr[$];
    int ref_cyc, nerr, derr, bad, nsym, start_t, nb, npt;
    bit ref_conv, sym;

    mod_sel = mode;
    sym = (mode != MOD_ANTIPODAL);
    nb = sym ? constellation(mode) : 1;
    npt = 1 << nb;
    for (int n = 0; n < ref_m.K; n++) info.push_back(1'($urandom));
    ref_m.encode(info, cw);

    // Encode.
    @(negedge clk);
    foreach (info[n]) begin
      info_valid = 1; info_bit = info[n];
      while (!info_ready) @(negedge clk);
      @(negedge clk);
    end
    info_valid = 0;
    forever begin
      if (tx_valid) begin
        txi.push_back(int'(tx_i)); txq.push_back(int'(tx_q));
        if (tx_last) break;
      end
      @(negedge clk);
    end
    @(negedge clk);

    // Check the transmitted stream against the reference codeword.
    nsym = (N + nb - 1) / nb;
    check(txi.size() == nsym, $sformatf("%s: %0d tx samples, expected %0d", name, txi.size(), nsym));
    bad = 0;
    if (!sym) begin
      foreach (cw[a]) if (txi[a] != (cw[a] ? -A : A) || txq[a] != 0) bad++;
    end else begin
      for (int s = 0; s < nsym; s++) begin
        int lab = 0;
        for (int j = 0; j < nb; j++) lab = lab * 2 + ((nb * s + j < N) ? int'(cw[nb * s + j]) : 0);
        for (int k = 0; k < npt; k++)
          if (pt_lab[k] == lab && (txi[s] != pt_x[k] || txq[s] != pt_y[k])) bad++;
      end
      if (N % nb != 0) n_padded++;
    end
    check(bad == 0, $sformatf("%s: %0d transmitted samples differ from reference", name, bad));

    // Channel.
    foreach (txi[s]) begin
      rxi.push_back(q8(real'(txi[s]) + sigma * gauss()));
      rxq.push_back(sym ? q8(real'(txq[s]) + sigma * gauss()) : 0);
    end

    // Reference starting LLRs.
    if (!sym) begin
      foreach (rxi[s]) llr.push_back(rxi[s]);
    end else begin
      foreach (rxi[s]) begin
        int d[16];
        for (int k = 0; k < npt; k++)
          d[pt_lab[k]] = (rxi[s] - pt_x[k]) ** 2 + (rxq[s] - pt_y[k]) ** 2;
        for (int b = nb - 1; b >= 0; b--) begin
          int d0 = 1 << 30, d1 = 1 << 30, v;
          for (int l = 0; l < npt; l++)
            if (((l >> b) & 1) != 0) d1 = (d[l] < d1) ? d[l] : d1; else d0 = (d[l] < d0) ? d[l] : d0;
          v = sat((d1 - d0) >>> 6);
          if (llr.size() < N) llr.push_back(v);
        end
      end
    end
    nerr = 0;
    foreach (cw[a]) if ((llr[a] < 0) != cw[a]) nerr++;
    ref_m.decode(llr, ncyc, ref_cyc, ref_conv);

    // Receive.
    foreach (rxi[s]) begin
      rx_valid = 1; rx_i = 8'(rxi[s]); rx_q = 8'(rxq[s]);
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
    end
    rx_valid = 0;
    repeat (8) @(negedge clk);

    // Decode.
    dec_start = 1; dec_num_cycles = 8'(ncyc);
    @(negedge clk);
    dec_start = 0;
    start_t = 1;
    while (!dec_done) begin @(negedge clk); start_t++; end
    check(dec_cycles_run == 8'(ref_cyc), $sformatf("%s: cycles %0d ref %0d", name, dec_cycles_run, ref_cyc));
    check(dec_converged == ref_conv, $sformatf("%s: converged %0d ref %0d", name, dec_converged, ref_conv));
    check(start_t == 2 * ref_m.last_elems + 1, $sformatf("%s: %0d clocks, expected %0d", name, start_t,
                                                       2 * ref_m.last_elems + 1));
    bad = 0; derr = 0;
    for (int a = 0; a < N; a++) begin
      dec_rd_addr = AW'(a); #1;
      if (int'(dec_rd_llr) != llr[a]) bad++;
      if (dec_rd_bit != cw[a]) derr++;
    end
    check(bad == 0, $sformatf("%s: %0d LLRs differ from reference", name, bad));
    $display("%s: channel errors %0d, decoded errors %0d, cycles %0d, converged %0d, clocks %0d",
             name, nerr, derr, dec_cycles_run, dec_converged, start_t);
    case (mode)
      MOD_16QAM: n_qam++;
      MOD_8PSK:  n_psk++;
      default:   n_antipodal++;
    endcase
    if (dec_converged) n_early++; else n_limit++;
    if (nerr > 0 && derr == 0) n_corrected++;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    ref_m = new(R, C, P, CUBES);
    nm = (CUBES > 1) ? $sformatf("%0dx%0dx%0dx%0d", R, C, P, CUBES) : $sformatf("%0dx%0dx%0d", R, C, P);
    wait (go);
    void'($urandom(SEED));
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(ref_m.K == K_EXP, $sformatf("%s: %0d information bits, expected %0d", nm, ref_m.K, K_EXP));
    check(N == N_EXP, $sformatf("%s: %0d channel bits, expected %0d", nm, N, N_EXP));
    block(MOD_ANTIPODAL, 15.0, 16, $sformatf("%s antipodal", nm));
    block(MOD_8PSK, 12.0, 16, $sformatf("%s 8PSK", nm));
    block(MOD_16QAM, 11.0, 16, $sformatf("%s 16QAM", nm));
    block(MOD_ANTIPODAL, 40.0, 2, $sformatf("%s antipodal heavy noise", nm));
    check(n_antipodal > 0 && n_psk > 0 && n_qam > 0, "all modulations exercised");
    check(n_limit > 0, "cycle-limit stop exercised");
    check(n_corrected > 0, "channel errors corrected");
    $display("%s mechanisms: antipodal=%0d 8psk=%0d qam=%0d padded=%0d early_stop=%0d limit_stop=%0d corrected=%0d",
             nm, n_antipodal, n_psk, n_qam, n_padded, n_early, n_limit, n_corrected);
    done = 1;
  end
endmodule
