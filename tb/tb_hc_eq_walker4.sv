// tb_hc_eq_walker4: walks every equation of two four-dimensional codes and
// compares set, element address, equation number, length and flags with the
// equation list built by hc_ref_pkg: a 4x4x4x5 code (four rolled cubes of
// even side, whose rolls must be (0,0,0) (1,1,2) (2,3,1) (3,2,3) as in the
// thesis' 4x4x4x4 example) and the 8x8x8x9 code with 7^4 information bits.
// For both it also checks that no two rolled cubes differ by half a side in
// more than one dimension, that every channel bit is covered by exactly
// four equations (five for the rolled cubes' bits), and that rewind and the
// wrap to the first equation work.
module tb_hc_eq_walker4;
  import hc_pkg::*;
  import hc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Small code.
  logic s_clear = 0, s_step = 0, s_rewind = 0;
  logic [2:0] s_set; logic [2:0] s_k, s_len; logic [8:0] s_addr; logic [8:0] s_eq;
  logic s_lk, s_ls, s_le;
  hc_eq_walker4 #(.ROWS(4), .COLS(4), .PLANES(4), .CUBES(5)) u_s (
    .clk, .rst_n, .clear(s_clear), .step(s_step), .rewind(s_rewind),
    .set(s_set), .k(s_k), .len(s_len), .addr(s_addr), .eq_id(s_eq),
    .last_k(s_lk), .last_in_set(s_ls), .last_eq(s_le));

  // 8x8x8x9 code.
  logic d_clear = 0, d_step = 0, d_rewind = 0;
  logic [2:0] d_set; logic [3:0] d_k, d_len; logic [12:0] d_addr; logic [11:0] d_eq;
  logic d_lk, d_ls, d_le;
  hc_eq_walker4 #(.ROWS(8), .COLS(8), .PLANES(8), .CUBES(9)) u_d (
    .clk, .rst_n, .clear(d_clear), .step(d_step), .rewind(d_rewind),
    .set(d_set), .k(d_k), .len(d_len), .addr(d_addr), .eq_id(d_eq),
    .last_k(d_lk), .last_in_set(d_ls), .last_eq(d_le));

  // Roll table properties of a reference model.
  task automatic check_rolls(hc_ref m, string name);
    int n = m.Q - 1;
    for (int a = 0; a < n; a++) for (int b = a + 1; b < n; b++) begin
      int halves = 0;
      if (2 * ((m.qd[a] - m.qd[b] + m.P) % m.P) == m.P) halves++;
      if (2 * ((m.qr[a] - m.qr[b] + m.R) % m.R) == m.R) halves++;
      if (2 * ((m.qc[a] - m.qc[b] + m.C) % m.C) == m.C) halves++;
      check(halves <= 1, $sformatf("%s: cubes %0d and %0d differ by half a side %0d times", name, a, b, halves));
      check(m.qd[a] != m.qd[b] && m.qr[a] != m.qr[b] && m.qc[a] != m.qc[b],
            $sformatf("%s: cubes %0d and %0d share a roll", name, a, b));
    end
    begin
      int cov[$];
      for (int a = 0; a < m.N; a++) cov.push_back(0);
      foreach (m.elem[i]) cov[m.elem[i]]++;
      foreach (cov[a]) check(cov[a] == ((a < (m.Q - 1) * m.P * m.R * m.C) ? 5 : 4),
                             $sformatf("%s: bit %0d in %0d equations", name, a, cov[a]));
    end
  endtask

  initial begin
    hc_ref ms, md;
    int e, n, bad, L;
    ms = new(4, 4, 4, 5);
    md = new(8, 8, 8, 9);
    check(ms.qd[1] == 1 && ms.qr[1] == 1 && ms.qc[1] == 2 &&
          ms.qd[2] == 2 && ms.qr[2] == 3 && ms.qc[2] == 1 &&
          ms.qd[3] == 3 && ms.qr[3] == 2 && ms.qc[3] == 3, "4x4x4x5 rolls match the 4x4x4x4 example");
    check(md.K == 2401 && md.N == 4608, "8x8x8x9 size");
    check_rolls(ms, "4x4x4x5");
    check_rolls(md, "8x8x8x9");

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Full walk of the small code, with a rewind in the middle of every
    // 7th equation.
    bad = 0;
    for (e = 0; e < ms.num_eq(); e++) begin
      L = ms.eq_len[e];
      for (int k = 0; k < L; k++) begin
        if (int'(s_set) != ms.eq_set[e] || int'(s_addr) != ms.elem[ms.eq_start[e] + k] ||
            int'(s_eq) != e || int'(s_len) != L || int'(s_k) != k || s_lk != (k == L - 1) ||
            s_ls != (e == ms.num_eq() - 1 || ms.eq_set[e + 1] != ms.eq_set[e]) ||
            s_le != (e == ms.num_eq() - 1)) begin
          bad++;
          if (bad < 5) $display("small eq %0d k %0d: set %0d addr %0d eq %0d len %0d, ref set %0d addr %0d",
                                e, k, s_set, s_addr, s_eq, s_len, ms.eq_set[e], ms.elem[ms.eq_start[e] + k]);
        end
        if (e % 7 == 3 && k == L - 2) begin
          s_rewind = 1; @(negedge clk); s_rewind = 0;
          check(s_k == 0 && int'(s_eq) == e, "small: rewind returns to element 0");
          s_step = 1; repeat (L - 2) @(negedge clk); s_step = 0;
        end
        s_step = 1; @(negedge clk); s_step = 0;
      end
    end
    check(bad == 0, $sformatf("small: %0d element mismatches", bad));
    check(s_eq == 0 && s_k == 0 && s_set == 0, "small: wraps to the first equation");
    n = 0;
    foreach (ms.eq_len[i]) n += ms.eq_len[i];
    check(ms.num_eq() == 3 * 5 * 16 + 2 * 64 && n == 3 * 5 * 64 + 4 * 64 + 5 * 64,
          "small: equation count and total length");

    // Full walk of the 8x8x8x9 code.
    bad = 0;
    d_step = 1;
    for (e = 0; e < md.num_eq(); e++) begin
      L = md.eq_len[e];
      for (int k = 0; k < L; k++) begin
        if (int'(d_set) != md.eq_set[e] || int'(d_addr) != md.elem[md.eq_start[e] + k] ||
            int'(d_eq) != e || int'(d_len) != L || d_lk != (k == L - 1) ||
            d_ls != (e == md.num_eq() - 1 || md.eq_set[e + 1] != md.eq_set[e]) ||
            d_le != (e == md.num_eq() - 1))
          bad++;
        @(negedge clk);
      end
    end
    d_step = 0;
    check(bad == 0, $sformatf("8x8x8x9: %0d element mismatches", bad));
    check(d_eq == 0 && d_k == 0 && d_set == 0, "8x8x8x9: wraps to the first equation");
    check(md.num_eq() == 9 * 64 * 3 + 2 * 512, "8x8x8x9: equation count");

    // Clear from the middle of the walk.
    d_step = 1; repeat (1000) @(negedge clk); d_step = 0;
    d_clear = 1; @(negedge clk); d_clear = 0;
    check(d_eq == 0 && d_k == 0 && d_set == 0 && d_addr == 0, "8x8x8x9: clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
