// hc_ref_pkg: behavioural reference of the hyper-code for the testbenches.
//
// It builds the parity equations of a ROWS x COLS x PLANES code directly
// from their definitions (row, column and depth parity of the cube, roll
// parity with plane k rolled by (k mod ROWS, roll rule) and the parity bit at
// (i,j) of the last plane), encodes by evaluating the parities plane by
// plane, and decodes with an uncompressed max-log-APP model that stores one
// extrinsic value and one sign per equation element. The fixed-point rules
// (symmetric saturation to +/-511, scaling by (m>>1)+(m>>3) of the
// magnitude) are those the RTL documents.
//
// With a fourth argument Q > 1 it builds the four-dimensional code instead:
// Q cubes of ROWS x COLS x PLANES, cube Q-2 holding the parity across cubes
// and cube Q-1 the roll parity, with the five equation sets row, column,
// depth, cube and roll.
package hc_ref_pkg;

  localparam int LMAX = 511;

  function automatic int sat(input int v);
    if (v > LMAX) return LMAX;
    if (v < -LMAX) return -LMAX;
    return v;
  endfunction

  function automatic int scl(input int m);
    return (m >> 1) + (m >> 3);
  endfunction

  class hc_ref;
    int R, C, P, Q, N, K, NSETS;
    int eq_start[$];
    int eq_len[$];
    int eq_set[$];
    int elem[$];
    int rr[$], rc[$];
    int last_elems;  // equation elements processed by the last decode

    function new(int rows, int cols, int planes, int cubes = 1);
      R = rows; C = cols; P = planes; Q = cubes;
      N = R * C * P * Q;
      if (Q > 1) begin
        K = (R - 1) * (C - 1) * (P - 1) * (Q - 2);
        NSETS = 5;
        build4();
      end else begin
        K = (R - 1) * (C - 1) * (P - 2);
        NSETS = 4;
        build();
      end
    endfunction

    function int idx(int p, int r, int c);
      return (p * R + r) * C + c;
    endfunction

    function int idx4(int q, int p, int r, int c);
      return ((q * P + p) * R + r) * C + c;
    endfunction

    // Four-dimensional rolls of cube k (of n = Q - 1 rolled cubes): planes
    // k, rows by the three-dimensional rule, columns 2k (first half) or
    // 2k+1 (second half) for an even side, k for an odd one.
    int qd[$], qr[$], qc[$];
    function void rolls4();
      int n = Q - 1;
      qd.delete(); qr.delete(); qc.delete();
      for (int k = 0; k < n; k++) begin
        qd.push_back(k % P);
        if ((R % 2) != 0 || k < R / 2) qr.push_back(k % R);
        else if (k == n - 1) qr.push_back(R / 2);
        else qr.push_back((k + 1) % R);
        if ((C % 2) != 0) qc.push_back(k % C);
        else if (k < (n + 1) / 2) qc.push_back((2 * k) % C);
        else qc.push_back((2 * k + 1) % C);
      end
    endfunction

    function int roll4_addr(int k, int p, int r, int c);
      return idx4(k, (p + qd[k]) % P, (r + qr[k]) % R, (c + qc[k]) % C);
    endfunction

    function void build4();
      int q[$];
      rolls4();
      for (int u = 0; u < Q; u++) for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) begin
        q.delete(); for (int c = 0; c < C; c++) q.push_back(idx4(u, p, r, c)); add_eq(0, q);
      end
      for (int u = 0; u < Q; u++) for (int p = 0; p < P; p++) for (int c = 0; c < C; c++) begin
        q.delete(); for (int r = 0; r < R; r++) q.push_back(idx4(u, p, r, c)); add_eq(1, q);
      end
      for (int u = 0; u < Q; u++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        q.delete(); for (int p = 0; p < P; p++) q.push_back(idx4(u, p, r, c)); add_eq(2, q);
      end
      for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        q.delete(); for (int u = 0; u < Q - 1; u++) q.push_back(idx4(u, p, r, c)); add_eq(3, q);
      end
      for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        q.delete();
        for (int k = 0; k < Q - 1; k++) q.push_back(roll4_addr(k, p, r, c));
        q.push_back(idx4(Q - 1, p, r, c));
        add_eq(4, q);
      end
    endfunction

    // Roll amounts: diagonal when a side is odd, otherwise the last half of
    // the column rolls shifted by one (case "b" of the thesis for n = 4).
    function void rolls();
      int np = P - 1;
      rr.delete(); rc.delete();
      for (int k = 0; k < np; k++) begin
        rr.push_back(k % R);
        if ((R % 2) != 0 || (C % 2) != 0 || k < C / 2) rc.push_back(k % C);
        else if (k == np - 1) rc.push_back(C / 2);
        else rc.push_back((k + 1) % C);
      end
    endfunction

    function void add_eq(int set, int q[$]);
      eq_start.push_back(elem.size());
      eq_len.push_back(q.size());
      eq_set.push_back(set);
      foreach (q[i]) elem.push_back(q[i]);
    endfunction

    function void build();
      int q[$];
      rolls();
      for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) begin
        q.delete(); for (int c = 0; c < C; c++) q.push_back(idx(p, r, c)); add_eq(0, q);
      end
      for (int p = 0; p < P; p++) for (int c = 0; c < C; c++) begin
        q.delete(); for (int r = 0; r < R; r++) q.push_back(idx(p, r, c)); add_eq(1, q);
      end
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        q.delete(); for (int p = 0; p < P - 1; p++) q.push_back(idx(p, r, c)); add_eq(2, q);
      end
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
        q.delete();
        for (int k = 0; k < P - 1; k++) q.push_back(idx(k, (i + rr[k]) % R, (j + rc[k]) % C));
        q.push_back(idx(P - 1, i, j));
        add_eq(3, q);
      end
    endfunction

    function int num_eq();
      return eq_len.size();
    endfunction

    function int sum_len();
      return elem.size();
    endfunction

    // Position of info bit n (in load order).
    function int info_addr(int n);
      int c = n % (C - 1);
      int r = (n / (C - 1)) % (R - 1);
      int p = (Q > 1) ? (n / ((C - 1) * (R - 1))) % (P - 1) : n / ((C - 1) * (R - 1));
      int u = (Q > 1) ? n / ((C - 1) * (R - 1) * (P - 1)) : 0;
      return (Q > 1) ? idx4(u, p, r, c) : idx(p, r, c);
    endfunction

    // Four-dimensional encoding: each information cube gets row, column and
    // depth parity, cube Q-2 the parity across cubes, then the roll cube.
    function void encode4(input bit info[$], output bit cw[$]);
      cw.delete();
      for (int a = 0; a < N; a++) cw.push_back(0);
      foreach (info[n]) cw[info_addr(n)] = info[n];
      for (int u = 0; u < Q - 2; u++) begin
        for (int p = 0; p < P - 1; p++) begin
          for (int r = 0; r < R - 1; r++) begin
            bit s = 0; for (int c = 0; c < C - 1; c++) s ^= cw[idx4(u, p, r, c)];
            cw[idx4(u, p, r, C - 1)] = s;
          end
          for (int c = 0; c < C; c++) begin
            bit s = 0; for (int r = 0; r < R - 1; r++) s ^= cw[idx4(u, p, r, c)];
            cw[idx4(u, p, R - 1, c)] = s;
          end
        end
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          bit s = 0; for (int p = 0; p < P - 1; p++) s ^= cw[idx4(u, p, r, c)];
          cw[idx4(u, P - 1, r, c)] = s;
        end
      end
      for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        bit s = 0; for (int u = 0; u < Q - 2; u++) s ^= cw[idx4(u, p, r, c)];
        cw[idx4(Q - 2, p, r, c)] = s;
      end
      for (int p = 0; p < P; p++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        bit s = 0; for (int k = 0; k < Q - 1; k++) s ^= cw[roll4_addr(k, p, r, c)];
        cw[idx4(Q - 1, p, r, c)] = s;
      end
    endfunction

    // Encode by direct parity evaluation: row parity, column parity, depth
    // parity plane, then the roll plane.
    function void encode(input bit info[$], output bit cw[$]);
      if (Q > 1) begin encode4(info, cw); return; end
      cw.delete();
      for (int a = 0; a < N; a++) cw.push_back(0);
      foreach (info[n]) cw[info_addr(n)] = info[n];
      for (int p = 0; p < P - 2; p++) begin
        for (int r = 0; r < R - 1; r++) begin
          bit s = 0; for (int c = 0; c < C - 1; c++) s ^= cw[idx(p, r, c)];
          cw[idx(p, r, C - 1)] = s;
        end
        for (int c = 0; c < C; c++) begin
          bit s = 0; for (int r = 0; r < R - 1; r++) s ^= cw[idx(p, r, c)];
          cw[idx(p, R - 1, c)] = s;
        end
      end
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        bit s = 0; for (int p = 0; p < P - 2; p++) s ^= cw[idx(p, r, c)];
        cw[idx(P - 2, r, c)] = s;
      end
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
        bit s = 0;
        for (int k = 0; k < P - 1; k++) s ^= cw[idx(k, (i + rr[k]) % R, (j + rc[k]) % C)];
        cw[idx(P - 1, i, j)] = s;
      end
    endfunction

    // Number of equations whose parity fails for a hard-decision word.
    function int bad_eqs(input bit cw[$]);
      int bad = 0;
      for (int e = 0; e < num_eq(); e++) begin
        bit s = 0;
        for (int k = 0; k < eq_len[e]; k++) s ^= cw[elem[eq_start[e] + k]];
        if (s) bad++;
      end
      return bad;
    endfunction

    // Uncompressed max-log-APP decoder with the same schedule and stopping
    // rule as the RTL. llr is updated in place.
    function void decode(ref int llr[$], input int ncyc, output int cycles_run,
                         output bit converged);
      int ext[$], sg[$];
      int x[$];
      int cnt;
      bit flag;
      converged = 0;
      cycles_run = 0;
      cnt = 0;
      last_elems = 0;
      for (int a = 0; a < elem.size(); a++) begin ext.push_back(0); sg.push_back(0); end
      for (int cy = 0; cy < ncyc; cy++) begin
        cycles_run = cy + 1;
        flag = 1;
        for (int e = 0; e < num_eq(); e++) begin
          int b = eq_start[e], L = eq_len[e];
          int mn, mn2, loc, par, m;
          bit changed = 0;
          x.delete();
          for (int k = 0; k < L; k++) x.push_back(sat(llr[elem[b + k]] - ext[b + k]));
          par = 0; mn = 1 << 30; mn2 = 1 << 30; loc = 0;
          for (int k = 0; k < L; k++) begin
            m = x[k] < 0 ? -x[k] : x[k];
            if (x[k] < 0) par ^= 1;
            if (m < mn) begin loc = k; mn = m; end
          end
          for (int k = 0; k < L; k++) begin
            m = x[k] < 0 ? -x[k] : x[k];
            if (k != loc && m < mn2) mn2 = m;
          end
          for (int k = 0; k < L; k++) begin
            int mag = scl(k == loc ? mn2 : mn);
            int neg = int'(x[k] < 0) ^ par;
            int s = int'(x[k] < 0);
            if (cy > 0 && s != sg[b + k]) changed = 1;
            sg[b + k] = s;
            ext[b + k] = (neg != 0) ? -mag : mag;
            llr[elem[b + k]] = sat(x[k] + ext[b + k]);
          end
          last_elems += L;
          if (par != 0 || changed) flag = 0;
          if (e == num_eq() - 1 || eq_set[e + 1] != eq_set[e]) begin
            cnt = flag ? cnt + 1 : 0;
            flag = 1;
            if (cnt == NSETS) begin converged = 1; return; end
          end
        end
      end
    endfunction
  endclass

endpackage
