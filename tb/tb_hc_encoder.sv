// tb_hc_encoder: encodes random blocks with a 6x6x7 code (even sides, roll
// rule) and with the default 17x17x18 code and compares every channel bit
// with the reference encoder, which evaluates row, column, depth and roll
// parity directly. Also checks that every parity equation of the code is
// even, the stream lengths, out_last, and the encode time (one clock per
// equation element). A third instance encodes the four-dimensional 4x4x4x5
// code (81 information bits, three information cubes) the same way.
module tb_hc_encoder;
  import hc_pkg::*;
  import hc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic s_iv = 0, s_ir, s_ib = 0, s_ov, s_or = 1, s_ob, s_ol, s_enc;
  hc_encoder #(.ROWS(6), .COLS(6), .PLANES(7)) u_s (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_bit(s_ib),
    .out_valid(s_ov), .out_ready(s_or), .out_bit(s_ob), .out_last(s_ol), .encoding(s_enc));

  logic d_iv = 0, d_ir, d_ib = 0, d_ov, d_or = 1, d_ob, d_ol, d_enc;
  hc_encoder u_d (
    .clk, .rst_n, .in_valid(d_iv), .in_ready(d_ir), .in_bit(d_ib),
    .out_valid(d_ov), .out_ready(d_or), .out_bit(d_ob), .out_last(d_ol), .encoding(d_enc));

  logic q_iv = 0, q_ir, q_ib = 0, q_ov, q_or = 1, q_ob, q_ol, q_enc;
  hc_encoder #(.ROWS(4), .COLS(4), .PLANES(4), .CUBES(5)) u_q (
    .clk, .rst_n, .in_valid(q_iv), .in_ready(q_ir), .in_bit(q_ib),
    .out_valid(q_ov), .out_ready(q_or), .out_bit(q_ob), .out_last(q_ol), .encoding(q_enc));

  initial begin
    hc_ref rs, rd, rq;
    bit info[$], cw[$], got[$];
    int enc_clocks, bad;
    rs = new(6, 6, 7);
    rd = new(17, 17, 18);
    rq = new(4, 4, 4, 5);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int blk = 0; blk < 3; blk++) begin
      info.delete(); got.delete();
      for (int n = 0; n < rs.K; n++) info.push_back(1'($urandom));
      rs.encode(info, cw);
      foreach (info[n]) begin
        s_iv = 1; s_ib = info[n];
        while (!s_ir) @(negedge clk);
        @(negedge clk);
      end
      s_iv = 0;
      enc_clocks = 0;
      while (s_enc) begin @(negedge clk); enc_clocks++; end
      check(enc_clocks == rs.sum_len(), $sformatf("6x6x7 encode clocks %0d", enc_clocks));
      // Output with back-pressure on every third clock.
      for (int t = 0; got.size() < rs.N; t++) begin
        s_or = (t % 3 != 2);
        if (s_ov && s_or) begin
          got.push_back(s_ob);
          check(s_ol == (got.size() == rs.N), "out_last position");
        end
        @(negedge clk);
      end
      s_or = 1;
      bad = 0;
      foreach (cw[a]) if (got[a] != cw[a]) bad++;
      check(bad == 0, $sformatf("6x6x7 block %0d: %0d bits differ", blk, bad));
      check(rs.bad_eqs(got) == 0, "6x6x7 all equations even");
      check(s_ir, "back to load");
    end

    info.delete(); got.delete();
    for (int n = 0; n < rd.K; n++) info.push_back(1'($urandom));
    rd.encode(info, cw);
    foreach (info[n]) begin
      d_iv = 1; d_ib = info[n];
      while (!d_ir) @(negedge clk);
      @(negedge clk);
    end
    d_iv = 0;
    enc_clocks = 0;
    while (d_enc) begin @(negedge clk); enc_clocks++; end
    check(enc_clocks == 20519, $sformatf("17x17x18 encode clocks %0d", enc_clocks));
    while (got.size() < rd.N) begin
      if (d_ov) got.push_back(d_ob);
      @(negedge clk);
    end
    bad = 0;
    foreach (cw[a]) if (got[a] != cw[a]) bad++;
    check(bad == 0, $sformatf("17x17x18: %0d bits differ", bad));
    check(rd.bad_eqs(got) == 0, "17x17x18 all equations even");
    check(rd.K == 4096 && rd.N == 5202, "default block size");

    for (int blk = 0; blk < 3; blk++) begin
      info.delete(); got.delete();
      for (int n = 0; n < rq.K; n++) info.push_back(1'($urandom));
      rq.encode(info, cw);
      foreach (info[n]) begin
        q_iv = 1; q_ib = info[n];
        while (!q_ir) @(negedge clk);
        @(negedge clk);
      end
      q_iv = 0;
      enc_clocks = 0;
      while (q_enc) begin @(negedge clk); enc_clocks++; end
      check(enc_clocks == rq.sum_len(), $sformatf("4x4x4x5 encode clocks %0d", enc_clocks));
      while (got.size() < rq.N) begin
        if (q_ov) begin
          got.push_back(q_ob);
          check(q_ol == (got.size() == rq.N), "4x4x4x5 out_last position");
        end
        @(negedge clk);
      end
      bad = 0;
      foreach (cw[a]) if (got[a] != cw[a]) bad++;
      check(bad == 0, $sformatf("4x4x4x5 block %0d: %0d bits differ", blk, bad));
      check(rq.bad_eqs(got) == 0, "4x4x4x5 all equations even");
    end
    check(rq.K == 81 && rq.N == 320 && rq.sum_len() == 1536, "4x4x4x5 block size");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
