// tb_hc_demapper: checks the 16QAM starting LLRs. The expected value of
// each bit is computed here by brute force from the printed Gray
// constellation: (nearest squared distance among points with a 1) minus
// (nearest among points with a 0), shifted right by 6 and saturated. Also
// checks the sign convention at every constellation point ("0" positive)
// and the one-clock latency.
module tb_hc_demapper;
  import hc_pkg::*;

  localparam int A = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [7:0] in_i = '0, in_q = '0;
  llr_t out_llr [4];

  hc_demapper dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  string qam_rows[4] = '{"1101 1001 1000 1100", "0101 0001 0000 0100",
                         "0111 0011 0010 0110", "1111 1011 1010 1110"};

  function automatic int label_of(int r, int c);
    int v = 0;
    for (int i = 0; i < 4; i++) v = v * 2 + (qam_rows[r][c * 5 + i] == "1");
    return v;
  endfunction

  function automatic int expect_llr(int x, int y, int b);
    int d0 = 1 << 30, d1 = 1 << 30, d, v;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      d = (x - (2 * c - 3) * A) ** 2 + (y - (3 - 2 * r) * A) ** 2;
      if ((label_of(r, c) >> b) & 1) begin if (d < d1) d1 = d; end
      else begin if (d < d0) d0 = d; end
    end
    v = (d1 - d0) >>> 6;
    if (v > 511) v = 511;
    if (v < -511) v = -511;
    return v;
  endfunction

  task automatic one(int x, int y, bit at_point, int lab);
    in_valid = 1; in_i = 8'(x); in_q = 8'(y);
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "out_valid one clock after in_valid");
    for (int b = 0; b < 4; b++) begin
      check(int'(out_llr[b]) == expect_llr(x, y, b),
            $sformatf("(%0d,%0d) bit %0d: got %0d exp %0d", x, y, b, out_llr[b], expect_llr(x, y, b)));
      if (at_point) check((out_llr[b] < 0) == ((lab >> b) & 1), "sign at constellation point");
    end
    @(negedge clk);
    check(!out_valid, "out_valid drops");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      one((2 * c - 3) * A, (3 - 2 * r) * A, 1, label_of(r, c));
    for (int t = 0; t < 500; t++)
      one(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
