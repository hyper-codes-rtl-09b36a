// tb_hc_psk8_demapper: checks the 8PSK starting LLRs against a brute-force
// model written here from first principles: points at radius 64 on
// multiples of 45 degrees (rounded), Gray labels 000 001 011 010 110 111
// 101 100 around the circle, LLR = (nearest squared distance among points
// with a 1) - (nearest among points with a 0), shifted right by 6 and
// saturated to +/-511. Also checks the sign at every point ("0" positive)
// and the one-clock latency.
module tb_hc_psk8_demapper;
  import hc_pkg::*;

  localparam int R = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [7:0] in_i = '0, in_q = '0;
  llr_t out_llr [3];

  hc_psk8_demapper dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int gray_seq[8] = '{0, 1, 3, 2, 6, 7, 5, 4};
  int px[8], py[8];

  function automatic int rnd(real v);
    return $rtoi(v + (v < 0 ? -0.5 : 0.5));
  endfunction

  function automatic int expect_llr(int x, int y, int b);
    int d0 = 1 << 30, d1 = 1 << 30, d, v;
    for (int m = 0; m < 8; m++) begin
      d = (x - px[m]) ** 2 + (y - py[m]) ** 2;
      if ((gray_seq[m] >> b) & 1) begin if (d < d1) d1 = d; end
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
    for (int b = 0; b < 3; b++) begin
      check(int'(out_llr[b]) == expect_llr(x, y, b),
            $sformatf("(%0d,%0d) bit %0d: got %0d exp %0d", x, y, b, out_llr[b], expect_llr(x, y, b)));
      if (at_point) check((out_llr[b] < 0) == ((lab >> b) & 1), "sign at constellation point");
    end
    @(negedge clk);
    check(!out_valid, "out_valid drops");
  endtask

  initial begin
    for (int m = 0; m < 8; m++) begin
      px[m] = rnd(R * $cos(3.14159265358979 * m / 4.0));
      py[m] = rnd(R * $sin(3.14159265358979 * m / 4.0));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int m = 0; m < 8; m++) one(px[m], py[m], 1, gray_seq[m]);
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
