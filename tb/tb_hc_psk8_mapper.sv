// tb_hc_psk8_mapper: checks every 8PSK label against points computed here
// with real trigonometry (radius 64, multiples of 45 degrees, rounded to the
// nearest integer) and the Gray sequence 000 001 011 010 110 111 101 100
// around the circle; also checks that neighbours differ in one bit and that
// all points are distinct.
module tb_hc_psk8_mapper;
  localparam int R = 64;
  logic [2:0] bits;
  logic signed [7:0] out_i, out_q;

  hc_psk8_mapper dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int gray_seq[8] = '{0, 1, 3, 2, 6, 7, 5, 4};
  int xs[8], ys[8];

  initial begin
    for (int m = 0; m < 8; m++) begin
      real ang;
      int ex, ey;
      ang = 3.14159265358979 * m / 4.0;
      ex = int'($rtoi(R * $cos(ang) + ((R * $cos(ang)) < 0 ? -0.5 : 0.5)));
      ey = int'($rtoi(R * $sin(ang) + ((R * $sin(ang)) < 0 ? -0.5 : 0.5)));
      bits = 3'(gray_seq[m]); #1;
      xs[m] = out_i; ys[m] = out_q;
      check(int'(out_i) == ex && int'(out_q) == ey,
            $sformatf("label %b -> (%0d,%0d), expected (%0d,%0d)", bits, out_i, out_q, ex, ey));
      check($countones(3'(gray_seq[m] ^ gray_seq[(m + 1) % 8])) == 1, "Gray around the circle");
    end
    for (int a = 0; a < 8; a++) for (int b = a + 1; b < 8; b++)
      check(xs[a] != xs[b] || ys[a] != ys[b], "points distinct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
