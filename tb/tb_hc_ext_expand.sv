// tb_hc_ext_expand: checks the extrinsic value rebuilt from a compressed
// record against the max-log-APP rule: magnitude of the smallest other
// element scaled by 0.625 ((m>>1)+(m>>3)), sign of the element itself when
// the parity is even and inverted when odd. Includes the thesis' worked
// five-element example (in integer units) and random records.
module tb_hc_ext_expand;
  import hc_pkg::*;

  mag_t min1, min2;
  logic [4:0] loc, k;
  logic parity;
  logic [17:0] signs;
  llr_t ext;

  hc_ext_expand dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    // Inputs 123, 295, -128, -189, -347 (odd parity, min 123 at 0, min2 128).
    // Unscaled extrinsic would be -128, -123, +123, +123, +123.
    int exp_v[5] = '{-80, -76, 76, 76, 76};
    min1 = 9'd123; min2 = 9'd128; loc = 0; parity = 1; signs = 18'b11100;
    for (int i = 0; i < 5; i++) begin
      k = 5'(i); #1;
      check(int'(ext) == exp_v[i], $sformatf("example element %0d: %0d", i, ext));
    end
    for (int t = 0; t < 2000; t++) begin
      int m, e;
      min1 = mag_t'($urandom); min2 = mag_t'($urandom); loc = 5'($urandom_range(0, 17));
      parity = 1'($urandom); signs = 18'($urandom); k = 5'($urandom_range(0, 17));
      #1;
      m = (k == loc) ? int'(min2) : int'(min1);
      e = (m / 2) + (m / 8);
      if (signs[k] ^ parity) e = -e;
      check(int'(ext) == e, $sformatf("random %0d: got %0d exp %0d", t, ext, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
