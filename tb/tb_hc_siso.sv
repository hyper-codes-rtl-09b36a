// tb_hc_siso: streams random parity equations of length 2..18 into the SISO
// core and compares the compressed record (min, second min, position of the
// min, parity, sign word) with values computed here, including the
// thesis' five-element example and equations with tied minima.
module tb_hc_siso;
  import hc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0;
  logic [4:0] in_k = '0;
  llr_t in_x = '0;
  mag_t min1, min2;
  logic [4:0] loc;
  logic parity;
  logic [17:0] signs;

  hc_siso dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic one(input int x[$]);
    int mn = 1 << 30, mn2 = 1 << 30, lc = 0, par = 0, m;
    logic [17:0] sg = '0;
    foreach (x[k]) begin
      m = x[k] < 0 ? -x[k] : x[k];
      if (m < mn) begin mn = m; lc = k; end
      par ^= (x[k] < 0);
      sg[k] = (x[k] < 0);
    end
    foreach (x[k]) begin
      m = x[k] < 0 ? -x[k] : x[k];
      if (k != lc && m < mn2) mn2 = m;
    end
    foreach (x[k]) begin
      in_valid = 1; in_first = (k == 0); in_k = 5'(k); in_x = llr_t'(x[k]);
      @(negedge clk);
    end
    in_valid = 0;
    // Idle clocks must not disturb the record.
    @(negedge clk);
    check(int'(min1) == mn && int'(min2) == mn2 && int'(loc) == lc && parity == par[0] && signs == sg,
          $sformatf("len %0d: got %0d %0d %0d %0d %h exp %0d %0d %0d %0d %h", x.size(), min1, min2,
                    loc, parity, signs, mn, mn2, lc, par, sg));
  endtask

  initial begin
    int x[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    x = '{25, 259, -106, -158, -511};  // the thesis' example times 200, last value clipped
    one(x);
    x = '{5, -5, 7, 5};  // tied minimum: first position wins, min2 = 5
    one(x);
    x = '{0, -1};
    one(x);
    for (int t = 0; t < 300; t++) begin
      int len = $urandom_range(2, 18);
      x.delete();
      for (int k = 0; k < len; k++) x.push_back(int'($urandom_range(0, 1022)) - 511);
      one(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
