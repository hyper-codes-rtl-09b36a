// tb_hc_conv_test: drives scripted sequences of equation reports into the
// convergence test and checks when `hit` fires: only after four
// consecutive sets in which no equation had odd parity or a sign change,
// with the counter restarting after any failing set, and never on a set
// that itself fails.
module tb_hc_conv_test;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, eq_done = 0, eq_odd = 0, eq_changed = 0, set_done = 0;
  logic hit, converged;
  logic [2:0] count;

  hc_conv_test dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // One set of `n` equations; equation `bad_at` fails (odd or changed).
  task automatic set(int n, int bad_at, bit use_odd, bit exp_hit);
    bit saw_hit = 0;
    for (int e = 0; e < n; e++) begin
      eq_done = 1; set_done = (e == n - 1);
      eq_odd = use_odd && (e == bad_at);
      eq_changed = !use_odd && (e == bad_at);
      #1;
      if (hit) saw_hit = 1;
      @(negedge clk);
    end
    eq_done = 0; set_done = 0; eq_odd = 0; eq_changed = 0;
    check(saw_hit == exp_hit, $sformatf("hit %0d expected %0d", saw_hit, exp_hit));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    set(5, 2, 1, 0);   // odd parity: count 0
    check(count == 0, "count after failing set");
    set(5, -1, 0, 0);  // pass: 1
    set(3, -1, 0, 0);  // 2
    set(4, 3, 0, 0);   // sign change in last equation: back to 0
    check(count == 0, "count reset by sign change");
    set(5, -1, 0, 0);  // 1
    set(5, -1, 0, 0);  // 2
    set(5, -1, 0, 0);  // 3
    check(count == 3 && !converged, "three passing sets");
    set(5, 0, 1, 0);   // fourth set fails: no hit
    check(!converged, "no convergence after failing fourth set");
    repeat (3) set(2, -1, 0, 0);
    set(2, -1, 0, 1);  // fourth consecutive passing set: hit
    check(converged, "converged flag set");
    clear = 1; @(negedge clk); clear = 0;
    check(!converged && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
