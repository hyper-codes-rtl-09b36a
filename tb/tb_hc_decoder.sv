// tb_hc_decoder: checks the iterative decoder bit-exactly against the
// uncompressed reference model of hc_ref_pkg on a 5x5x6 / 6x6x7 code whose
// even sides exercise the roll rule. Scenarios: a noisy codeword that
// converges early, pure noise that runs to the cycle limit, saturating
// inputs, and a zero cycle limit. Every final LLR, the stop cycle, the
// convergence flag and the clock count (two clocks per equation element
// processed) are compared.
module tb_hc_decoder;
  import hc_pkg::*;
  import hc_ref_pkg::*;

  localparam int R = 6, C = 6, P = 7;
  localparam int N = R * C * P;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ld_valid = 0, start = 0;
  llr_t          ld_llr = '0;
  logic [7:0]    num_cycles = '0;
  logic          busy, done, converged, rd_bit;
  logic [7:0]    cycles_run;
  logic [AW-1:0] rd_addr = '0;
  llr_t          rd_llr;

  hc_decoder #(.ROWS(R), .COLS(C), .PLANES(P)) dut (.*);

  int checks = 0, failures = 0;
  hc_ref ref_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int llr_in[$], input int ncyc, string name);
    int ref_llr[$];
    int ref_cyc, clocks, bad;
    bit ref_conv;
    ref_llr = llr_in;
    ref_m.decode(ref_llr, ncyc, ref_cyc, ref_conv);
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      ld_valid = 1; ld_llr = llr_t'(llr_in[a]);
      @(negedge clk);
    end
    ld_valid = 0;
    start = 1; num_cycles = 8'(ncyc);
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done) begin @(negedge clk); clocks++; end
    check(cycles_run == 8'(ref_cyc), $sformatf("%s cycles_run %0d ref %0d", name, cycles_run, ref_cyc));
    check(converged == ref_conv, $sformatf("%s converged %0d ref %0d", name, converged, ref_conv));
    check(clocks == 2 * ref_m.last_elems + 1,
          $sformatf("%s clocks %0d expected %0d", name, clocks, 2 * ref_m.last_elems + 1));
    bad = 0;
    for (int a = 0; a < N; a++) begin
      rd_addr = AW'(a); #1;
      if (int'(rd_llr) != ref_llr[a]) bad++;
      if (rd_bit != (ref_llr[a] < 0)) bad++;
    end
    check(bad == 0, $sformatf("%s %0d LLR mismatches", name, bad));
    $display("%s: cycles=%0d converged=%0d clocks=%0d", name, cycles_run, converged, clocks);
  endtask

  initial begin
    bit info[$], cw[$];
    int llr[$];
    int nerr, derr;
    ref_m = new(R, C, P);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1: noisy codeword, converges before the limit and corrects errors.
    for (int n = 0; n < ref_m.K; n++) info.push_back(1'($urandom));
    ref_m.encode(info, cw);
    check(ref_m.bad_eqs(cw) == 0, "reference codeword");
    llr.delete(); nerr = 0;
    for (int a = 0; a < N; a++) begin
      int v;
      v = (cw[a] ? -24 : 24) + int'($urandom_range(0, 60)) - 30;
      if ((v < 0) != cw[a]) nerr++;
      llr.push_back(v);
    end
    run(llr, 12, "noisy codeword");
    check(converged, "noisy codeword converged");
    derr = 0;
    for (int a = 0; a < N; a++) begin rd_addr = AW'(a); #1; if (rd_bit != cw[a]) derr++; end
    $display("channel errors %0d, decoded errors %0d", nerr, derr);
    check(nerr > 0 && derr == 0, "errors corrected");

    // 2: pure noise, runs to the cycle limit.
    llr.delete();
    for (int a = 0; a < N; a++) llr.push_back(int'($urandom_range(0, 200)) - 100);
    run(llr, 3, "noise");
    check(!converged && cycles_run == 3, "noise hits limit");

    // 3: saturating inputs.
    llr.delete();
    for (int a = 0; a < N; a++) llr.push_back((cw[a] ? -500 : 500) + int'($urandom_range(0, 22)) - 11);
    llr[7] = -llr[7];
    run(llr, 5, "saturating");

    // 4: zero cycles.
    llr.delete();
    for (int a = 0; a < N; a++) llr.push_back(a % 100);
    run(llr, 0, "zero cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
