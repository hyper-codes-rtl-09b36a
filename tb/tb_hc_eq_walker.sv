// tb_hc_eq_walker: walks every equation of two codes and compares set,
// element address, equation number, length and flags with the equation list
// built by hc_ref_pkg: a 4x4x5 code (even sides, roll rule (0,0) (1,1)
// (2,3) (3,2) as in the thesis' 3x3x3/4x4x4 example) and the default
// 17x17x18 code (odd sides, plain diagonal parity). Also checks rewind and
// that the walk wraps to the first equation.
module tb_hc_eq_walker;
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
  hc_set_e s_set; logic [2:0] s_k, s_len; logic [6:0] s_addr; logic [6:0] s_eq;
  logic s_lk, s_ls, s_le;
  hc_eq_walker #(.ROWS(4), .COLS(4), .PLANES(5)) u_s (
    .clk, .rst_n, .clear(s_clear), .step(s_step), .rewind(s_rewind),
    .set(s_set), .k(s_k), .len(s_len), .addr(s_addr), .eq_id(s_eq),
    .last_k(s_lk), .last_in_set(s_ls), .last_eq(s_le));

  // Default code.
  logic d_clear = 0, d_step = 0, d_rewind = 0;
  hc_set_e d_set; logic [4:0] d_k, d_len; logic [12:0] d_addr; logic [10:0] d_eq;
  logic d_lk, d_ls, d_le;
  hc_eq_walker u_d (
    .clk, .rst_n, .clear(d_clear), .step(d_step), .rewind(d_rewind),
    .set(d_set), .k(d_k), .len(d_len), .addr(d_addr), .eq_id(d_eq),
    .last_k(d_lk), .last_in_set(d_ls), .last_eq(d_le));

  initial begin
    hc_ref rs, rd;
    int bad;
    rs = new(4, 4, 5);
    rd = new(17, 17, 18);
    check(rs.rc[0] == 0 && rs.rc[1] == 1 && rs.rc[2] == 3 && rs.rc[3] == 2, "reference roll rule");
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Small code, element by element.
    bad = 0;
    @(negedge clk);
    for (int e = 0; e < rs.num_eq(); e++) begin
      for (int k = 0; k < rs.eq_len[e]; k++) begin
        if (s_addr != 7'(rs.elem[rs.eq_start[e] + k]) || int'(s_set) != rs.eq_set[e] ||
            int'(s_eq) != e || int'(s_k) != k || int'(s_len) != rs.eq_len[e] ||
            s_lk != (k == rs.eq_len[e] - 1) ||
            s_le != (e == rs.num_eq() - 1) ||
            s_ls != (e == rs.num_eq() - 1 || rs.eq_set[e + 1] != rs.eq_set[e])) bad++;
        s_step = 1; @(negedge clk); s_step = 0;
      end
    end
    check(bad == 0, $sformatf("4x4x5: %0d mismatching elements", bad));
    check(s_eq == 0 && s_k == 0 && s_set == SET_ROW, "4x4x5 wraps to first equation");

    // Rewind inside an equation, then clear.
    s_step = 1; repeat (3) @(negedge clk); s_step = 0;
    s_rewind = 1; @(negedge clk); s_rewind = 0;
    check(s_k == 0 && s_eq == 0, "rewind returns to element 0");
    s_step = 1; repeat (6) @(negedge clk); s_step = 0;
    check(s_eq == 1, "second equation reached");
    s_clear = 1; @(negedge clk); s_clear = 0;
    check(s_eq == 0 && s_k == 0, "clear returns to start");

    // Default code.
    bad = 0;
    for (int e = 0; e < rd.num_eq(); e++) begin
      for (int k = 0; k < rd.eq_len[e]; k++) begin
        if (d_addr != 13'(rd.elem[rd.eq_start[e] + k]) || int'(d_set) != rd.eq_set[e] ||
            int'(d_eq) != e || d_lk != (k == rd.eq_len[e] - 1)) bad++;
        d_step = 1; @(negedge clk); d_step = 0;
      end
    end
    check(bad == 0, $sformatf("17x17x18: %0d mismatching elements", bad));
    check(rd.num_eq() == 1190 && rd.sum_len() == 20519, "default code size");
    check(d_eq == 0, "17x17x18 wraps");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
