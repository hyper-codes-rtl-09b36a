// tb_hc_qam_mapper: checks all 16 labels against the printed Gray
// constellation (top row y = +3A, leftmost column x = -3A) and that every
// pair of horizontally or vertically adjacent points differs in one bit.
module tb_hc_qam_mapper;
  localparam int A = 32;
  logic [3:0] bits;
  logic signed [7:0] out_i, out_q;

  hc_qam_mapper dut (.*);

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

  initial begin
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      bits = 4'(label_of(r, c)); #1;
      check(int'(out_i) == (2 * c - 3) * A && int'(out_q) == (3 - 2 * r) * A,
            $sformatf("label %b -> (%0d,%0d)", bits, out_i, out_q));
      if (c < 3) check($countones(4'(label_of(r, c) ^ label_of(r, c + 1))) == 1, "Gray horizontally");
      if (r < 3) check($countones(4'(label_of(r, c) ^ label_of(r + 1, c))) == 1, "Gray vertically");
    end
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
