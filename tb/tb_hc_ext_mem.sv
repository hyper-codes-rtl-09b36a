// tb_hc_ext_mem: fills the default-size compressed extrinsic store (1190
// records of min, second min, position, parity and an 18-bit sign word)
// with random records and reads every field back.
module tb_hc_ext_mem;
  import hc_pkg::*;

  localparam int D = 1190;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [10:0] waddr = '0, raddr = '0;
  mag_t w_min1 = '0, w_min2 = '0, r_min1, r_min2;
  logic [4:0] w_loc = '0, r_loc;
  logic w_parity = 0, r_parity;
  logic [17:0] w_signs = '0, r_signs;

  hc_ext_mem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [41:0] shadow[D];

  initial begin
    int bad;
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++)
      for (int a = 0; a < D; a++) begin
        we = (pass == 0) || ($urandom_range(0, 1) == 1);
        waddr = 11'(a);
        w_min1 = mag_t'($urandom); w_min2 = mag_t'($urandom); w_loc = 5'($urandom_range(0, 17));
        w_parity = 1'($urandom); w_signs = 18'($urandom);
        if (we) shadow[a] = {w_min1, w_min2, w_loc, w_parity, w_signs};
        @(negedge clk);
      end
    we = 0;
    bad = 0;
    for (int a = 0; a < D; a++) begin
      raddr = 11'(a); #1;
      if ({r_min1, r_min2, r_loc, r_parity, r_signs} != shadow[a]) bad++;
    end
    check(bad == 0, $sformatf("%0d records differ", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
