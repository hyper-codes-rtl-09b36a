// tb_hc_llr_mem: writes random LLRs to random addresses of the default-size
// store, keeps a shadow copy, and checks asynchronous reads of every
// address, including a read of the address being written (old value until
// the clock edge).
module tb_hc_llr_mem;
  import hc_pkg::*;

  localparam int N = HC_ROWS * HC_COLS * HC_PLANES;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [12:0] waddr = '0, raddr = '0;
  llr_t wdata = '0, rdata;

  hc_llr_mem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int shadow[N];

  initial begin
    int bad;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; waddr = 13'(a); wdata = llr_t'(int'($urandom_range(0, 1022)) - 511);
      shadow[a] = int'(wdata);
      @(negedge clk);
    end
    for (int t = 0; t < 3000; t++) begin
      we = 1; waddr = 13'($urandom_range(0, N - 1)); wdata = llr_t'(int'($urandom_range(0, 1022)) - 511);
      raddr = waddr; #1;
      check(int'(rdata) == shadow[waddr], "read during write returns old value");
      shadow[waddr] = int'(wdata);
      @(negedge clk);
    end
    we = 0;
    bad = 0;
    for (int a = 0; a < N; a++) begin
      raddr = 13'(a); #1;
      if (int'(rdata) != shadow[a]) bad++;
    end
    check(bad == 0, $sformatf("%0d addresses differ", bad));
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
