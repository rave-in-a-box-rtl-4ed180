// tb_hanning_rom: compares every Hanning table entry with 65535*sin^2(pi*n/4096)
// computed in floating point (tolerance 1 LSB) and checks the two-clock
// read latency by streaming a new address every clock.
module tb_hanning_rom;
  import rave_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  logic [11:0] addr;
  logic [15:0] coef;
  hanning_rom dut (.clk, .addr, .coef);

  function automatic int ref_w(input int n);
    real s;
    s = $sin(3.14159265358979 * n / 4096.0);
    return int'($floor(s * s * 65535.0 + 0.5));
  endfunction

  initial begin
    addr = '0;
    for (int n = 0; n < 4096 + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        int e, d;
        e = ref_w(n - 1);
        d = int'(coef) - e;
        check(d <= 1 && d >= -1, $sformatf("w[%0d]=%0d expected %0d", n - 1, coef, e));
      end
      addr = 12'(n + 1);
    end
    // spot values
    check(ref_w(2048) == 65535, "reference peak");
    finish_test();
  end
endmodule
