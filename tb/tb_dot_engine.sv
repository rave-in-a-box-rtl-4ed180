// tb_dot_engine: presents a new random pair of chroma vectors every clock
// (plus all-zero and full-scale pairs) and checks that the output four
// clocks later equals the dot product computed in the testbench with
// 64-bit integers, including the full-scale 12*(2^16-1)^2 case.
module tb_dot_engine;
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  chroma_t     a, b;
  logic [35:0] dot;

  dot_engine dut (.clk, .a, .b, .dot);

  longint exp_at [2100];

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 2000 + 4; i++) begin
      @(negedge clk);
      if (i >= 5) check(dot == 36'(exp_at[i - 4]),
                        $sformatf("pair %0d: %0d expected %0d", i - 4, dot, exp_at[i - 4]));
      for (int k = 0; k < 12; k++) begin
        a[k] = (i == 10) ? 16'hffff : (i == 11) ? 16'h0 : 16'($urandom);
        b[k] = (i == 10) ? 16'hffff : 16'($urandom);
      end
      exp_at[i] = 0;
      for (int k = 0; k < 12; k++) exp_at[i] += longint'(a[k]) * longint'(b[k]);
    end
    check(exp_at[10] > 64'h7_ffff_ffff, "full scale needs 36 bits");
    finish_test();
  end
endmodule
