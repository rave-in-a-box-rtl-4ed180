// tb_delta_accumulator: random adds and subtracts of 37-bit values, with
// occasional clears, against a 135-bit signed model; the sum is driven far
// negative and back, and a clear together with add must give zero.
module tb_delta_accumulator;
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
  logic                clear, add, sub;
  logic [36:0]         value;
  logic signed [134:0] acc, model;

  delta_accumulator dut (.clk, .clear, .add, .value, .sub, .acc);

  initial begin
    int negatives = 0;
    clear = 1'b1; add = 1'b0; sub = 1'b0; value = '0;
    @(negedge clk);
    model = '0;
    clear = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      check(acc == model, $sformatf("step %0d", i));
      if (acc < 0) negatives++;
      clear = (i % 997 == 996);
      add   = ($urandom_range(0, 3) != 0);
      sub   = (i % 2000 < 1000) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      value = {5'($urandom), $urandom};
      if (clear)    model = '0;
      else if (add) model = sub ? model - 135'(value) : model + 135'(value);
      @(negedge clk);
    end
    check(negatives > 100, "negative values reached");
    finish_test();
  end
endmodule
