// tb_total_accumulator: adds signed deltas to the offset-binary novelty total and
// compares with a model that clamps at the limits. The accumulator is
// built 140 bits wide here so that 135-bit deltas reach both limits; reset
// must return it to the zero point 2^(width-1).
module tb_total_accumulator;
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
  logic                rst, add;
  logic signed [134:0] delta;
  logic [139:0]        total, model;
  int                  low_hits = 0, high_hits = 0;

  total_accumulator #(.ACC_BITS(140), .DELTA_BITS(135)) dut (.clk, .rst, .add, .delta, .total);

  initial begin
    rst = 1'b1; add = 1'b0; delta = '0;
    @(negedge clk);
    rst = 1'b0;
    model = 140'(1) << 139;
    check(total == model, "reset value is the zero point");
    for (int i = 0; i < 4000; i++) begin
      logic signed [141:0] s;
      add = ($urandom_range(0, 4) != 0);
      // big steps: near 2^134 in size, so both limits are reached
      delta = {$urandom, $urandom, $urandom, $urandom, 7'($urandom)};
      if (i % 1000 < 500) delta = (delta < 0) ? delta : -delta;
      else                delta = (delta < 0) ? -delta : delta;
      if (i % 50 == 0) delta = 135'sd12345;
      s = $signed({2'b00, model}) + 142'(delta);
      if (add) begin
        if (s < 0)                   begin model = '0; low_hits++;  end
        else if (s >= (142'sd1 <<< 140)) begin model = '1; high_hits++; end
        else                         model = s[139:0];
      end
      @(negedge clk);
      check(total == model, $sformatf("step %0d", i));
    end
    check(low_hits > 10 && high_hits > 10, $sformatf("limits reached %0d/%0d", low_hits, high_hits));
    rst = 1'b1;
    @(negedge clk);
    check(total == 140'(1) << 139, "reset");
    finish_test();
  end
endmodule
