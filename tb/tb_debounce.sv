// tb_debounce: drives four inputs of a debounce with DELAY = 20 with bursts of
// bounces shorter than the delay and with lasting changes, against a model
// that predicts each output bit clock by clock: a change shows exactly
// DELAY + 2 clocks after the input settles, and no bounce shorter than
// DELAY gets through. Also checks that reset copies the inputs at once.
// Counts filtered bounces and passed changes; each must happen.
module tb_debounce;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  localparam int unsigned DELAY = 20;
  localparam int unsigned COUNT = 4;
  logic             rst;
  logic [COUNT-1:0] noisy, clean;
  int               stable [COUNT];   // clocks since the input last changed
  logic [COUNT-1:0] last_in, expect_q;
  int               n_filtered = 0, n_passed = 0;

  debounce #(.DELAY(DELAY), .COUNT(COUNT)) dut (.*);

  // reference: the output takes the input once it has been steady for
  // DELAY + 1 sampled clocks
  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < COUNT; i++) stable[i] = 0;
      expect_q = noisy;
    end else begin
      for (int i = 0; i < COUNT; i++) begin
        if (noisy[i] != last_in[i]) begin
          if (stable[i] < DELAY + 1 && last_in[i] != expect_q[i]) n_filtered++;
          stable[i] = 0;
        end else if (stable[i] <= DELAY) begin
          stable[i]++;
        end
        if (stable[i] == DELAY + 1 && expect_q[i] != noisy[i]) begin
          expect_q[i] = noisy[i];
          n_passed++;
        end
      end
    end
    last_in = noisy;
  end

  always @(negedge clk) if (!rst) check(clean === expect_q, $sformatf("clean %b expected %b", clean, expect_q));

  initial begin
    rst = 1'b1; noisy = 4'b1010;
    @(posedge clk); #1;
    rst = 1'b0; @(negedge clk);
    check(clean === 4'b1010, "reset copies the inputs");
    for (int burst = 0; burst < 400; burst++) begin
      automatic int i = $urandom_range(COUNT - 1);
      if ($urandom_range(1)) begin
        // bounce: toggle a few times, each level held for less than DELAY
        repeat ($urandom_range(1, 6)) begin
          noisy[i] = ~noisy[i];
          repeat ($urandom_range(1, DELAY - 1)) @(posedge clk);
          #1;
        end
      end else begin
        noisy[i] = ~noisy[i];
      end
      repeat ($urandom_range(1, 3 * DELAY)) @(posedge clk);
      #1;
    end
    repeat (3 * DELAY) @(posedge clk);
    $display("filtered bounces=%0d passed changes=%0d", n_filtered, n_passed);
    check(n_filtered > 0, "some bounce was filtered");
    check(n_passed > 0, "some change passed");
    finish_test();
  end
endmodule
