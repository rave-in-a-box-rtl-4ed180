// tb_oversampler: checks the 64x oversampler against a running model.
// Random 12-bit samples arrive with random gaps between conversions; for
// every group of 64 the expected output is (sum + 4) >> 3. The test also
// checks that `done` comes exactly one clock after the 64th conversion and
// at no other time, and that an all-ones group gives the full-scale value.
module tb_oversampler;
  logic        clk = 1'b0;
  logic        rst;
  logic [11:0] sample;
  logic        eoc;
  logic [14:0] oversample;
  logic        done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  oversampler dut (.clk, .rst, .sample, .eoc, .oversample, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum, n;
    logic expect_done;
    rst = 1'b1; eoc = 1'b0; sample = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int g = 0; g < 40; g++) begin
      sum = 0;
      for (n = 0; n < 64; n++) begin
        @(negedge clk);
        check(done == 1'b0, "done outside a group end");
        sample = (g == 5) ? 12'hfff : 12'($urandom);
        eoc    = 1'b1;
        sum   += sample;
        @(negedge clk);
        eoc = 1'b0;
        if (n != 63) check(done == 1'b0, "done too early");
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          check(done == 1'b0, "done during gap");
        end
      end
      // the 64th eoc was taken on the posedge before the negedge above
      // where done was not yet checked; check now
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent scoreboard: count eocs and sum
  int unsigned acc = 0, cnt = 0;
  logic pending = 1'b0;
  int unsigned expected = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (pending) begin
        check(done == 1'b1, "done one clock after the 64th conversion");
        check(oversample == 15'(expected), $sformatf("value %0d expected %0d", oversample, expected));
        pending = 1'b0;
      end
      if (eoc) begin
        acc += sample;
        cnt++;
        if (cnt == 64) begin
          expected = (acc + 4) >> 3;
          pending  = 1'b1;
          acc = 0;
          cnt = 0;
        end
      end
    end
  end
endmodule
