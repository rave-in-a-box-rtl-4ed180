// tb_chroma_calculator: streams three FFT magnitude frames (4096 beats with
// random gaps) into the chroma calculator and compares the published
// chroma vector with a model that bins each magnitude by a floating-point
// nearest-note rule, sums per pitch class, saturates at 2^18-1 and divides
// by 4. The third frame has large magnitudes so saturation is exercised.
// Checks one done pulse per frame, seen on the third clock edge after the
// edge that takes the last beat.
module tb_chroma_calculator;
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
  logic        rst, valid, last, done;
  logic [11:0] index;
  logic [15:0] magnitude;
  chroma_t     chroma;
  int          dones = 0;

  chroma_calculator dut (.clk, .rst, .valid, .index, .magnitude, .last, .chroma, .done);

  function automatic int ref_class(input int k);
    real f, m;
    int n;
    if (k == 0 || k >= 1024) return 12;
    f = k * 15625.0 / 4096.0;
    m = 69.0 + 12.0 * $ln(f / 440.0) / $ln(2.0);
    n = int'($floor(m + 0.5));
    if (n < 48 || n > 100) return 12;
    return n % 12;
  endfunction

  int cyc = 0, c_last = 0;
  always @(posedge clk) begin
    cyc++;
    if (done) begin
      dones++;
      check(cyc - c_last == 3, $sformatf("done %0d clocks after the last beat", cyc - c_last));
    end
    if (valid && last) c_last = cyc;
  end

  initial begin
    longint acc [12];
    rst = 1'b1; valid = 1'b0; last = 1'b0; index = '0; magnitude = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      int c;
      foreach (acc[i]) acc[i] = 0;
      for (int k = 0; k < 4096; k++) begin
        @(negedge clk);
        valid = 1'b1; index = 12'(k); last = (k == 4095);
        magnitude = (f == 2) ? 16'($urandom_range(20000, 65535)) : 16'($urandom_range(0, 3000));
        c = ref_class(k);
        if (c < 12) begin
          acc[c] += magnitude;
          if (acc[c] > 262143) acc[c] = 262143;
        end
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          valid = 1'b0; index = 12'($urandom); last = 1'b0;
        end
      end
      @(negedge clk); valid = 1'b0; last = 1'b0;
      while (!done) @(negedge clk);
      for (int i = 0; i < 12; i++)
        check(chroma[i] == 16'(acc[i] >> 2), $sformatf("frame %0d class %0d: %0d expected %0d", f, i, chroma[i], acc[i] >> 2));
      if (f == 2) check(chroma[0] == 16'hffff, "saturated class reads full scale");
      repeat (3) @(negedge clk);
    end
    check(dones == 3, "one done per frame");
    finish_test();
  end
endmodule
