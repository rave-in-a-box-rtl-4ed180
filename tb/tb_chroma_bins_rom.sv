// tb_chroma_bins_rom: checks all 1024 entries of the bin-to-pitch-class
// table against a floating-point model: bin k is f = k*15625/4096 Hz, its
// MIDI note is 69 + 12*log2(f/440) rounded, and the class is note % 12 for
// notes 48 (C3) to 100 (E7), else 12. A new address is applied every clock,
// so the two-clock latency is checked too. Also counts bins per class.
module tb_chroma_bins_rom;
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
  logic [9:0] addr;
  logic [3:0] pitch_class;
  int per_class [13];

  chroma_bins_rom dut (.clk, .addr, .pitch_class);

  function automatic int ref_class(input int k);
    real f, m;
    int n;
    if (k == 0) return 12;
    f = k * 15625.0 / 4096.0;
    m = 69.0 + 12.0 * $ln(f / 440.0) / $ln(2.0);
    n = int'($floor(m + 0.5));
    if (n < 48 || n > 100) return 12;
    return n % 12;
  endfunction

  initial begin
    addr = '0;
    for (int n = 0; n < 1024 + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        int e;
        e = ref_class(n - 1);
        per_class[pitch_class]++;
        check(pitch_class == 4'(e), $sformatf("bin %0d class %0d expected %0d", n - 1, pitch_class, e));
      end
      addr = 10'(n + 1);
    end
    check(ref_class(115) == 9, "reference: bin 115 (438.7 Hz) is A");
    for (int c = 0; c < 12; c++) check(per_class[c] > 20, $sformatf("class %0d has %0d bins", c, per_class[c]));
    finish_test();
  end
endmodule
