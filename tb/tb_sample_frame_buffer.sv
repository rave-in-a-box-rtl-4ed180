// tb_sample_frame_buffer: writes 4096+300 samples with random gaps into the
// circular window buffer, half of them windowed, and reads every slot back.
// Expected slot contents are computed with a floating-point Hanning window
// (tolerance 1 LSB). Checks frame_done once per 4096 writes, head, and the
// one-clock read latency.
module tb_sample_frame_buffer;
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
  logic        rst, sample_valid, hanning_en, frame_done;
  logic [14:0] sample;
  logic [11:0] head, rd_addr;
  logic [15:0] rd_data;
  int          expected [4096];
  int          frames = 0;

  sample_frame_buffer dut (.clk, .rst, .sample_valid, .sample, .hanning_en,
                           .head, .frame_done, .rd_addr, .rd_data);

  function automatic int ref_w(input int n);
    real s;
    s = $sin(3.14159265358979 * n / 4096.0);
    return int'($floor(s * s * 65535.0 + 0.5));
  endfunction

  always @(posedge clk) if (!rst && frame_done) begin
    frames++;
    check(head == 12'hfff, "head is slot 4095 at frame_done");
  end

  initial begin
    int written = 0;
    rst = 1'b1; sample_valid = 1'b0; sample = '0; hanning_en = 1'b0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4096 + 300; i++) begin
      int slot, p;
      @(negedge clk);
      sample       = 15'($urandom);
      hanning_en   = (i % 3 != 0);
      sample_valid = 1'b1;
      slot = i % 4096;
      p = {sample, 1'b0};
      expected[slot] = hanning_en ? int'((longint'(p) * ref_w(slot)) >>> 16) : p;
      @(negedge clk);
      sample_valid = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(frames == 1, $sformatf("frame_done count %0d", frames));
    check(head == 12'(300 - 1), "head after the last write");
    for (int a = 0; a < 4096; a++) begin
      rd_addr = 12'(a);
      @(negedge clk);
      begin
        int d;
        d = int'(rd_data) - expected[a];
        check(d <= 1 && d >= -1, $sformatf("slot %0d = %0d expected %0d", a, rd_data, expected[a]));
      end
    end
    finish_test();
  end
endmodule
