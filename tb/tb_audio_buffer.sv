// tb_audio_buffer: pushes 300 random samples through an audio delay built 64
// deep and checks that the n-th output is input n-64 cut to 12 bits, that
// nothing comes out before the buffer is full, and that every later input
// produces exactly one output. The depth is reduced from 65536 to keep the
// run short; the sequencing does not depend on it.
module tb_audio_buffer;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  localparam int D = 64;
  logic        rst, sample_valid, out_valid;
  logic [14:0] sample;
  logic [11:0] audio_out;
  logic [11:0] sent [$];
  int          outs = 0;

  audio_buffer #(.DEPTH(D)) dut (.clk, .rst, .sample_valid, .sample, .audio_out, .out_valid);

  always @(posedge clk) if (!rst && out_valid) begin
    check(sent.size() > D, "no output before the buffer is full");
    check(audio_out == sent[outs], $sformatf("output %0d: %h expected %h", outs, audio_out, sent[outs]));
    outs++;
  end

  initial begin
    rst = 1'b1; sample_valid = 1'b0; sample = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      sample = 15'($urandom);
      sent.push_back(12'(sample >> 3));
      sample_valid = 1'b1;
      @(negedge clk);
      sample_valid = 1'b0;
      repeat ($urandom_range(3, 8)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(outs == 300 - D, $sformatf("%0d outputs", outs));
    finish_test();
  end
endmodule
