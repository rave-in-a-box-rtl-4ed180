// tb_frame_streamer: streams two frames out of a model buffer RAM under
// random tready back-pressure and checks every beat: the samples oldest
// first from head+1, the offset removed (MSB flipped), tlast only on the
// 4096th beat, and nothing after it. A third frame is cut short with
// last_missing and must stop sending.
module tb_frame_streamer;
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
  logic        rst, start, last_missing, tvalid, tready, tlast;
  logic [11:0] head, rd_addr;
  logic [15:0] rd_data;
  logic [31:0] tdata;
  logic [15:0] ram [4096];

  frame_streamer dut (.clk, .rst, .start, .head, .rd_addr, .rd_data, .last_missing,
                      .tdata, .tvalid, .tready, .tlast);

  always_ff @(posedge clk) rd_data <= ram[rd_addr];

  int beats, frame_head;
  always @(posedge clk) begin
    if (!rst && tvalid && tready) begin
      int unsigned a;
      a = (frame_head + 1 + beats) % 4096;
      check(tdata == {16'b0, ram[a] ^ 16'h8000}, $sformatf("beat %0d data %h", beats, tdata));
      check(tlast == (beats == 4095), $sformatf("tlast at beat %0d", beats));
      beats++;
    end
    tready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    rst = 1'b1; start = 1'b0; last_missing = 1'b0; head = '0;
    foreach (ram[i]) ram[i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      beats = 0;
      frame_head = (f == 0) ? 1234 : 4095;
      head = 12'(frame_head);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      head = 12'($urandom);  // head moves on; the frame must not follow it
      while (beats < 4096) @(negedge clk);
      repeat (20) @(negedge clk);
      check(beats == 4096, "exactly 4096 beats");
      check(tvalid == 1'b0, "idle after tlast");
    end
    // abort
    beats = 0; frame_head = 7; head = 12'd7;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (100) @(negedge clk);
    last_missing = 1'b1;
    @(negedge clk); last_missing = 1'b0;
    begin
      int b0;
      b0 = beats;
      repeat (20) @(negedge clk);
      check(tvalid == 1'b0 && beats == b0, "stops on last_missing");
      check(b0 > 10 && b0 < 110, "some beats before the abort");
    end
    finish_test();
  end
endmodule
