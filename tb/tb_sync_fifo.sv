// tb_sync_fifo: random reads and writes on a 32 x 192 FIFO against a
// queue model. The model refuses a write when full even if a read happens
// in the same clock, and a read when empty. Checks dout, full, empty and
// count every clock, and that the full-with-read-and-write case occurred.
module tb_sync_fifo;
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
  logic          srst, wr_en, rd_en, full, empty;
  logic [191:0]  din, dout;
  logic [5:0]    count;
  logic [191:0]  model [$];
  int            full_rw = 0;

  sync_fifo #(.W(192), .DEPTH(32)) dut (.clk, .srst, .din, .wr_en, .rd_en, .dout, .full, .empty, .count);

  initial begin
    srst = 1'b1; wr_en = 1'b0; rd_en = 1'b0; din = '0;
    repeat (3) @(negedge clk);
    srst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias = ((i / 500) % 2 == 0) ? 3 : 1;   // phases that fill and that drain
      @(negedge clk);
      check(count == 6'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == 32), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(dout == model[0], "dout is the oldest entry");
      wr_en = ($urandom_range(0, 3) < bias);
      rd_en = ($urandom_range(0, 3) >= bias);
      if (i % 7 == 0) begin wr_en = 1'b1; rd_en = 1'b1; end
      din = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      // model the clock edge
      if (wr_en && rd_en && model.size() == 32) full_rw++;
      begin
        bit can_wr, can_rd;
        can_wr = wr_en && model.size() < 32;
        can_rd = rd_en && model.size() > 0;
        if (can_rd) void'(model.pop_front());
        if (can_wr) model.push_back(din);
      end
    end
    check(full_rw > 0, "read and write while full happened");
    srst = 1'b1;
    @(negedge clk);
    srst = 1'b0;
    check(empty && count == 0, "reset empties the FIFO");
    finish_test();
  end
endmodule
