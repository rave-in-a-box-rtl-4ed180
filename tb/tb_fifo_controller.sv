// tb_fifo_controller: drives the five modes of the FIFO controller in random
// order (biased so the FIFO fills and drains) and compares the FIFO head,
// count and flags with a queue model every clock. Also walks a full round
// of CYCLE over 31 entries and checks the order comes back unchanged, and
// checks that SHIFT on a full FIFO only drops the head.
module tb_fifo_controller;
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
  logic          rst, full, empty;
  fifo_mode_e    mode;
  logic [191:0]  new_input, fifo_output;
  logic [5:0]    data_count;
  logic [191:0]  model [$];
  int            seen [5];

  fifo_controller #(.W(192), .DEPTH(32)) dut (.clk, .rst, .mode, .new_input, .fifo_output,
                                             .data_count, .fifo_full(full), .fifo_empty(empty));

  task automatic step(input fifo_mode_e m);
    bit rd, wr;
    logic [191:0] d;
    mode = m;
    new_input = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    rd = (m == FIFO_UNLOAD || m == FIFO_CYCLE || m == FIFO_SHIFT);
    wr = (m == FIFO_LOAD || m == FIFO_CYCLE || m == FIFO_SHIFT);
    d  = (m == FIFO_CYCLE) ? ((model.size() > 0) ? model[0] : fifo_output) : new_input;
    wr = wr && model.size() < 32;
    rd = rd && model.size() > 0;
    seen[m]++;
    if (rd) void'(model.pop_front());
    if (wr) model.push_back(d);
    @(negedge clk);
    check(data_count == 6'(model.size()), $sformatf("count %0d model %0d after mode %0d", data_count, model.size(), m));
    check(full == (model.size() == 32) && empty == (model.size() == 0), "flags");
    if (model.size() > 0) check(fifo_output == model[0], "head");
  endtask

  initial begin
    logic [191:0] snapshot [$];
    rst = 1'b1; mode = FIFO_IDLE; new_input = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if ((i / 300) % 2 == 0) step(r < 5 ? FIFO_LOAD : r < 7 ? FIFO_CYCLE : r < 8 ? FIFO_SHIFT : r < 9 ? FIFO_IDLE : FIFO_UNLOAD);
      else                    step(r < 5 ? FIFO_UNLOAD : r < 7 ? FIFO_CYCLE : r < 8 ? FIFO_SHIFT : r < 9 ? FIFO_IDLE : FIFO_LOAD);
    end
    while (model.size() < 32) step(FIFO_LOAD);
    step(FIFO_SHIFT);
    check(model.size() == 31 && data_count == 31, "SHIFT on full drops the head only");
    snapshot = model;
    repeat (31) step(FIFO_CYCLE);
    check(model == snapshot, "model round trip");
    for (int i = 0; i < 31; i++) begin
      check(fifo_output == snapshot[i], $sformatf("cycled entry %0d", i));
      step(FIFO_CYCLE);
    end
    for (int m = 0; m < 5; m++) check(seen[m] > 100, $sformatf("mode %0d used", m));
    finish_test();
  end
endmodule
