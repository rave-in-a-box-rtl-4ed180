// tb_instruction_rom: reads every word of the default graphics program and
// checks its structure rather than re-deriving it: within each frame the
// curves join end to start and the last one closes the path, each curve is
// a straight piece with inner control points at 1/3 and 2/3 (within
// rounding), the figure stays inside the DAC range centred on 2048, its
// size grows from frame 0 to frame 7 and shrinks after, the dashed scene 3
// has half its curves dark and the others none. Also checks the two-clock
// read latency.
module tb_instruction_rom;
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
    repeat (40000 * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  logic [13:0]   addr;
  bezier_instr_t word;

  instruction_rom dut (.clk, .addr, .word);

  function automatic int absv(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    bezier_instr_t prev, first;
    int extent [4][16];
    int dark [4];
    addr = '0;
    foreach (dark[i]) dark[i] = 0;
    for (int a = 0; a < 16384; a++) begin
      addr = 14'(a);
      @(negedge clk);
      @(negedge clk);
      begin
        int sc, fr, ins, ext;
        sc = a >> 12; fr = (a >> 8) & 15; ins = a & 255;
        if (ins == 0) first = word;
        else check(word.p0x == prev.p3x && word.p0y == prev.p3y, $sformatf("curve %0d joins", a));
        if (ins == 255) check(word.p3x == first.p0x && word.p3y == first.p0y, "path closes");
        check(absv(3 * int'(word.p1x) - 2 * int'(word.p0x) - int'(word.p3x)) <= 3 &&
              absv(3 * int'(word.p2y) - int'(word.p0y) - 2 * int'(word.p3y)) <= 3, "straight piece");
        ext = absv(int'(word.p0x) - 2048);
        if (absv(int'(word.p0y) - 2048) > ext) ext = absv(int'(word.p0y) - 2048);
        check(ext <= 1300, "inside the range");
        if (ins == 0) extent[sc][fr] = 0;
        if (ext > extent[sc][fr]) extent[sc][fr] = ext;
        if (!word.laser_on) dark[sc]++;
        prev = word;
      end
    end
    // latency: a new address shows after exactly two clocks
    addr = 14'd0;
    repeat (3) @(negedge clk);
    first = word;
    addr = 14'd1;
    @(negedge clk);
    check(word == first, "word unchanged one clock after the address");
    @(negedge clk);
    check(word == dut.rom[1] && word != first, "new word two clocks after the address");
    for (int sc = 0; sc < 4; sc++) begin
      check(extent[sc][7] > extent[sc][0] && extent[sc][15] < extent[sc][8], $sformatf("scene %0d pulses", sc));
      check(dark[sc] == ((sc == 3) ? 16 * 128 : 0), $sformatf("scene %0d dark curves %0d", sc, dark[sc]));
    end
    finish_test();
  end
endmodule
