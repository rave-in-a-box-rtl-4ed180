// tb_xvga: runs the VGA timing generator for two whole frames after
// reset and compares every clock with a model: hcount/vcount sequence,
// blank for columns >= 1024 or lines >= 768, hsync low for columns
// 1048..1183, vsync low for lines 777..782. Also measures the frame period
// in clocks: 1344 x 806 = 1,083,264, i.e. 60.0 Hz at the 65 MHz pixel clock.
module tb_xvga;
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
    repeat (2300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  logic        rst, hsync, vsync, blank;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  xvga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  int h = 0, v = 0, cyc = 0, last_frame = -1, period = 0, frames = 0;

  initial begin
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (frames < 3) begin
      check(hcount == 11'(h) && vcount == 10'(v), $sformatf("count %0d,%0d vs %0d,%0d", hcount, vcount, h, v));
      check(blank == (h >= 1024 || v >= 768), $sformatf("blank at %0d,%0d", h, v));
      check(hsync == !(h >= 1048 && h <= 1183), $sformatf("hsync at %0d", h));
      check(vsync == !(v >= 777 && v <= 782), $sformatf("vsync at line %0d", v));
      if (h == 0 && v == 0) begin
        if (last_frame >= 0) period = cyc - last_frame;
        last_frame = cyc;
        frames++;
      end
      @(negedge clk);
      cyc++;
      h++;
      if (h == 1344) begin h = 0; v = (v + 1) % 806; end
    end
    check(period == 1344 * 806, $sformatf("frame period %0d clocks", period));
    finish_test();
  end
endmodule
