// tb_spectrum_ram: writes the dual-clock spectrum RAM from one
// clock and reads it from a second, unrelated clock (period 7 vs 5). Checks
// every address after a full random fill, the one-clock read latency, and
// that a write to one address leaves the others alone.
module tb_spectrum_ram;
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
  logic rclk = 1'b0;
  always #7 rclk = ~rclk;
  logic        we;
  logic [9:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [1024];

  spectrum_ram dut (.wclk(clk), .we, .waddr, .wdata, .rclk, .raddr, .rdata);

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge rclk) raddr = 10'(i);
      @(posedge rclk);
      #1 check(rdata == model[i], $sformatf("read %0d", i));
    end
    // latency: the output changes only at the read clock edge
    @(negedge rclk) raddr = 10'd3;
    #1 check(rdata == model[1023], "output holds until the read edge");
    // single write, neighbours unchanged
    @(negedge clk) begin we = 1'b1; waddr = 10'd500; wdata = 16'hBEEF; end
    @(negedge clk) we = 1'b0;
    model[500] = 16'hBEEF;
    for (int i = 498; i < 503; i++) begin
      @(negedge rclk) raddr = 10'(i);
      @(posedge rclk);
      #1 check(rdata == model[i], $sformatf("after single write, read %0d", i));
    end
    finish_test();
  end
endmodule
