// tb_histogram_display: drives the bar-graph generator from the VGA
// timing generator and a spectrum RAM filled with random magnitudes, in
// both views and all four spectrum zoom ranges, for one frame each (at a
// sampled set of lines). Every pixel is compared, two clocks late, with
// the expected bar: white below height spectrum[h >> range] >> 7 or
// chroma[h / 64] >> 6 counted up from line 767, black otherwise and when
// blanked.
module tb_histogram_display;
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
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  logic        rst, hsync, vsync, blank, show_chroma;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [1:0]  range;
  logic [9:0]  spec_addr;
  logic [15:0] spec_data;
  logic [2:0]  pixel;
  chroma_t     chroma;
  logic [15:0] spec [1024];
  int          hq [2], vq [2];
  bit          bq [2];
  int          lit = 0, dark = 0;

  xvga u_vga (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);
  spectrum_ram u_ram (.wclk(clk), .we(1'b0), .waddr('0), .wdata('0), .rclk(clk),
                      .raddr(spec_addr), .rdata(spec_data));
  histogram_display dut (.clk, .hcount, .vcount, .blank, .show_chroma, .range, .spec_addr,
                         .spec_data, .chroma, .pixel);

  function automatic bit expect_lit(int h, int v, bit b);
    int height, bar;
    if (b) return 0;
    height = 767 - v;
    if (show_chroma) bar = (h / 64 < 12) ? int'(chroma[h / 64]) >> 6 : 0;
    else             bar = int'(spec[(h % 1024) >> range]) >> 7;
    return height < bar;
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) begin
      spec[i] = 16'($urandom_range(0, 100000) % 65536);
      u_ram.mem[i] = spec[i];
    end
    for (int c = 0; c < 12; c++) chroma[c] = 16'($urandom);
    rst = 1'b1; show_chroma = 1'b0; range = 2'd0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int mode = 0; mode < 5; mode++) begin
      show_chroma = (mode == 4);
      range = 2'(mode);
      for (int n = 0; n < 1344 * 806; n++) begin
        @(posedge clk);
        #1;
        if (n >= 2 && (vq[1] % 7 == 0 || vq[1] >= 760)) begin
          bit e;
          e = expect_lit(hq[1], vq[1], bq[1]);
          check(pixel == (e ? 3'b111 : 3'b000),
                $sformatf("mode %0d pixel %0d,%0d = %0d", mode, hq[1], vq[1], pixel));
          if (e) lit++; else dark++;
        end
        hq[1] = hq[0]; vq[1] = vq[0]; bq[1] = bq[0];
        hq[0] = hcount; vq[0] = vcount; bq[0] = blank;
      end
    end
    $display("lit=%0d dark=%0d", lit, dark);
    check(lit > 1000 && dark > 1000, "both colours drawn");
    finish_test();
  end
endmodule
