// tb_novelty_calc: feeds 120 chroma vectors in sections of different
// character (a new section every 12 to 20 vectors) into the novelty
// calculator at the default size (32-entry FIFO) and checks, for every
// update, the running score against the checkerboard kernel recomputed from
// scratch over all pairs of the last 32 vectors (O(K^2), no incremental
// trick), the moving average, and the peak flag against the three-point
// rule with threshold 10^8. Also checks that an update takes 3*(K-1)+8
// clocks, that a vector offered while busy is ignored, and that peaks and
// non-peaks both occur.
module tb_novelty_calc;
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
  localparam int K = 32;
  logic         rst, chroma_done, done, peak, busy;
  chroma_t      new_chroma;
  logic [199:0] novelty, smoothed;
  localparam logic [199:0] ZERO = 200'(1) << 199;

  novelty_calc dut (.clk, .rst, .new_chroma, .chroma_done, .done, .peak,
                    .novelty, .smoothed, .busy);

  chroma_t hist [K];
  longint  avg_rel = 0, prev1 = 0, prev2 = 0;
  int      peaks = 0, updates = 0, drops = 0;

  function automatic longint dotp(input chroma_t a, input chroma_t b);
    longint s = 0;
    for (int k = 0; k < 12; k++) s += longint'(a[k]) * longint'(b[k]);
    return s;
  endfunction

  function automatic longint kernel();
    longint n;
    n = 0;
    for (int i = 0; i < K; i++)
      for (int j = i + 1; j < K; j++)
        n += (((i < K/2) == (j < K/2)) ? 1 : -1) * dotp(hist[i], hist[j]);
    return n;
  endfunction

  initial begin
    chroma_t c;
    int section_left = 0, profile = 0;
    rst = 1'b1; chroma_done = 1'b0; new_chroma = '0;
    for (int i = 0; i < K; i++) hist[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (busy) @(negedge clk);
    for (int n = 0; n < 120; n++) begin
      int start_cyc, lat;
      longint nref, tot_rel;
      bit exp_peak;
      if (section_left == 0) begin
        section_left = $urandom_range(12, 20);
        profile = $urandom_range(0, 11);
      end
      section_left--;
      for (int k = 0; k < 12; k++)
        c[k] = 16'(((k == profile || k == (profile + 4) % 12 || k == (profile + 7) % 12) ? 800 : 40)
                   + $urandom_range(0, 60));
      new_chroma  = c;
      chroma_done = 1'b1;
      @(negedge clk);
      chroma_done = 1'b0;
      start_cyc = cyc;
      // a second vector while busy must be ignored
      if (n % 10 == 3) begin
        repeat (5) @(negedge clk);
        new_chroma  = ~c;
        chroma_done = 1'b1;
        drops++;
        @(negedge clk);
        chroma_done = 1'b0;
      end
      while (!done) @(negedge clk);
      lat = cyc - start_cyc;
      check(lat == 3 * (K - 1) + 8, $sformatf("update took %0d clocks", lat));
      // reference
      for (int i = 0; i < K - 1; i++) hist[i] = hist[i + 1];
      hist[K - 1] = c;
      nref = kernel();
      tot_rel = nref;
      avg_rel = (avg_rel + tot_rel) >>> 1;
      exp_peak = (prev1 > avg_rel) && (prev1 > prev2) && (prev1 > 100000000);
      prev2 = prev1;
      prev1 = avg_rel;
      check(novelty == ZERO + 200'(nref), $sformatf("update %0d: score %0d expected %0d",
            n, $signed(novelty - ZERO), nref));
      check(smoothed == ZERO + 200'(avg_rel), $sformatf("update %0d: average", n));
      check(peak == exp_peak, $sformatf("update %0d: peak %0b expected %0b", n, peak, exp_peak));
      if (peak) peaks++;
      updates++;
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("updates=%0d peaks=%0d ignored-while-busy=%0d", updates, peaks, drops);
    check(peaks > 0 && peaks < updates / 2, "peaks occur, and not everywhere");
    finish_test();
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
endmodule
