// tb_dac_spi: two dac_spi instances, galvo (two channels) and audio (one
// channel), each listened to by a model of the MCP4822 serial input: bits
// are taken on rising SCK while CS is low and a word is latched when CS
// rises after exactly 16 bits. Checks the channel, gain and shutdown bits,
// that each latched code equals the input value at frame start, that the
// galvo alternates A/B, and the frame period of 33 half SCK periods.
module tb_dac_spi;
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
  logic        rst;
  logic [11:0] ga, gb, aa;
  logic        g_cs, g_sck, g_sdi, a_cs, a_sck, a_sdi;

  dac_spi #(.TWO_CHANNELS(1'b1), .SCK_DIV(4)) u_galvo (.clk, .rst, .data_a(ga), .data_b(gb),
                                                         .cs_n(g_cs), .sck(g_sck), .sdi(g_sdi));
  dac_spi #(.TWO_CHANNELS(1'b0), .SCK_DIV(4)) u_audio (.clk, .rst, .data_a(aa), .data_b(12'habc),
                                                         .cs_n(a_cs), .sck(a_sck), .sdi(a_sdi));

  // values at each frame start (CS falling), to compare on CS rising
  logic [11:0] g_at_a, g_at_b, a_at, ga_q, gb_q, aa_q;
  logic        g_cs_q = 1'b1, a_cs_q = 1'b1, g_sck_q = 1'b0, a_sck_q = 1'b0;
  logic [15:0] g_sh, a_sh;
  int          g_bits, a_bits, g_words = 0, a_words = 0, g_last_b = -1;
  int          cyc = 0, g_start = 0, g_period = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      // galvo listener
      if (g_cs_q && !g_cs) begin
        g_at_a = ga_q; g_at_b = gb_q; g_bits = 0;
        if (g_words > 0) g_period = cyc - g_start;
        g_start = cyc;
      end
      if (!g_cs && g_sck && !g_sck_q) begin g_sh = {g_sh[14:0], g_sdi}; g_bits++; end
      if (!g_cs_q && g_cs) begin
        check(g_bits == 16, $sformatf("galvo word with %0d bits", g_bits));
        check(g_sh[14] == 1'b0 && g_sh[13] == 1'b0 && g_sh[12] == 1'b1, "galvo: gain 2x, output on");
        check(g_sh[11:0] == (g_sh[15] ? g_at_b : g_at_a), "galvo code");
        if (g_last_b >= 0) check(g_sh[15] != g_last_b[0], "galvo alternates channels");
        g_last_b = g_sh[15];
        if (g_words > 1) check(g_period == 33 * 4, $sformatf("galvo frame period %0d", g_period));
        g_words++;
      end
      // audio listener
      if (a_cs_q && !a_cs) begin a_at = aa_q; a_bits = 0; end
      if (!a_cs && a_sck && !a_sck_q) begin a_sh = {a_sh[14:0], a_sdi}; a_bits++; end
      if (!a_cs_q && a_cs) begin
        check(a_bits == 16, "audio word length");
        check(a_sh[15:12] == 4'b0011, "audio: channel A, gain 1x, output on");
        check(a_sh[11:0] == a_at, "audio code");
        a_words++;
      end
    end
    g_cs_q <= g_cs; g_sck_q <= g_sck; a_cs_q <= a_cs; a_sck_q <= a_sck;
    ga_q <= ga; gb_q <= gb; aa_q <= aa;
  end

  initial begin
    rst = 1'b1; ga = '0; gb = '0; aa = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 37 == 0) begin ga = 12'($urandom); gb = 12'($urandom); aa = 12'($urandom); end
    end
    check(g_words > 25 && a_words > 25, $sformatf("words %0d %0d", g_words, a_words));
    finish_test();
  end
endmodule
