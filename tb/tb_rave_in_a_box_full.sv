// tb_rave_in_a_box_full: the whole projector at its default sizes, with
// no parameter overridden. One complete operation is run: 18 analysis
// frames of 4096 samples at 64x oversampling (the ADC strobes every second
// clock, 9.4 million clocks), long enough for the 65536-sample audio delay
// to fill and start playing. It also covers the first novelty peak, which
// comes K/2 = 16 frames after the start because the 32-entry chroma window
// starts out filled with silence. The checks and counters are those of
// the reduced end-to-end testbench, with three differences:
//   * no frame is dropped;
//   * only the first peak is expected;
//   * the laser blanking check is left out, because scene 3 is never
//     reached in this run.
// The show_chroma switch flips halfway and must pass the debouncer at its
// full delay of 1,000,000 clocks.
module tb_rave_in_a_box_full;
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
    repeat (10500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end

  localparam int OS_LOG2 = 6, NFFT = 4096, K = 32, AUDIO_DEPTH = 65536, SCK_DIV = 4;
  localparam int BLOCK = 6, DROP_FRAME = 1000, FRAMES = 18;
  localparam real FS = 15625.0;
  localparam real TONE_HZ [4] = '{440.0, 523.2511, 329.6276, 391.9954};
  localparam int  TONE_PC [4] = '{9, 0, 4, 7};

  logic clk_pixel = 1'b0;
  always #2 clk_pixel = ~clk_pixel;

  logic         rst, adc_eoc, hanning_en, show_chroma;
  logic [11:0]  adc_sample;
  logic [1:0]   hist_range;
  logic [31:0]  fft_in_tdata;
  logic         fft_in_tvalid, fft_in_tready, fft_in_tlast, fft_last_missing;
  logic [23:0]  mag_tdata;
  logic [11:0]  mag_tuser;
  logic         mag_tvalid, mag_tlast;
  chroma_t      chroma;
  logic         chroma_done, novelty_done, peak;
  logic [199:0] novelty;
  logic [1:0]   scene;
  logic         galvo_cs_n, galvo_sck, galvo_sdi, laser_on;
  logic [11:0]  laser_x, laser_y;
  logic         audio_cs_n, audio_sck, audio_sdi;
  logic [3:0]   vga_r, vga_g, vga_b;
  logic         vga_hs, vga_vs;
  logic         drop_next, novelty_busy, audio_valid;
  logic [199:0] novelty_smoothed;
  logic         peak_led;
  logic [7:0]   seg, an;
  int           frames_in, frames_dropped, frames_out, tlast_errors;

  rave_in_a_box dut (.*);

  fft_mag_model #(.N(NFFT)) u_fft (
    .clk, .s_tdata(fft_in_tdata), .s_tvalid(fft_in_tvalid), .s_tready(fft_in_tready),
    .s_tlast(fft_in_tlast), .last_missing(fft_last_missing), .drop_next,
    .m_tdata(mag_tdata), .m_tuser(mag_tuser), .m_tvalid(mag_tvalid), .m_tlast(mag_tlast),
    .frames_in, .frames_dropped, .frames_out, .tlast_errors
  );

  // ---------------------------------------------------------------- stimulus
  longint adc_n = 0;
  real    phase = 0.0;
  bit     run = 1'b0;
  always @(negedge clk) begin
    if (run) begin
      adc_eoc <= ~adc_eoc;
      if (!adc_eoc) begin
        int tone;
        tone = int'(((adc_n >> OS_LOG2) / (BLOCK * NFFT)) % 4);
        phase += 2.0 * 3.14159265358979 * TONE_HZ[tone] / (FS * (1 << OS_LOG2));
        adc_sample <= 12'(2048 + int'($floor(1500.0 * $sin(phase))) + $urandom_range(0, 3));
        adc_n++;
      end
    end else adc_eoc <= 1'b0;
  end

  // ---------------------------------------------------------------- monitor
  int cyc = 0;
  int n_eoc = 0, n_os = 0, last_os = -1, os_gap_bad = 0;
  int n_frame_done = 0, last_fd = -1, fd_gap_bad = 0;
  int stalls = 0, beats = 0, streamed = 0;
  int n_chroma = 0, pitch_ok = 0, last_cd = -1;
  int n_nov = 0, lat_bad = 0, n_peak = 0, n_scene = 0;
  int peak_at [$];
  logic [1:0] scene_q = '0;
  logic [14:0] os_q [$];
  int n_audio = 0, audio_bad = 0, depth_bad = 0;
  // SPI decoders (values seen at a clock edge are those set by the previous edge)
  bit  g_pcs = 1, g_psck = 0, a_pcs = 1, a_psck = 0;
  logic [11:0] g_snap_x = '0, g_snap_y = '0, a_snap = '0;
  logic [11:0] g_exp_x = '0, g_exp_y = '0, a_exp = '0;
  logic [15:0] g_sh = '0, a_sh = '0;
  int  g_bits = 0, a_bits = 0, g_words = 0, a_words = 0, g_bad = 0, a_bad = 0;
  int  g_start = -1, a_start = -1, g_period_bad = 0, a_period_bad = 0, g_chan_bad = 0;
  bit  g_expect_b = 0, g_first = 1;
  int  laser_off = 0, x_moves = 0;
  logic [11:0] x_q = '0;

  function automatic int frame_of(int chroma_index);
    return (chroma_index < DROP_FRAME) ? chroma_index : chroma_index + 1;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      // rates
      if (adc_eoc) n_eoc++;
      if (dut.osample_done) begin
        if (last_os >= 0 && cyc - last_os != 2 << OS_LOG2) os_gap_bad++;
        last_os = cyc;
        n_os++;
        os_q.push_back(dut.osample);
      end
      if (dut.frame_done) begin
        if (last_fd >= 0 && cyc - last_fd != NFFT * (2 << OS_LOG2)) fd_gap_bad++;
        last_fd = cyc;
        n_frame_done++;
      end
      // FFT input stream
      if (fft_in_tvalid && !fft_in_tready) stalls++;
      if (fft_in_tvalid && fft_in_tready) begin
        beats++;
        if (fft_in_tlast) streamed++;
      end
      // chroma
      if (chroma_done) begin
        int best, f;
        best = 0;
        for (int c = 1; c < 12; c++) if (chroma[c] > chroma[best]) best = c;
        f = frame_of(n_chroma);
        check(best == TONE_PC[(f / BLOCK) % 4],
              $sformatf("frame %0d: strongest class %0d, tone class %0d", f, best,
                        TONE_PC[(f / BLOCK) % 4]));
        if (best == TONE_PC[(f / BLOCK) % 4]) pitch_ok++;
        for (int b = 0; b < 1024; b += 7)
          check(dut.u_spectrum.mem[b] == 16'(u_fft.mag[b]), $sformatf("spectrum RAM bin %0d", b));
        if (n_chroma == DROP_FRAME - 2) drop_next = 1'b1;
        last_cd = cyc;
        n_chroma++;
      end
      if (frames_dropped > 0) drop_next = 1'b0;
      // novelty
      if (novelty_done) begin
        if (cyc - last_cd - 1 != 3 * (K - 1) + 8) lat_bad++;
        n_nov++;
        if (peak) begin
          n_peak++;
          peak_at.push_back(n_chroma - 1);
        end
      end
      if (scene != scene_q) begin
        check(scene == scene_q + 2'd1, "scene advances by one");
        n_scene++;
      end
      scene_q = scene;
      // delayed audio
      if (dut.audio_valid) begin
        logic [14:0] s;
        if (os_q.size() != AUDIO_DEPTH + 1) depth_bad++;
        s = os_q.pop_front();
        if (dut.audio_delayed != 12'(s >> 3)) audio_bad++;
        n_audio++;
      end
      // galvo SPI
      if (!galvo_cs_n && g_pcs) begin
        g_exp_x = g_snap_x; g_exp_y = g_snap_y; g_bits = 0;
        if (g_start >= 0 && cyc - g_start != 33 * SCK_DIV) g_period_bad++;
        g_start = cyc;
      end
      if (!galvo_cs_n && galvo_sck && !g_psck) begin g_sh = {g_sh[14:0], galvo_sdi}; g_bits++; end
      if (galvo_cs_n && !g_pcs) begin
        if (g_bits != 16 || g_sh[14] != 1'b0 || g_sh[13] != 1'b0 || g_sh[12] != 1'b1) g_bad++;
        else if (g_sh[15] ? (g_sh[11:0] != g_exp_x) : (g_sh[11:0] != g_exp_y)) g_bad++;
        if (!g_first && g_sh[15] != g_expect_b) g_chan_bad++;
        g_first = 0;
        g_expect_b = !g_sh[15];
        g_words++;
      end
      g_pcs = galvo_cs_n; g_psck = galvo_sck; g_snap_x = laser_x; g_snap_y = laser_y;
      // audio SPI
      if (!audio_cs_n && a_pcs) begin
        a_exp = a_snap; a_bits = 0;
        if (a_start >= 0 && cyc - a_start != 33 * SCK_DIV) a_period_bad++;
        a_start = cyc;
      end
      if (!audio_cs_n && audio_sck && !a_psck) begin a_sh = {a_sh[14:0], audio_sdi}; a_bits++; end
      if (audio_cs_n && !a_pcs) begin
        if (a_bits != 16 || a_sh[15:12] != 4'b0011 || a_sh[11:0] != a_exp) a_bad++;
        a_words++;
      end
      a_pcs = audio_cs_n; a_psck = audio_sck; a_snap = dut.audio_delayed;
      // laser
      if (!laser_on) laser_off++;
      if (laser_x != x_q) x_moves++;
      x_q = laser_x;
    end
  end

  // seven-segment display, peak LED and debounced switch
  function automatic int seg_decode(input logic [6:0] s);
    case (~s)   // bit 0 = segment a ... bit 6 = g
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1100111: return 9;  7'b1110111: return 10; 7'b1111100: return 11;
      7'b1011000: return 12; 7'b1011110: return 13; 7'b1111001: return 14;
      7'b1110001: return 15;
      default:    return -1;
    endcase
  endfunction

  logic [31:0] shown_q = '0;
  logic        led_q = 1'b0, sw_q = 1'b0, rst_q = 1'b1;
  int          disp_ok = 0, disp_bad = 0, disp_nonzero = 0, led_flips = 0, sw_changes = 0;
  always @(posedge clk) begin
    if (!rst && !rst_q) begin   // the display is blank for one clock after reset
      int d, n;
      n = 0; d = -1;
      for (int i = 0; i < 8; i++) if (!an[i]) begin n++; d = 7 - i; end
      if (n == 1 && seg[7] && seg_decode(seg[6:0]) == int'(shown_q[31 - 4 * d -: 4])) disp_ok++;
      else disp_bad++;
      if (d >= 0 && seg_decode(seg[6:0]) > 0) disp_nonzero++;
      if (peak_led != led_q) led_flips++;
      if (dut.show_chroma_sw != sw_q) sw_changes++;
    end
    shown_q = (|novelty_smoothed[199:32]) ? 32'hFFFF_FFFF : novelty_smoothed[31:0];
    led_q   = peak_led;
    rst_q   = rst;
    sw_q    = dut.show_chroma_sw;
  end

  int vga_frames = 0, lit = 0;
  logic vs_q = 1'b1;
  always @(posedge clk_pixel) begin
    if (!vga_vs && vs_q) vga_frames++;
    vs_q = vga_vs;
    if (vga_r != 0) lit++;
  end

  // ---------------------------------------------------------------- run
  initial begin
    int expect_peaks [$];
    rst = 1'b1; adc_eoc = 1'b0; adc_sample = 12'd2048; hanning_en = 1'b1;
    show_chroma = 1'b0; hist_range = 2'd1; drop_next = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    run = 1'b1;
    while (n_chroma < FRAMES - 1) begin
      @(negedge clk);
      show_chroma = (n_chroma >= FRAMES / 2);
    end
    repeat (200) @(negedge clk);

    $display("samples=%0d frames=%0d streamed=%0d dropped=%0d stalls=%0d chroma=%0d novelty=%0d",
             n_os, n_frame_done, streamed, frames_dropped, stalls, n_chroma, n_nov);
    $display("peaks=%0d scenes=%0d peak chroma indices=%p", n_peak, n_scene, peak_at);
    $display("audio out=%0d galvo words=%0d audio words=%0d laser off clocks=%0d x moves=%0d",
             n_audio, g_words, a_words, laser_off, x_moves);
    $display("vga frames=%0d lit pixels=%0d", vga_frames, lit);

    check(n_eoc / (1 << OS_LOG2) - n_os <= 1 && n_os > 0, "one oversample per 2^OS_LOG2 strobes");
    check(os_gap_bad == 0, "oversample spacing 128 clocks");
    check(fd_gap_bad == 0 && n_frame_done >= FRAMES - 1, "frame_done every 4096 samples");
    check(tlast_errors == 0, "tlast on beat 4095 only");
    check(stalls > 1000, "stream stalled by tready");
    check(frames_dropped == 0 && streamed == frames_in, "one frame dropped, others complete");
    check(frames_out == n_chroma, "one chromagram per FFT frame");
    check(pitch_ok == n_chroma && n_chroma >= FRAMES - 1, "chromagrams follow the tone");
    check(n_nov == n_chroma && lat_bad == 0, "novelty update per chroma, 3(K-1)+8 clocks");
    for (int b = 0; b < FRAMES; b += BLOCK) begin
      int ci;
      ci = (b <= DROP_FRAME ? b : b - 1) + K / 2;
      if (ci < n_chroma) expect_peaks.push_back(ci);
    end
    check(peak_at == expect_peaks, $sformatf("peaks at %p, expected %p", peak_at, expect_peaks));
    check(n_peak > 0 && n_scene == n_peak, "one scene change per peak");
    check(n_audio > 100 && audio_bad == 0 && depth_bad == 0, "audio delayed by 65536 samples");
    check(a_words > 1000 && a_bad == 0 && a_period_bad == 0, "audio DAC words");
    check(g_words > 1000 && g_bad == 0 && g_chan_bad == 0 && g_period_bad == 0, "galvo DAC words");
    check(x_moves > 1000, "laser moves");
    check(vga_frames >= 2 && lit > 10000, "VGA frames drawn");
    $display("display digits ok=%0d bad=%0d nonzero=%0d led flips=%0d switch changes=%0d",
             disp_ok, disp_bad, disp_nonzero, led_flips, sw_changes);
    check(disp_bad == 0 && disp_nonzero > 0, "seven-segment display shows the smoothed novelty");
    check(led_flips == n_peak, "peak LED toggles on every peak");
    check(sw_changes == 1 && dut.show_chroma_sw == show_chroma, "switch passes the debouncer");
    finish_test();
  end
endmodule
