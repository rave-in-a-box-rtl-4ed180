// rave_in_a_box: audio-responsive laser projector.
//
// Music comes in through the FPGA's ADC; the design finds the moments where
// the song's structure changes (verse to chorus, a key change, a new
// instrument) and switches the animated laser figure at those moments,
// while the music itself is replayed delayed so that the switch lands on
// the change.
//
// Signal chain (system clock `clk`, 104 MHz in the original):
//   ADC (1 MSPS, 12 bit) -> oversampler (x64, 15 bit, 15.625 kSPS)
//   -> sample_frame_buffer (4096-slot ring, Hanning window)
//   -> frame_streamer -> external FFT magnitude core (AXI-Stream ports)
//   -> chroma_calculator (12 pitch classes per 4096-sample frame)
//   -> novelty_calc (32-chroma checkerboard novelty, EMA, peak)
//   -> scene counter (+1 on every peak)
//   -> interpolator (Bezier curves from the instruction ROM)
//   -> dac_spi (MCP4822, x on B, y on A) and the laser enable.
// The oversampled audio also goes through audio_buffer (65536-sample delay)
// to a second dac_spi for the speakers. FFT magnitudes of bins 0..1023 are
// kept in spectrum_ram and, with the chroma vector, drawn as a bar graph
// on a 1024 x 768 VGA screen running on the pixel clock `clk_pixel`.
//
// The FFT core, ADC and PLL are vendor blocks and stay outside: their
// signals are ports. The laser DAC clock and the graphics point rate come
// from enables on the system clock (SCK = clk / 2*SCK_DIV, one point every
// GFX_DIV clocks, about 6.1 MHz at 104 MHz) instead of separate clocks.
// The chroma vector and the debounced display switches cross to the pixel
// clock without synchronisers: the chroma changes four times a second, the
// switches only by hand, and a torn pixel is harmless. Reset is
// synchronous and active high; the pixel domain gets a synchronised copy.
// The magnitude core's 24-bit output is saturated to the 16 bits the
// chroma and display paths use. The smoothed novelty, the analysis busy
// flag and the delayed-audio strobe are brought out for observation.
// GFX_INIT_FILE, when set, loads the laser artwork into the instruction ROM.
// As on the original board, the switch inputs (hanning_en, show_chroma,
// hist_range) are debounced (DEBOUNCE_DELAY clocks, loaded straight at
// reset), `peak_led` toggles on every peak, and an eight-digit seven-segment
// display (seg, an; active low) shows the smoothed novelty. What that display
// shows, the novelty saturated to 32 bits, is this design's choice, and so
// is driving it from the system clock instead of the pixel clock.
module rave_in_a_box
  import rave_pkg::*;
#(
  parameter int unsigned     OS_LOG2        = 6,
  parameter int unsigned     NFFT           = 4096,
  parameter int unsigned     K              = 32,
  parameter int unsigned     AUDIO_DEPTH    = 65536,
  parameter int unsigned     GFX_DIV        = 17,
  parameter int unsigned     SCK_DIV        = 4,
  parameter longint unsigned PEAK_THRESHOLD = 64'd100000000,
  parameter int unsigned     T_BITS         = 10,
  parameter string           GFX_INIT_FILE  = "",
  parameter int unsigned     DEBOUNCE_DELAY = 1000000
) (
  input  logic              clk,
  input  logic              rst,
  // on-chip ADC
  input  logic [11:0]       adc_sample,
  input  logic              adc_eoc,
  input  logic              hanning_en,
  // to the FFT magnitude core
  output logic [31:0]       fft_in_tdata,
  output logic              fft_in_tvalid,
  input  logic              fft_in_tready,
  output logic              fft_in_tlast,
  input  logic              fft_last_missing,
  // from the FFT magnitude core
  input  logic [23:0]       mag_tdata,
  input  logic [11:0]       mag_tuser,
  input  logic              mag_tvalid,
  input  logic              mag_tlast,
  // analysis results
  output chroma_t           chroma,
  output logic              chroma_done,
  output logic [199:0]      novelty,
  output logic              novelty_done,
  output logic              peak,
  output logic [199:0]      novelty_smoothed,
  output logic              novelty_busy,
  output logic [1:0]        scene,
  output logic              peak_led,
  output logic [7:0]        seg,
  output logic [7:0]        an,
  // galvanometer DAC and laser
  output logic              galvo_cs_n,
  output logic              galvo_sck,
  output logic              galvo_sdi,
  output logic              laser_on,
  output logic [11:0]       laser_x,
  output logic [11:0]       laser_y,
  // delayed-audio DAC
  output logic              audio_cs_n,
  output logic              audio_sck,
  output logic              audio_sdi,
  output logic              audio_valid,
  // VGA histogram display
  input  logic              clk_pixel,
  input  logic              show_chroma,
  input  logic [1:0]        hist_range,
  output logic [3:0]        vga_r,
  output logic [3:0]        vga_g,
  output logic [3:0]        vga_b,
  output logic              vga_hs,
  output logic              vga_vs
);
  localparam int unsigned ABITS = $clog2(NFFT);

  // ------------------------------------------------------------ switches
  logic       hanning_sw, show_chroma_sw;
  logic [1:0] hist_range_sw;

  debounce #(.DELAY(DEBOUNCE_DELAY), .COUNT(4)) u_debounce (
    .clk(clk), .rst(rst), .noisy({hanning_en, show_chroma, hist_range}),
    .clean({hanning_sw, show_chroma_sw, hist_range_sw})
  );

  // ------------------------------------------------------------ audio in
  logic [14:0]      osample;
  logic             osample_done;
  logic [ABITS-1:0] head, rd_addr;
  logic [15:0]      rd_data;
  logic             frame_done;

  oversampler #(.RATIO_LOG2(OS_LOG2), .IN_BITS(12), .OUT_BITS(15)) u_oversampler (
    .clk(clk), .rst(rst), .sample(adc_sample), .eoc(adc_eoc),
    .oversample(osample), .done(osample_done)
  );

  sample_frame_buffer #(.N(NFFT)) u_frame_buffer (
    .clk(clk), .rst(rst), .sample_valid(osample_done), .sample(osample),
    .hanning_en(hanning_sw), .head(head), .frame_done(frame_done),
    .rd_addr(rd_addr), .rd_data(rd_data)
  );

  frame_streamer #(.N(NFFT)) u_streamer (
    .clk(clk), .rst(rst), .start(frame_done), .head(head),
    .rd_addr(rd_addr), .rd_data(rd_data), .last_missing(fft_last_missing),
    .tdata(fft_in_tdata), .tvalid(fft_in_tvalid), .tready(fft_in_tready),
    .tlast(fft_in_tlast)
  );

  // ------------------------------------------------------------ analysis
  logic [15:0]  magnitude;

  // the chroma path takes 16-bit magnitudes; larger ones saturate
  assign magnitude = (|mag_tdata[23:16]) ? 16'hFFFF : mag_tdata[15:0];

  chroma_calculator #(.NFFT(NFFT)) u_chroma (
    .clk(clk), .rst(rst), .valid(mag_tvalid), .index(mag_tuser[ABITS-1:0]),
    .magnitude(magnitude), .last(mag_tlast),
    .chroma(chroma), .done(chroma_done)
  );

  novelty_calc #(.K(K), .TOTAL_BITS(200), .DELTA_BITS(135),
                 .PEAK_THRESHOLD(PEAK_THRESHOLD)) u_novelty (
    .clk(clk), .rst(rst), .new_chroma(chroma), .chroma_done(chroma_done),
    .done(novelty_done), .peak(peak), .novelty(novelty), .smoothed(novelty_smoothed),
    .busy(novelty_busy)
  );

  always_ff @(posedge clk) begin
    if (rst)                       scene <= '0;
    else if (novelty_done && peak) scene <= scene + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                       peak_led <= 1'b0;
    else if (novelty_done && peak) peak_led <= ~peak_led;
  end

  // novelty on the seven-segment display, saturated to eight hex digits
  logic [31:0] novelty_shown;

  assign novelty_shown = (|novelty_smoothed[199:32]) ? 32'hFFFF_FFFF : novelty_smoothed[31:0];

  display_8hex u_display (
    .clk(clk), .rst(rst), .data(novelty_shown), .seg(seg[6:0]), .strobe(an)
  );
  assign seg[7] = 1'b1;   // decimal point off

  // ------------------------------------------------------------ graphics
  logic [$clog2(GFX_DIV+1)-1:0] gfx_div;
  logic                         gfx_step;

  assign gfx_step = (gfx_div == '0);
  always_ff @(posedge clk) begin
    if (rst || gfx_div == ($clog2(GFX_DIV+1))'(GFX_DIV - 1)) gfx_div <= '0;
    else                                                   gfx_div <= gfx_div + 1'b1;
  end

  interpolator #(.T_BITS(T_BITS), .INIT_FILE(GFX_INIT_FILE)) u_interp (
    .clk(clk), .rst(rst), .step(gfx_step), .scene(scene),
    .x(laser_x), .y(laser_y), .laser_on(laser_on)
  );

  dac_spi #(.TWO_CHANNELS(1'b1), .SCK_DIV(SCK_DIV)) u_galvo_dac (
    .clk(clk), .rst(rst), .data_a(laser_y), .data_b(laser_x),
    .cs_n(galvo_cs_n), .sck(galvo_sck), .sdi(galvo_sdi)
  );

  // ------------------------------------------------------------ audio out
  logic [11:0] audio_delayed;

  audio_buffer #(.DEPTH(AUDIO_DEPTH)) u_audio_buffer (
    .clk(clk), .rst(rst), .sample_valid(osample_done), .sample(osample),
    .audio_out(audio_delayed), .out_valid(audio_valid)
  );

  dac_spi #(.TWO_CHANNELS(1'b0), .SCK_DIV(SCK_DIV)) u_audio_dac (
    .clk(clk), .rst(rst), .data_a(audio_delayed), .data_b(12'd0),
    .cs_n(audio_cs_n), .sck(audio_sck), .sdi(audio_sdi)
  );

  // ------------------------------------------------------------ display
  logic [1:0]  rst_px_sync;
  logic        rst_px;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  logic [9:0]  haddr;
  logic [15:0] hdata;
  logic [2:0]  pixel;
  logic [1:0]  hs_delay, vs_delay;

  always_ff @(posedge clk_pixel) rst_px_sync <= {rst_px_sync[0], rst};
  assign rst_px = rst_px_sync[1];

  spectrum_ram #(.DEPTH(1024), .W(16)) u_spectrum (
    .wclk(clk), .we(mag_tvalid && mag_tuser < 12'd1024), .waddr(mag_tuser[9:0]),
    .wdata(magnitude), .rclk(clk_pixel), .raddr(haddr), .rdata(hdata)
  );

  xvga u_xvga (
    .clk(clk_pixel), .rst(rst_px), .hcount(hcount), .vcount(vcount),
    .hsync(hsync), .vsync(vsync), .blank(blank)
  );

  histogram_display u_hist (
    .clk(clk_pixel), .hcount(hcount), .vcount(vcount), .blank(blank),
    .show_chroma(show_chroma_sw), .range(hist_range_sw), .spec_addr(haddr),
    .spec_data(hdata), .chroma(chroma), .pixel(pixel)
  );

  // the display pipeline is two clocks deep; delay the syncs to match
  always_ff @(posedge clk_pixel) begin
    hs_delay <= {hs_delay[0], hsync};
    vs_delay <= {vs_delay[0], vsync};
  end
  assign vga_hs = hs_delay[1];
  assign vga_vs = vs_delay[1];
  assign vga_r  = {4{pixel[0]}};
  assign vga_g  = {4{pixel[1]}};
  assign vga_b  = {4{pixel[2]}};
endmodule
