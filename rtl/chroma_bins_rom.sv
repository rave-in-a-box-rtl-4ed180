// chroma_bins_rom: maps an FFT bin to the pitch class it belongs to.
//
// Bin k of an NFFT-point FFT at FS_HZ covers k*FS_HZ/NFFT Hz (about 3.8 Hz
// per bin at 15.625 kHz / 4096). The entry for bin k is the pitch class
// (0 = C ... 11 = B) of the nearest equal-tempered note, A4 = 440 Hz, if
// that note lies between C3 (130.8 Hz) and E7 (2637 Hz), and 12 ("no
// pitch class") otherwise; a bin is nearest to note m when its frequency is
// within a quarter tone of it. Only the first BINS bins are stored. The
// table is built at elaboration: note frequencies are stepped by 2^(1/12)
// and the quarter-tone boundaries by 2^(1/24), in 32.32 fixed point.
// `pitch_class` shows the entry for `addr` two clocks later.
// The table size, width, note range and latency follow the original design;
// the nearest-note rule is this design's reading of it.
module chroma_bins_rom #(
  parameter int unsigned BINS    = 1024,
  parameter int unsigned NFFT    = 4096,
  parameter int unsigned FS_HZ   = 15625,
  parameter int unsigned ABITS   = $clog2(BINS)
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  output logic [3:0]       pitch_class
);
  // 2^(1/12) and 2^(1/24) in 2.62 fixed point would overflow the products;
  // 2.30 is used for the ratios and 32.32 for frequencies.
  localparam longint unsigned SEMI   = 64'd1137589835;  // 2^(1/12) * 2^30
  localparam longint unsigned QUART  = 64'd1105204861;  // 2^(1/24) * 2^30
  localparam longint unsigned C3_Q32 = 64'd561836623381; // 130.8128 Hz * 2^32
  localparam int unsigned     NOTES  = 53;              // C3 (MIDI 48) .. E7 (MIDI 100)

  function automatic logic [3:0] bin_class(input int unsigned k);
    longint unsigned f_bin, note, lo, hi;
    logic [3:0] cls;
    f_bin = (64'(k) * 64'(FS_HZ) << 32) / 64'(NFFT);
    note  = C3_Q32;
    cls   = 4'd12;
    for (int m = 0; m < NOTES; m++) begin
      hi = (note >> 15) * QUART >> 15;
      lo = ((note << 15) / QUART) << 15;
      if (f_bin >= lo && f_bin < hi) cls = 4'(m % 12);
      note = (note >> 15) * SEMI >> 15;
    end
    return cls;
  endfunction

  logic [3:0] rom [BINS];
  logic [3:0] stage1;

  initial begin
    for (int i = 0; i < BINS; i++) rom[i] = bin_class(i);
  end

  always_ff @(posedge clk) begin
    stage1      <= rom[addr];
    pitch_class <= stage1;
  end
endmodule
