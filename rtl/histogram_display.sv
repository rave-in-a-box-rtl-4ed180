// histogram_display: bar graph of the spectrum or the chromagram on VGA.
//
// Spectrum mode: column h shows bin (h >> range) of the spectrum RAM,
// range 0..3 stretching the lowest 1024, 512, 256 or 128 bins across the
// screen; bar height = magnitude >> 7 pixels. Chroma mode: the screen is
// cut into 64-pixel columns, column c < 12 showing pitch class c with
// height chroma[c] >> 6; the rest stays dark. A pixel is white (3'b111)
// when it lies below the top of its bar, counted up from the bottom line
// 767, and black otherwise or while blanked. Two pipeline stages: the RAM
// read / bar height in the first, the comparison in the second, so `pixel`
// lags hcount/vcount by two clocks (sync signals must be delayed to
// match). The scales and layout follow the original design; merging the
// two views into one block with a mode input is this design's choice.
module histogram_display
  import rave_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  input  logic        show_chroma,
  input  logic [1:0]  range,
  output logic [9:0]  spec_addr,
  input  logic [15:0] spec_data,
  input  chroma_t     chroma,
  output logic [2:0]  pixel
);
  logic [3:0]  col;
  logic [9:0]  chroma_h, bar, height;
  logic        blank1, mode1;

  assign spec_addr = hcount[9:0] >> range;
  assign col       = 4'(hcount[9:0] >> 6);

  always_comb begin
    chroma_h = '0;
    if (col < 4'(NUM_PITCH)) chroma_h = 10'(chroma[col] >> 6);
  end

  always_ff @(posedge clk) begin
    // stage 1: the RAM answers; chroma bar computed
    height <= 10'd767 - vcount;
    blank1 <= blank | hcount[10];  // columns past 1023 are never visible
    mode1  <= show_chroma;
    bar    <= chroma_h;
    // stage 2
    pixel  <= (blank1 || height >= (mode1 ? bar : 10'(spec_data >> 7))) ? 3'b000 : 3'b111;
  end
endmodule
