// dac_spi: continuous SPI writer for the MCP4822 dual 12-bit DAC.
//
// Each frame pulls `cs_n` low, shifts out one 16-bit command word MSB
// first on `sdi`, and raises `cs_n` again for half an SCK period. The DAC
// samples SDI on the rising edge of SCK; `sdi` changes just after each
// falling edge. SCK runs at clk / (2*SCK_DIV) and idles low.
// Command word (MCP4822 data sheet): bit 15 selects channel B (1) or A (0),
// bit 14 is unused, bit 13 is GA (1: gain 1x, 0: gain 2x), bit 12 is
// SHDN (1: output on), bits 11..0 the code.
// With TWO_CHANNELS = 1 (the galvanometer DAC) frames alternate between
// channel A = data_a (y) and channel B = data_b (x) at gain 2x, so each
// channel is refreshed every second frame. With TWO_CHANNELS = 0 (the
// audio DAC) every frame writes data_a to channel A at gain 1x, half the
// galvo gain. The inputs are sampled when a frame starts. A frame lasts
// 33 half periods of SCK: 16 bits and a half period with cs_n high. The word formats follow the original design; the clock
// divider replaces its separate DAC clock and is this design's choice.
module dac_spi #(
  parameter bit          TWO_CHANNELS = 1'b1,
  parameter int unsigned SCK_DIV      = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] data_a,
  input  logic [11:0] data_b,
  output logic        cs_n,
  output logic        sck,
  output logic        sdi
);
  localparam int unsigned DB = (SCK_DIV > 1) ? $clog2(SCK_DIV) : 1;

  logic [DB-1:0] div;
  logic [15:0]   shreg;
  logic [3:0]    bitn;
  logic          channel_b;
  logic          half_tick;

  assign half_tick = (div == DB'(SCK_DIV - 1));
  assign sdi       = shreg[15];

  function automatic logic [15:0] word(input logic ch_b, input logic [11:0] code);
    return {ch_b, 1'b0, TWO_CHANNELS ? 1'b0 : 1'b1, 1'b1, code};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      div       <= '0;
      sck       <= 1'b0;
      cs_n      <= 1'b1;
      bitn      <= '0;
      shreg     <= '0;
      channel_b <= 1'b0;
    end else begin
      div <= half_tick ? '0 : div + 1'b1;
      if (half_tick) begin
        if (cs_n) begin
          // gap over: load the next word, its MSB is set up before SCK rises
          shreg     <= word(TWO_CHANNELS ? channel_b : 1'b0,
                            (TWO_CHANNELS && channel_b) ? data_b : data_a);
          channel_b <= TWO_CHANNELS ? !channel_b : 1'b0;
          bitn      <= '0;
          cs_n      <= 1'b0;
        end else if (!sck) begin
          sck <= 1'b1;                       // DAC samples sdi here
        end else begin
          sck <= 1'b0;
          if (bitn == 4'd15) begin
            cs_n <= 1'b1;                    // rising CS latches the word
          end else begin
            shreg <= {shreg[14:0], 1'b0};
            bitn  <= bitn + 1'b1;
          end
        end
      end
    end
  end
endmodule
