// chroma_calculator: folds one FFT magnitude frame into a 12-bin chromagram.
//
// The FFT core streams (index, magnitude) pairs, one per valid clock, index
// 0 to NFFT-1, with `last` on the final one. For indices below BINS the
// chroma bin ROM gives the pitch class; its two-clock latency is matched by
// delaying the magnitude and flags by two clocks. Magnitudes of bins with a
// pitch class are added into twelve INNER_BITS accumulators, which saturate
// instead of wrapping. When the `last` beat comes out of the delay, each
// accumulator is shifted down to CHROMA_BITS (by INNER_BITS-CHROMA_BITS),
// published on `chroma`, `done` pulses for one clock and the accumulators
// restart from zero. Binning and scaling follow the original design;
// saturation is this design's choice.
module chroma_calculator
  import rave_pkg::*;
#(
  parameter int unsigned INNER_BITS = 18,
  parameter int unsigned BINS       = 1024,
  parameter int unsigned NFFT       = 4096,
  parameter int unsigned FS_HZ      = 15625
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    valid,
  input  logic [$clog2(NFFT)-1:0] index,
  input  logic [CHROMA_BITS-1:0]  magnitude,
  input  logic                    last,
  output chroma_t                 chroma,
  output logic                    done
);
  localparam int unsigned SHIFT = INNER_BITS - CHROMA_BITS;
  localparam int unsigned BBITS = $clog2(BINS);

  logic [3:0]             pclass;
  logic [1:0]             valid_q, last_q, inrange_q;
  logic [CHROMA_BITS-1:0] mag_q [2];
  logic [INNER_BITS-1:0]  acc [NUM_PITCH];
  logic [INNER_BITS:0]    sum;

  chroma_bins_rom #(.BINS(BINS), .NFFT(NFFT), .FS_HZ(FS_HZ)) u_bins (
    .clk        (clk),
    .addr       (index[BBITS-1:0]),
    .pitch_class(pclass)
  );

  always_comb begin
    sum = '0;
    if (pclass < 4'(NUM_PITCH))
      sum = {1'b0, acc[pclass]} + (INNER_BITS+1)'(mag_q[1]);
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      valid_q   <= '0;
      last_q    <= '0;
      inrange_q <= '0;
      chroma    <= '0;
      for (int i = 0; i < NUM_PITCH; i++) acc[i] <= '0;
    end else begin
      valid_q   <= {valid_q[0], valid};
      last_q    <= {last_q[0], valid && last};
      inrange_q <= {inrange_q[0], index < ($clog2(NFFT))'(BINS)};
      if (valid_q[1]) begin
        if (last_q[1]) begin
          for (int i = 0; i < NUM_PITCH; i++) begin
            chroma[i] <= CHROMA_BITS'(acc[i] >> SHIFT);
            acc[i]    <= '0;
          end
          done <= 1'b1;
        end else if (inrange_q[1] && pclass < 4'(NUM_PITCH)) begin
          acc[pclass] <= sum[INNER_BITS] ? '1 : sum[INNER_BITS-1:0];
        end
      end
    end
    mag_q[0] <= magnitude;
    mag_q[1] <= mag_q[0];
  end
endmodule
