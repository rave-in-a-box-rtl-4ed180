// fft_mag_model: behavioural stand-in for the FFT-plus-magnitude vendor core.
//
// Not synthesizable; testbench use only. It accepts one N-point frame on an
// AXI-Stream slave port (real part in tdata[15:0], signed), holding tready
// low on a random quarter of the clocks so that the sender has to stall.
// It checks that tlast arrives on beat N-1 and nowhere else. After the frame it
// computes a direct DFT of bins 0..BINS-1 in floating point, waits LATENCY
// clocks, then streams all N bins as (index on m_tuser, magnitude on
// m_tdata), one per clock with occasional one-clock gaps, and tlast on bin
// N-1. Magnitude = |X[k]| >> SCALE_SHIFT, saturated to 16 bits. Bins from BINS
// upwards are sent as zero: the design reads no bin above 1023. When
// `drop_next` is set, the model abandons the next input frame after 100
// beats and pulses `last_missing`, as the real core does when a frame
// goes wrong. Counters report frames accepted, dropped and sent, and the
// number of beats with tlast in the wrong place.
module fft_mag_model #(
  parameter int unsigned N           = 4096,
  parameter int unsigned BINS        = 1024,
  parameter int unsigned SCALE_SHIFT = 10,
  parameter int unsigned LATENCY     = 64
) (
  input  logic        clk,
  input  logic [31:0] s_tdata,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic        s_tlast,
  output logic        last_missing,
  input  logic        drop_next,
  output logic [23:0] m_tdata,
  output logic [11:0] m_tuser,
  output logic        m_tvalid,
  output logic        m_tlast,
  output int          frames_in,
  output int          frames_dropped,
  output int          frames_out,
  output int          tlast_errors
);
  real cos_t [N];
  real x [N];
  int  mag [N];
  bit  dropping_done;

  initial begin
    for (int i = 0; i < N; i++) cos_t[i] = $cos(2.0 * 3.14159265358979 * i / N);
    s_tready = 1'b0; last_missing = 1'b0; m_tvalid = 1'b0; m_tlast = 1'b0;
    m_tdata = '0; m_tuser = '0;
    frames_in = 0; frames_dropped = 0; frames_out = 0; tlast_errors = 0;
    dropping_done = 1'b0;
    forever begin
      int idx;
      bit drop_this;
      idx = 0;
      drop_this = drop_next;
      while (idx < N) begin
        @(negedge clk);
        last_missing = 1'b0;
        s_tready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (s_tvalid && s_tready) begin
          x[idx] = real'($signed(s_tdata[15:0]));
          if (s_tlast != (idx == N - 1)) tlast_errors++;
          idx++;
          if (drop_this && idx == 100) begin
            @(negedge clk);
            s_tready = 1'b0;
            last_missing = 1'b1;
            frames_dropped++;
            drop_this = 1'b0;
            idx = 0;
          end
        end
      end
      @(negedge clk);
      s_tready = 1'b0;
      last_missing = 1'b0;
      frames_in++;
      for (int k = 0; k < N; k++) begin
        mag[k] = 0;
        if (k < BINS) begin
          real re, im, m;
          re = 0.0; im = 0.0;
          for (int n = 0; n < N; n++) begin
            re += x[n] * cos_t[(k * n) % N];
            im += x[n] * cos_t[(k * n + 3 * N / 4) % N];
          end
          m = $sqrt(re * re + im * im) / real'(1 << SCALE_SHIFT);
          mag[k] = (m > 65535.0) ? 65535 : int'($floor(m));
        end
      end
      repeat (LATENCY) @(negedge clk);
      for (int k = 0; k < N; k++) begin
        if ($urandom_range(0, 15) == 0) begin
          m_tvalid = 1'b0;
          @(negedge clk);
        end
        m_tvalid = 1'b1;
        m_tuser  = 12'(k);
        m_tdata  = 24'(mag[k]);
        m_tlast  = (k == N - 1);
        @(negedge clk);
      end
      m_tvalid = 1'b0;
      m_tlast  = 1'b0;
      frames_out++;
    end
  end
endmodule
