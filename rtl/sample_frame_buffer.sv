// sample_frame_buffer: the 4096-sample circular audio window feeding the FFT.
//
// Every new 15-bit oversample is padded to 16 bits (zero LSB), multiplied
// by the Hanning coefficient of its slot and shifted right by 16, or stored
// as is when `hanning_en` is low. It is written at the next slot of a
// circular 4096 x 16 block RAM. The window ROM has two cycles of latency,
// so the sample and its slot address are carried through a matching
// two-stage pipeline: the write happens three clocks after `sample_valid`.
// `head` is the slot last written and `frame_done` pulses with the write of
// slot 4095, once per 4096 samples, which is when a new FFT frame starts.
// A second, independent port reads one word per clock (`rd_data` one clock
// after `rd_addr`). Sizes, the windowing multiply and the shift follow the
// original design; the enable input stands in for its board switch.
module sample_frame_buffer #(
  parameter int unsigned N     = 4096,
  parameter int unsigned W     = 16,
  parameter int unsigned ABITS = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample_valid,
  input  logic [W-2:0]     sample,
  input  logic             hanning_en,
  output logic [ABITS-1:0] head,
  output logic             frame_done,
  input  logic [ABITS-1:0] rd_addr,
  output logic [W-1:0]     rd_data
);
  logic [W-1:0]     ram [N];
  logic [ABITS-1:0] next_slot;
  logic [W-1:0]     coef;
  logic [1:0]       valid_q;
  logic [W-2:0]     sample_q  [2];
  logic [ABITS-1:0] slot_q    [2];
  logic [1:0]       en_q;
  logic [W-1:0]     padded, windowed;
  logic [2*W-1:0]   product;

  hanning_rom #(.N(N), .W(W)) u_window (
    .clk (clk),
    .addr(next_slot),
    .coef(coef)
  );

  assign padded   = {sample_q[1], 1'b0};
  assign product  = padded * coef;
  assign windowed = en_q[1] ? W'(product >> W) : padded;

  always_ff @(posedge clk) begin
    if (rst) begin
      next_slot  <= '0;
      head       <= ABITS'(N - 1);
      valid_q    <= '0;
      frame_done <= 1'b0;
    end else begin
      valid_q    <= {valid_q[0], sample_valid};
      frame_done <= 1'b0;
      if (sample_valid) next_slot <= next_slot + 1'b1;
      if (valid_q[1]) begin
        head       <= slot_q[1];
        frame_done <= &slot_q[1];
      end
    end
    sample_q[0] <= sample;
    sample_q[1] <= sample_q[0];
    slot_q[0]   <= next_slot;
    slot_q[1]   <= slot_q[0];
    en_q        <= {en_q[0], hanning_en};
  end

  always_ff @(posedge clk) begin
    if (valid_q[1]) ram[slot_q[1]] <= windowed;
    rd_data <= ram[rd_addr];
  end
endmodule
