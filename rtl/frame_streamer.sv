// frame_streamer: sends one 4096-sample window to the FFT core.
//
// When `start` pulses (the circular sample buffer has just written slot
// N-1), the streamer reads the N samples oldest first, starting from
// head+1, and presents them on an AXI-Stream master port. Samples are
// stored unsigned with an offset of 2^15; the streamer removes the offset
// (flips the MSB) and sends {16'b0, signed sample}, the real part in the
// low half and a zero imaginary part. `tlast` marks the N-th sample.
// The buffer's read port has one clock of latency, so the read address
// for the next sample is issued in the same clock as the handshake that
// consumes the current one; `tvalid`/`tdata`/`tlast` never depend on
// `tready` combinationally. If the core reports `last_missing`, the frame
// is abandoned. This is the original design's streaming scheme; starting
// at the oldest sample rather than at the head is this design's choice.
module frame_streamer #(
  parameter int unsigned N     = 4096,
  parameter int unsigned ABITS = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [ABITS-1:0] head,
  output logic [ABITS-1:0] rd_addr,
  input  logic [15:0]      rd_data,
  input  logic             last_missing,
  output logic [31:0]      tdata,
  output logic             tvalid,
  input  logic             tready,
  output logic             tlast
);
  logic             sending;
  logic [ABITS-1:0] base, cnt, cnt_next;
  logic             advance;

  assign advance  = sending && tready;
  assign cnt_next = advance ? cnt + 1'b1 : cnt;
  assign rd_addr  = sending ? base + cnt_next : head + 1'b1;

  assign tvalid = sending;
  assign tlast  = sending && (cnt == ABITS'(N - 1));
  assign tdata  = {16'b0, ~rd_data[15], rd_data[14:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sending <= 1'b0;
      base    <= '0;
      cnt     <= '0;
    end else if (!sending) begin
      if (start) begin
        sending <= 1'b1;
        base    <= head + 1'b1;
        cnt     <= '0;
      end
    end else if (last_missing) begin
      sending <= 1'b0;
    end else begin
      cnt <= cnt_next;
      if (advance && tlast) sending <= 1'b0;
    end
  end
endmodule
