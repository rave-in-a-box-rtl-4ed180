// audio_buffer: delays the audio so it plays in step with the novelty peaks.
//
// A structural change is detected when its chroma reaches the middle of
// the chroma FIFO, about four seconds after it was heard. The audio going
// to the speaker DAC is therefore held back by DEPTH samples (65536 at
// 15.625 kHz, 4.19 s) in a FIFO behind a fifo_controller. Each incoming
// 15-bit sample is cut to 12 bits (>> 3). While the FIFO is filling, the
// sample is simply loaded. Once it is full, the oldest sample is unloaded
// first (it becomes `audio_out`, with a one-clock `out_valid` strobe) and
// the new sample is loaded in the next clock, because the FIFO does not
// accept a write while full. A sample therefore leaves exactly DEPTH
// samples after it entered. The sequencing follows the original design.
module audio_buffer
  import rave_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned IN_W   = 15,
  parameter int unsigned W      = 12
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sample_valid,
  input  logic [IN_W-1:0] sample,
  output logic [W-1:0]    audio_out,
  output logic            out_valid
);
  typedef enum logic [1:0] {B_IDLE, B_UNLOAD, B_LOAD} bstate_e;

  bstate_e                   state;
  fifo_mode_e                mode;
  logic [W-1:0]              pending;
  logic [W-1:0]              fifo_out;
  logic [$clog2(DEPTH):0]    count;
  logic                      full, empty;

  always_comb begin
    unique case (state)
      B_UNLOAD: mode = FIFO_UNLOAD;
      B_LOAD:   mode = FIFO_LOAD;
      default:  mode = FIFO_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      state     <= B_IDLE;
      pending   <= '0;
      audio_out <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (sample_valid) begin
          pending <= W'(sample >> (IN_W - W));
          state   <= full ? B_UNLOAD : B_LOAD;
        end
        B_UNLOAD: begin
          audio_out <= fifo_out;
          out_valid <= 1'b1;
          state     <= B_LOAD;
        end
        B_LOAD:  state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  fifo_controller #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk        (clk),
    .rst        (rst),
    .mode       (mode),
    .new_input  (pending),
    .fifo_output(fifo_out),
    .data_count (count),
    .fifo_full  (full),
    .fifo_empty (empty)
  );

  a_unload_not_empty: assert property (@(posedge clk) disable iff (rst)
    state == B_UNLOAD |-> !empty);
  a_full_is_depth: assert property (@(posedge clk) disable iff (rst)
    full == (count == ($clog2(DEPTH)+1)'(DEPTH)));
endmodule
