// fifo_controller: mode-driven front end of a FIFO.
//
// The novelty calculator and the audio delay do not drive FIFO strobes
// directly; they select one of five modes and this block turns the mode
// into read/write strobes and write data for the FIFO it contains:
//   IDLE   - nothing happens
//   LOAD   - append `new_input`
//   UNLOAD - drop the oldest entry
//   CYCLE  - move the oldest entry to the tail (read it and write it back),
//            so DEPTH cycles walk once round the whole contents
//   SHIFT  - drop the oldest entry and append `new_input` in the same clock
// Because the FIFO refuses a write while full, SHIFT on a full FIFO only
// drops the oldest entry; CYCLE on a full FIFO likewise loses the head. A
// full FIFO is therefore unloaded in one clock and loaded in the next, or
// cycled with one free slot. The mode set follows the original design.
module fifo_controller
  import rave_pkg::*;
#(
  parameter int unsigned W     = 192,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  fifo_mode_e     mode,
  input  logic [W-1:0]   new_input,
  output logic [W-1:0]   fifo_output,
  output logic [ABITS:0] data_count,
  output logic           fifo_full,
  output logic           fifo_empty
);
  logic         rd_en, wr_en;
  logic [W-1:0] din;

  always_comb begin
    rd_en = 1'b0;
    wr_en = 1'b0;
    din   = new_input;
    unique case (mode)
      FIFO_IDLE:   ;
      FIFO_LOAD:   wr_en = 1'b1;
      FIFO_UNLOAD: rd_en = 1'b1;
      FIFO_CYCLE: begin
        rd_en = 1'b1;
        wr_en = 1'b1;
        din   = fifo_output;
      end
      FIFO_SHIFT: begin
        rd_en = 1'b1;
        wr_en = 1'b1;
      end
      default: ;
    endcase
  end

  sync_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk  (clk),
    .srst (rst),
    .din  (din),
    .wr_en(wr_en),
    .rd_en(rd_en),
    .dout (fifo_output),
    .full (fifo_full),
    .empty(fifo_empty),
    .count(data_count)
  );
endmodule
