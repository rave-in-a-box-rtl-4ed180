// sync_fifo: single-clock FIFO with first-word fall-through.
//
// DEPTH entries of W bits held in a memory with read and write pointers
// and an occupancy count. `dout` always shows the oldest entry; `rd_en`
// removes it, `wr_en` appends `din`. It keeps the behaviour of the vendor
// FIFO the original design used: a write while the FIFO is full is ignored
// even if a read is made in the same clock, so a full FIFO has to be read
// in one clock and written in the next. A read while empty is ignored.
// `srst` empties it synchronously. `count` is the number of entries.
module sync_fifo #(
  parameter int unsigned W     = 192,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           srst,
  input  logic [W-1:0]   din,
  input  logic           wr_en,
  input  logic           rd_en,
  output logic [W-1:0]   dout,
  output logic           full,
  output logic           empty,
  output logic [ABITS:0] count
);
  logic [W-1:0]     mem [DEPTH];
  logic [ABITS-1:0] rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == (ABITS+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (srst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == ABITS'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == ABITS'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (ABITS+1)'(do_wr) - (ABITS+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (srst) count <= (ABITS+1)'(DEPTH));
endmodule
