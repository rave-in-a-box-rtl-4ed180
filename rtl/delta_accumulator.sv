// delta_accumulator: signed running sum of the dot products of one update.
//
// While the novelty calculator walks the chroma FIFO it presents one
// unsigned dot product per clock with `add` and a `sub` flag telling
// whether the pair it belongs to counts against the novelty score. The
// accumulator adds or subtracts it; `clear` sets it to zero (clear wins
// over add). `acc` is two's complement and is updated one clock after
// the inputs. The original kept this value in offset binary with the same
// width; the value held is the same.
module delta_accumulator #(
  parameter int unsigned IN_BITS  = 37,
  parameter int unsigned ACC_BITS = 135
) (
  input  logic                       clk,
  input  logic                       clear,
  input  logic                       add,
  input  logic [IN_BITS-1:0]         value,
  input  logic                       sub,
  output logic signed [ACC_BITS-1:0] acc
);
  logic signed [ACC_BITS-1:0] ext;
  assign ext = ACC_BITS'(value);

  always_ff @(posedge clk) begin
    if (clear)    acc <= '0;
    else if (add) acc <= sub ? acc - ext : acc + ext;
  end
endmodule
