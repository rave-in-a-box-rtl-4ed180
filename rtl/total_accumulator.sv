// total_accumulator: the running novelty score.
//
// The score is kept in ACC_BITS-bit offset binary: 2^(ACC_BITS-1) stands
// for zero, so it can go negative without a sign bit and compare as an
// unsigned number. Each `add` adds the signed `delta`; the result is
// clamped to 0 and to the all-ones value instead of wrapping. `rst` puts
// the score back to the zero point. The total is updated one clock after
// `add`. Width, offset encoding and clamping follow the original design.
module total_accumulator #(
  parameter int unsigned ACC_BITS   = 200,
  parameter int unsigned DELTA_BITS = 135
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          add,
  input  logic signed [DELTA_BITS-1:0]  delta,
  output logic        [ACC_BITS-1:0]    total
);
  localparam logic [ACC_BITS-1:0] ZERO = ACC_BITS'(1) << (ACC_BITS - 1);

  logic signed [ACC_BITS+1:0] sum;
  assign sum = $signed({2'b00, total}) + (ACC_BITS+2)'(delta);

  always_ff @(posedge clk) begin
    if (rst) begin
      total <= ZERO;
    end else if (add) begin
      if (sum < 0)                          total <= '0;
      else if (sum[ACC_BITS+1:ACC_BITS] != 2'b00) total <= '1;
      else                                  total <= sum[ACC_BITS-1:0];
    end
  end
endmodule
