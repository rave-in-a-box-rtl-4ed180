// dot_engine: pipelined dot product of two chroma vectors.
//
// Twelve 16 x 16 products are registered in the first stage, summed in
// pairs in the second, the six pair sums are combined into two sums of
// four and one of two in the third, and the last stage adds these three
// into the result. `dot` is a.b for the inputs presented four clocks
// earlier; a new pair can be presented every clock. The original sized the
// result at 35 bits; twelve full-scale products need 36, which is the
// default here so that the result never wraps. The original design
// moved to this pipelined form because the 12 multiplies and 11 additions
// did not fit one clock at 104 MHz; its latency of four clocks is kept.
module dot_engine
  import rave_pkg::*;
#(
  parameter int unsigned OUT_BITS = 36
) (
  input  logic                clk,
  input  chroma_t             a,
  input  chroma_t             b,
  output logic [OUT_BITS-1:0] dot
);
  localparam int unsigned P = 2 * CHROMA_BITS;

  logic [P-1:0]   prod  [NUM_PITCH];
  logic [P:0]     pair  [NUM_PITCH/2];
  logic [P+1:0]   quad0, quad1, pair45;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PITCH; i++) prod[i] <= a[i] * b[i];
    for (int i = 0; i < NUM_PITCH/2; i++)
      pair[i] <= {1'b0, prod[2*i]} + {1'b0, prod[2*i+1]};
    quad0  <= {1'b0, pair[0]} + {1'b0, pair[1]};
    quad1  <= {1'b0, pair[2]} + {1'b0, pair[3]};
    pair45 <= {1'b0, pair[4]} + {1'b0, pair[5]};
    dot    <= OUT_BITS'(quad0) + OUT_BITS'(quad1) + OUT_BITS'(pair45);
  end
endmodule
