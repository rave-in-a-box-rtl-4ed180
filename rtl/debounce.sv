// debounce: filters bouncing switch and button levels.
//
// Each of the COUNT inputs has its own counter. When an input differs from
// the level last seen, that level is remembered and the counter restarts;
// once the input has stayed the same for DELAY clocks, it is copied to
// `clean`. A change shorter than DELAY clocks therefore never reaches the
// output, and a lasting change appears DELAY + 2 clocks after it arrives
// at `noisy`. Reset (synchronous, active high) copies the inputs straight
// to the output, so the design starts from the switch positions without
// waiting out the delay.
//
// The per-input counter and the default delay of 1,000,000 clocks (about
// 10 ms at 104 MHz) follow the original board design; loading the outputs
// at reset is this design's own choice (the original tied reset low).
module debounce #(
  parameter int unsigned DELAY = 1000000,
  parameter int unsigned COUNT = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [COUNT-1:0] noisy,
  output logic [COUNT-1:0] clean
);
  localparam int unsigned CW = $clog2(DELAY + 1);

  for (genvar i = 0; i < COUNT; i++) begin : g_input
    logic [CW-1:0] count;
    logic          seen;

    always_ff @(posedge clk) begin
      if (rst) begin
        count    <= '0;
        seen     <= noisy[i];
        clean[i] <= noisy[i];
      end else if (noisy[i] != seen) begin
        seen  <= noisy[i];
        count <= '0;
      end else if (count == CW'(DELAY)) begin
        clean[i] <= seen;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
