// oversampler: 64x oversampling of the on-chip ADC.
//
// Each end-of-conversion strobe adds the 12-bit sample to an accumulator.
// On the 64th sample the sum (18 bits) is rounded and shifted right by 3,
// giving a 15-bit sample: 3 bits more resolution at 1/64 of the rate
// (1 MSPS in, 15.625 kSPS out). `done` pulses for one cycle, one clock after
// the eoc that completed the group, together with the new `oversample`.
// The ratio, widths and the +4 rounding follow the original design; the
// synchronous reset is this design's addition.
module oversampler #(
  parameter int unsigned RATIO_LOG2 = 6,
  parameter int unsigned IN_BITS    = 12,
  parameter int unsigned OUT_BITS   = 15
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [IN_BITS-1:0]  sample,
  input  logic                eoc,
  output logic [OUT_BITS-1:0] oversample,
  output logic                done
);
  localparam int unsigned ACC_BITS = IN_BITS + RATIO_LOG2;
  localparam int unsigned SHIFT    = ACC_BITS - OUT_BITS;

  logic [RATIO_LOG2-1:0] count;
  logic [ACC_BITS-1:0]   acc;
  logic [ACC_BITS:0]     total;

  assign total = {1'b0, acc} + (ACC_BITS+1)'(sample);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      count      <= '0;
      acc        <= '0;
      oversample <= '0;
    end else if (eoc) begin
      count <= count + 1'b1;
      if (&count) begin
        oversample <= OUT_BITS'((total + (ACC_BITS+1)'(SHIFT > 0 ? (1 << (SHIFT-1)) : 0)) >> SHIFT);
        done       <= 1'b1;
        acc        <= '0;
      end else begin
        acc <= total[ACC_BITS-1:0];
      end
    end
  end
endmodule
