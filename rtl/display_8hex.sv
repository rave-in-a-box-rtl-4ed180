// display_8hex: shows a 32-bit value as eight hex digits on a multiplexed
// seven-segment display.
//
// A free-running counter of BITS+1 bits selects one digit at a time with
// its top three bits: digit 0 (the leftmost, data[31:28]) first, digit 7
// (data[3:0]) last, each lit for 2^(BITS-2) clocks. `strobe` drives the
// digit anodes and `seg` the segments, both active low, registered, and
// changing together one clock after the counter moves on; `seg` bit 0 is
// segment A and bit 6 segment G. With BITS = 13 a digit is lit for 2048
// clocks, a full scan takes 16384 clocks (about 160 us at 104 MHz).
//
// The scan order, counter size and segment patterns follow the original
// board design; the synchronous reset is this design's own choice.
module display_8hex #(
  parameter int unsigned BITS = 13
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data,
  output logic [6:0]  seg,
  output logic [7:0]  strobe
);
  logic [BITS:0] counter;
  logic [2:0]    digit;
  logic [3:0]    nibble;

  // active-low segments g..a for one hex digit
  function automatic logic [6:0] hex_segments(input logic [3:0] h);
    case (h)
      4'h0: return 7'b100_0000;
      4'h1: return 7'b111_1001;
      4'h2: return 7'b010_0100;
      4'h3: return 7'b011_0000;
      4'h4: return 7'b001_1001;
      4'h5: return 7'b001_0010;
      4'h6: return 7'b000_0010;
      4'h7: return 7'b111_1000;
      4'h8: return 7'b000_0000;
      4'h9: return 7'b001_1000;
      4'hA: return 7'b000_1000;
      4'hB: return 7'b000_0011;
      4'hC: return 7'b010_0111;
      4'hD: return 7'b010_0001;
      4'hE: return 7'b000_0110;
      default: return 7'b000_1110;
    endcase
  endfunction

  assign digit  = counter[BITS -: 3];
  assign nibble = data[31 - 4 * digit -: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0;
      seg     <= 7'h7F;
      strobe  <= 8'hFF;
    end else begin
      counter <= counter + 1'b1;
      seg     <= hex_segments(nibble);
      strobe  <= ~(8'h80 >> digit);
    end
  end
endmodule
