// tb_display_8hex: scans a display_8hex with BITS = 5 (four clocks
// per digit) over random 32-bit values and decodes what a viewer would
// see: for each digit strobe, the lit segments are turned back into a hex
// digit with an independent segment map and compared with the nibble of
// the value that the digit shows. Checks that exactly one digit is driven
// at a time, the scan order left to right, the dwell time, that every hex
// digit 0-F is shown, and that reset blanks the display.
module tb_display_8hex;
  import rave_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  localparam int unsigned BITS = 5;
  logic        rst;
  logic [31:0] data;
  logic [6:0]  seg;
  logic [7:0]  strobe;
  bit   [15:0] shown = '0;
  int          prev_digit = -1, dwell = 0;

  display_8hex #(.BITS(BITS)) dut (.*);

  // segments a..g lit (active low inverted) for each hex digit
  function automatic int decode(input logic [6:0] s);
    logic [6:0] on = ~s;   // bit 0 = a ... bit 6 = g
    case (on)
      7'b0111111: return 0;  7'b0000110: return 1;  7'b1011011: return 2;
      7'b1001111: return 3;  7'b1100110: return 4;  7'b1101101: return 5;
      7'b1111101: return 6;  7'b0000111: return 7;  7'b1111111: return 8;
      7'b1100111: return 9;  7'b1110111: return 10; 7'b1111100: return 11;
      7'b1011000: return 12; 7'b1011110: return 13; 7'b1111001: return 14;
      7'b1110001: return 15;
      default:    return -1;
    endcase
  endfunction

  initial begin
    rst = 1'b1; data = 32'h0123_4567;
    repeat (2) @(posedge clk); #1;
    check(seg === 7'h7F && strobe === 8'hFF, "reset blanks the display");
    rst = 1'b0;
    for (int v = 0; v < 40; v++) begin
      data = (v == 0) ? 32'h0123_4567 : (v == 1) ? 32'h89AB_CDEF : $urandom;
      // one full scan with this value: 8 digits x 2^(BITS-2) clocks
      for (int c = 0; c < 8 * (1 << (BITS - 2)); c++) begin
        @(posedge clk); #1;
        begin
          automatic int d = -1, n = 0;
          for (int i = 0; i < 8; i++) if (!strobe[i]) begin n++; d = 7 - i; end
          check(n == 1, $sformatf("one digit driven, strobe %b", strobe));
          if (d >= 0) begin
            automatic int h = decode(seg);
            check(h == int'(data[31 - 4 * d -: 4]),
                  $sformatf("digit %0d shows %0d, value %h", d, h, data));
            if (h >= 0) shown[h] = 1'b1;
            if (d != prev_digit) begin
              if (prev_digit >= 0) begin
                check(d == (prev_digit + 1) % 8, "scan order left to right");
                check(dwell == (1 << (BITS - 2)), $sformatf("dwell %0d clocks", dwell));
              end
              prev_digit = d;
              dwell = 0;
            end
            dwell++;
          end
        end
      end
    end
    check(&shown, "all sixteen hex digits shown");
    finish_test();
  end
endmodule
