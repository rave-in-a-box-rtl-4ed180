// xvga: 1024 x 768 VGA timing at a 65 MHz pixel clock.
//
// hcount runs 0..1343 per line and vcount 0..805 per frame. Pixels
// 0..1023 of lines 0..767 are visible; `blank` is high elsewhere. hsync is
// low for hcount 1048..1183 and vsync low for lines 777..782 (both active
// low, changing at the end of line 776 / 782). All outputs are registered.
// The numbers are those of the standard XGA timing the original used.
module xvga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_SYNC_ON = 1047,
  parameter int unsigned H_SYNC_OFF = 1183,
  parameter int unsigned H_TOTAL  = 1344,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_SYNC_ON = 776,
  parameter int unsigned V_SYNC_OFF = 782,
  parameter int unsigned V_TOTAL  = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  logic hblank, vblank, next_hblank, next_vblank;
  logic hreset, vreset;

  assign hreset      = (hcount == 11'(H_TOTAL - 1));
  assign vreset      = hreset && (vcount == 10'(V_TOTAL - 1));
  assign next_hblank = hreset ? 1'b0 : (hcount == 11'(H_ACTIVE - 1)) ? 1'b1 : hblank;
  assign next_vblank = vreset ? 1'b0 :
                       (hreset && vcount == 10'(V_ACTIVE - 1)) ? 1'b1 : vblank;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hblank <= 1'b0;
      vblank <= 1'b0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= hreset ? '0 : hcount + 1'b1;
      hblank <= next_hblank;
      if (hcount == 11'(H_SYNC_ON))       hsync <= 1'b0;
      else if (hcount == 11'(H_SYNC_OFF)) hsync <= 1'b1;
      if (hreset) vcount <= vreset ? '0 : vcount + 1'b1;
      vblank <= next_vblank;
      if (hreset && vcount == 10'(V_SYNC_ON))       vsync <= 1'b0;
      else if (hreset && vcount == 10'(V_SYNC_OFF)) vsync <= 1'b1;
      blank <= next_vblank | (next_hblank & ~hreset);
    end
  end
endmodule
