// spectrum_ram: dual-clock store for the displayed spectrum.
//
// FFT magnitudes of bins 0..DEPTH-1 are written on the system clock as
// they stream out of the FFT core; the VGA display reads them on the pixel
// clock, one word per clock, `rdata` one rclk after `raddr`. A simple
// dual-port block RAM; sizes follow the original design.
module spectrum_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16,
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  logic [W-1:0]     wdata,
  input  logic             rclk,
  input  logic [ABITS-1:0] raddr,
  output logic [W-1:0]     rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) if (we) mem[waddr] <= wdata;
  always_ff @(posedge rclk) rdata <= mem[raddr];
endmodule
