// hanning_rom: read-only table of the Hanning window.
//
// Entry n holds w[n] = sin^2(pi*n/N) = 0.5*(1 - cos(2*pi*n/N)) scaled so
// that 1.0 reads as 65535 (unsigned 0.16 fixed point). The table is computed
// while the design is elaborated, with a Taylor series for sin in 2.30
// fixed point, so no data file is needed; the error is below one LSB.
// Reads are registered twice: `coef` shows the entry for `addr` two clocks
// later, the two-cycle latency of the block RAM the original design used.
// Size, width and latency follow the original; the formula is the textbook
// Hanning window.
module hanning_rom #(
  parameter int unsigned N     = 4096,
  parameter int unsigned W     = 16,
  parameter int unsigned ABITS = $clog2(N)
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  output logic [W-1:0]     coef
);
  localparam longint unsigned ONE  = 64'd1 << 30;
  localparam longint unsigned PI30 = 64'd3373259426;  // pi * 2^30

  // sin(pi*m/N) for 0 <= m <= N/2, in 2.30 fixed point
  function automatic longint unsigned sin_q30(input longint unsigned m);
    longint x, x2, term, acc;
    x    = longint'((PI30 * m) / 64'(N));
    x2   = (x * x) >>> 30;
    term = x;
    acc  = x;
    for (int k = 1; k <= 7; k++) begin
      term = -(((term * x2) >>> 30) / ((2*k) * (2*k + 1)));
      acc  = acc + term;
    end
    return (acc < 0) ? 64'd0 : longint'(acc);
  endfunction

  function automatic logic [W-1:0] hann(input int unsigned n);
    longint unsigned m, s, s2;
    m  = (n <= N/2) ? 64'(n) : 64'(N - n);
    s  = sin_q30(m);
    if (s > ONE) s = ONE;
    s2 = (s * s) >> 30;
    return W'((s2 * ((64'd1 << W) - 1) + (ONE >> 1)) >> 30);
  endfunction

  logic [W-1:0] rom [N];
  logic [W-1:0] stage1;

  initial begin
    for (int i = 0; i < N; i++) rom[i] = hann(i);
  end

  always_ff @(posedge clk) begin
    stage1 <= rom[addr];
    coef   <= stage1;
  end
endmodule
