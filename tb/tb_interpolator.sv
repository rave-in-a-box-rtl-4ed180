// tb_interpolator: runs the interpolator built small (t of 2 bits, 16
// curves per frame, 4 frames, each frame drawn twice) with a random step
// enable, and follows it with an independent model of its counters. Each
// output point is compared with the Bezier curve of the ROM word the model
// says is current, evaluated in floating point (tolerance 1), and the laser
// bit with that word's. Scene changes in the middle of a curve must
// restart at frame 0, curve 0, t 0. Counts frame repeats, frame advances
// and scene changes.
module tb_interpolator;
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
  localparam int TB = 2, IB = 4, FB = 2, SB = 2, RB = 1;
  logic          rst, step, laser_on;
  logic [SB-1:0] scene;
  logic [11:0]   x, y;

  interpolator #(.T_BITS(TB), .FRAME_REPEAT_BITS(RB), .SCENE_BITS(SB), .FRAME_BITS(FB),
                 .INSTR_BITS(IB)) dut (.clk, .rst, .step, .scene, .x, .y, .laser_on);

  int m_t, m_i, m_r, m_f;                       // model counters
  int h_addr [3], h_t [3];                      // the three clocks of latency
  int m_scene_q = 0, repeats = 0, advances = 0, scene_changes = 0, points = 0;

  function automatic int bez(input int a, b, c, d, input int t);
    real tr, u;
    tr = t / real'(1 << TB);
    u  = 1.0 - tr;
    return int'($floor(u*u*u*a + 3.0*u*u*tr*b + 3.0*u*tr*tr*c + tr*tr*tr*d));
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      m_t = 0; m_i = 0; m_r = 0; m_f = 0; m_scene_q = 0;
    end else begin
      // outputs now belong to the counters of three clocks ago
      if (points > 3) begin
        bezier_instr_t w;
        int ex, ey;
        w  = dut.u_rom.rom[h_addr[2]];
        ex = bez(w.p0x, w.p1x, w.p2x, w.p3x, h_t[2]);
        ey = bez(w.p0y, w.p1y, w.p2y, w.p3y, h_t[2]);
        check(int'(x) - ex <= 1 && ex - int'(x) <= 1 && int'(y) - ey <= 1 && ey - int'(y) <= 1,
              $sformatf("point (%0d,%0d) expected (%0d,%0d)", x, y, ex, ey));
        check(laser_on == w.laser_on, "laser bit");
      end
      points++;
      h_addr[2] = h_addr[1]; h_t[2] = h_t[1];
      h_addr[1] = h_addr[0]; h_t[1] = h_t[0];
      h_addr[0] = (int'(scene) << (FB + IB)) | (m_f << IB) | m_i;
      h_t[0]    = m_t;
      // model counters advance at this edge
      if (int'(scene) != m_scene_q) begin
        m_t = 0; m_i = 0; m_r = 0; m_f = 0; scene_changes++;
      end else if (step) begin
        m_t = (m_t + 1) % (1 << TB);
        if (m_t == 0) begin
          m_i = (m_i + 1) % (1 << IB);
          if (m_i == 0) begin
            m_r = (m_r + 1) % (1 << RB);
            if (m_r == 0) begin m_f = (m_f + 1) % (1 << FB); advances++; end
            else repeats++;
          end
        end
      end
      m_scene_q = scene;
    end
  end

  initial begin
    rst = 1'b1; step = 1'b0; scene = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 2) != 0);
      if (i % 1500 == 1499) scene = scene + 1'b1;
    end
    check(dut.frame == 2'(m_f) && dut.instr == 4'(m_i), "counters agree at the end");
    $display("repeats=%0d frame-advances=%0d scene-changes=%0d", repeats, advances, scene_changes);
    check(repeats > 2 && advances > 2 && scene_changes == 3, "all counter paths used");
    finish_test();
  end
endmodule
