// interpolator: traces the curves of the selected scene with the laser.
//
// Counters walk the instruction ROM of the current scene: the curve
// parameter t advances by one on every `step` (the point rate), after
// 2^T_BITS steps the next instruction is fetched, after the last
// instruction of a frame the frame is either repeated (2^FRAME_REPEAT_BITS
// times in all) or the next frame starts, and after the last frame the
// scene's animation loops. When `scene` changes, everything restarts at
// frame 0, instruction 0, t = 0.
// The ROM answers two clocks after its address, so t is delayed two
// clocks to stay with the curve it belongs to. Two combinational Bezier
// evaluators turn (curve, t) into x and y, which are registered together
// with the laser bit: the outputs follow the counters by three clocks.
// Counter structure and sizes follow the original design. There the
// interpolator ran on its own slow clock; here it advances on the `step`
// enable in the system clock domain.
module interpolator
  import rave_pkg::*;
#(
  parameter int unsigned T_BITS            = 10,
  parameter int unsigned FRAME_REPEAT_BITS = 1,
  parameter int unsigned SCENE_BITS        = 2,
  parameter int unsigned FRAME_BITS        = 4,
  parameter int unsigned INSTR_BITS        = 8,
  parameter string       INIT_FILE         = ""
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  step,
  input  logic [SCENE_BITS-1:0] scene,
  output logic [COORD_BITS-1:0] x,
  output logic [COORD_BITS-1:0] y,
  output logic                  laser_on
);
  logic [SCENE_BITS-1:0]        last_scene;
  logic [FRAME_BITS-1:0]        frame;
  logic [INSTR_BITS-1:0]        instr;
  logic [FRAME_REPEAT_BITS-1:0] repeat_cnt;
  logic [T_BITS-1:0]            t, t_d, t_q;
  bezier_instr_t                word;
  logic [COORD_BITS-1:0]        bx, by;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_scene <= '0;
      frame      <= '0;
      instr      <= '0;
      repeat_cnt <= '0;
      t          <= '0;
    end else begin
      last_scene <= scene;
      if (scene != last_scene) begin
        frame      <= '0;
        instr      <= '0;
        repeat_cnt <= '0;
        t          <= '0;
      end else if (step) begin
        t <= t + 1'b1;
        if (&t) begin
          instr <= instr + 1'b1;
          if (&instr) begin
            repeat_cnt <= repeat_cnt + 1'b1;
            if (&repeat_cnt) frame <= frame + 1'b1;
          end
        end
      end
    end
  end

  instruction_rom #(
    .SCENE_BITS(SCENE_BITS), .FRAME_BITS(FRAME_BITS), .INSTR_BITS(INSTR_BITS),
    .INIT_FILE (INIT_FILE)
  ) u_rom (
    .clk (clk),
    .addr({scene, frame, instr}),
    .word(word)
  );

  bezier_coordinate #(.T_BITS(T_BITS)) u_bezier_x (
    .p0(word.p0x), .p1(word.p1x), .p2(word.p2x), .p3(word.p3x), .t(t_q), .out(bx)
  );
  bezier_coordinate #(.T_BITS(T_BITS)) u_bezier_y (
    .p0(word.p0y), .p1(word.p1y), .p2(word.p2y), .p3(word.p3y), .t(t_q), .out(by)
  );

  always_ff @(posedge clk) begin
    t_d      <= t;
    t_q      <= t_d;
    x        <= bx;
    y        <= by;
    laser_on <= word.laser_on;
  end
endmodule
