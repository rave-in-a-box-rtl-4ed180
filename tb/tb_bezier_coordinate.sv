// tb_bezier_coordinate: evaluates random cubic curves at random t and compares
// with the Bernstein polynomial in floating point, rounded down (the two may
// differ by one where the exact value is an integer); checks t = 0 gives
// p0 exactly, straight-line control points give points on the line, and the
// result never leaves the range of the control points.
module tb_bezier_coordinate;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end
  logic [11:0] p0, p1, p2, p3, out;
  logic [9:0]  t;

  bezier_coordinate dut (.p0, .p1, .p2, .p3, .t, .out);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real u, tr, b;
      int e, lo, hi;
      p0 = 12'($urandom); p1 = 12'($urandom); p2 = 12'($urandom); p3 = 12'($urandom);
      t  = (i % 10 == 0) ? 10'd0 : 10'($urandom);
      if (i % 10 == 1) begin p1 = 12'((2 * p0 + p3) / 3); p2 = 12'((p0 + 2 * p3) / 3); end
      #1;
      tr = t / 1024.0;
      u  = 1.0 - tr;
      b  = u*u*u*p0 + 3.0*u*u*tr*p1 + 3.0*u*tr*tr*p2 + tr*tr*tr*p3;
      e  = int'($floor(b));
      check(int'(out) == e || int'(out) == e + 1 || int'(out) == e - 1,
            $sformatf("t=%0d out %0d expected %0d", t, out, e));
      if (t == 0) check(out == p0, "t = 0 gives p0");
      lo = p0; hi = p0;
      if (p1 < lo) lo = p1; if (p2 < lo) lo = p2; if (p3 < lo) lo = p3;
      if (p1 > hi) hi = p1; if (p2 > hi) hi = p2; if (p3 > hi) hi = p3;
      check(out >= lo && out <= hi, "inside the control-point range");
    end
    finish_test();
  end
endmodule
