// tb_rot_rom - reads all 360 angles and compares cos and sin with the tb's
// own real arithmetic (14 fraction bits, within 1 LSB), checks the one-clock
// read latency and the wrap of angles 360..511.
module tb_rot_rom;
  import pmd_pkg::*;
  logic clk = 0;
  angle_t angle = 0;
  cs_t cs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rot_rom dut (.clk, .angle, .cs);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      real c, s, ra;
      angle <= angle_t'(a);
      @(posedge clk); #1;
      ra = (a >= 360 ? a - 360 : a) * 3.14159265358979 / 180.0;
      c = $cos(ra) * 16384.0; s = $sin(ra) * 16384.0;
      check($itor(cs.c) - c <= 1.0 && c - $itor(cs.c) <= 1.0, $sformatf("cos %0d: %0d vs %f", a, cs.c, c));
      check($itor(cs.s) - s <= 1.0 && s - $itor(cs.s) <= 1.0, $sformatf("sin %0d: %0d vs %f", a, cs.s, s));
    end
    // latency: the new value appears only after the edge
    angle <= 9'd90;
    @(posedge clk); #1;
    angle <= 9'd0;
    #2;
    check(cs.c == 0 && cs.s == 16384, "output holds until the next edge");
    @(posedge clk); #1;
    check(cs.c == 16384 && cs.s == 0, "new angle one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
