// tb_theta_gen - with period 0 the fixed angle must pass; with period P a
// new angle min + (r*(max-min+1))>>16 (r from the tb's own xorshift32 model)
// must appear every P clocks exactly, with a one-clock 'update' pulse, stay
// in [min, max] and cover the whole range.
module tb_theta_gen;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] period = 0;
  angle_t theta_min = 0, theta_max = 0, theta_fixed = 0, theta;
  logic update;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  theta_gen #(.SEED(32'h1357_9BDF)) dut (.clk, .rst_n, .period, .theta_min, .theta_max, .theta_fixed, .theta, .update);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int last, seen [16], n_upd;
    r = 32'h1357_9BDF;
    theta_fixed = 9'd27;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk); #1;
    check(theta == 27 && !update, "period 0 gives the fixed angle");
    theta_fixed <= 9'd33;
    @(posedge clk); @(posedge clk); #1;
    check(theta == 33, "fixed angle follows its input");
    theta_min <= 9'd3; theta_max <= 9'd15;
    period <= 32'd7;
    last = -1; n_upd = 0;
    for (int t = 0; t < 7000; t++) begin
      @(posedge clk); #1;
      if (update) begin
        logic [31:0] p;
        r = r ^ (r << 13); r = r ^ (r >> 17); r = r ^ (r << 5);
        p = (32'(r[15:0]) * 32'd13) >> 16;
        check(theta == angle_t'(3 + p), $sformatf("angle %0d want %0d", theta, 3 + p));
        check(theta >= 3 && theta <= 15, "angle in range");
        if (last >= 0) check(t - last == 7, $sformatf("update spacing %0d", t - last));
        last = t;
        seen[theta - 3]++;
        n_upd++;
      end
    end
    check(n_upd >= 999 && n_upd <= 1000, $sformatf("%0d updates", n_upd));
    for (int a = 0; a < 13; a++) check(seen[a] > 40, $sformatf("angle %0d seen %0d times", a + 3, seen[a]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
