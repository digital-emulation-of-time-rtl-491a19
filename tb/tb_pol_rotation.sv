// tb_pol_rotation - random samples and angles; the outputs must equal the
// real-valued rotation X' = c X + s Y, Y' = -s X + c Y within 1 LSB, one
// clock later, on both lanes and on I and Q.
module tb_pol_rotation;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cs_t cs = '0;
  lanes_t x_in = '0, y_in = '0, x_out, y_out;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pol_rotation dut (.clk, .rst_n, .cs, .x_in, .y_in, .in_valid, .x_out, .y_out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(input sample_t v, input real r);
    return ($itor(v) - r <= 1.0) && (r - $itor(v) <= 1.0);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      real ang, c, s;
      lanes_t xi, yi;
      ang = $urandom_range(0, 359) * 3.14159265358979 / 180.0;
      cs.c <= coef_t'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
      cs.s <= coef_t'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
      c = $floor($cos(ang) * 16384.0 + 0.5) / 16384.0;
      s = $floor($sin(ang) * 16384.0 + 0.5) / 16384.0;
      for (int l = 0; l < 2; l++) begin
        xi[l].i = sample_t'(int'($urandom_range(0, 16000)) - 8000);
        xi[l].q = sample_t'(int'($urandom_range(0, 16000)) - 8000);
        yi[l].i = sample_t'(int'($urandom_range(0, 16000)) - 8000);
        yi[l].q = sample_t'(int'($urandom_range(0, 16000)) - 8000);
      end
      x_in <= xi; y_in <= yi; in_valid <= 1;
      @(posedge clk); #1;
      check(out_valid, "valid");
      for (int l = 0; l < 2; l++) begin
        check(near(x_out[l].i, c * xi[l].i + s * yi[l].i), "X I");
        check(near(x_out[l].q, c * xi[l].q + s * yi[l].q), "X Q");
        check(near(y_out[l].i, -s * xi[l].i + c * yi[l].i), "Y I");
        check(near(y_out[l].q, -s * xi[l].q + c * yi[l].q), "Y Q");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
