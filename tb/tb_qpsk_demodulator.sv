// tb_qpsk_demodulator - random complex samples; the decided bits must be the
// signs of I (bit 1) and Q (bit 0) one clock later.
module tb_qpsk_demodulator;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t sym = '0;
  logic [1:0] bits;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qpsk_demodulator dut (.clk, .rst_n, .sym, .in_valid, .bits, .out_valid);

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
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      int vi, vq;
      vi = int'($urandom_range(0, 65535)) - 32768;
      vq = int'($urandom_range(0, 65535)) - 32768;
      sym.i <= sample_t'(vi);
      sym.q <= sample_t'(vq);
      in_valid <= 1;
      @(posedge clk);
      #1;
      check(out_valid == 1, "valid");
      check(bits == {vi < 0, vq < 0}, $sformatf("decision for %0d,%0d", vi, vq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
