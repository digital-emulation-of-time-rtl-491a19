// tb_qpsk_modulator - applies every bit pair and checks the symbol
// (+AMP for a 0 bit, -AMP for a 1 bit; bit 1 on I, bit 0 on Q) one clock later,
// and that 'out_valid' follows 'in_valid'.
module tb_qpsk_modulator;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] bits = 0;
  cplx_t sym;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qpsk_modulator #(.AMP(3000)) dut (.clk, .rst_n, .bits, .in_valid, .sym, .out_valid);

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
    for (int n = 0; n < 64; n++) begin
      logic [1:0] b;
      b = 2'(n);
      bits <= b;
      in_valid <= (n % 5 != 4);
      @(posedge clk);
      #1;
      check(out_valid == (n % 5 != 4), "valid follows");
      if (n % 5 != 4) begin
        check(sym.i == (b[1] ? -16'sd3000 : 16'sd3000), $sformatf("I for %b", b));
        check(sym.q == (b[0] ? -16'sd3000 : 16'sd3000), $sformatf("Q for %b", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
