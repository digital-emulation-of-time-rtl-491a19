// tb_error_counter - the received stream is the reference delayed by L clocks
// with bit errors injected at known places. Checks the bit and error counts
// against the tb's own tally, a wrong delay (many errors) and 'clear'.
module tb_error_counter;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [7:0] delay;
  logic [1:0] ref_bits = 0, rx_bits = 0;
  logic ref_valid = 0, rx_valid = 0;
  logic [63:0] bits_cnt, errors_cnt;
  int checks = 0, failures = 0;
  localparam int L = 37;

  always #5 clk = ~clk;
  error_counter #(.BITS(2), .CNT_W(64), .MAX_DELAY(256)) dut (
    .clk, .rst_n, .clear, .delay, .ref_bits, .ref_valid, .rx_bits, .rx_valid, .bits_cnt, .errors_cnt);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] sent [$];

  // n clocks: reference r(t); received bits r(t-L) ^ e(t) once t >= L.
  // Returns the bits and bit errors the counter must have added.
  task automatic run(input int n, input int err_every, output longint exp_bits, output longint exp_err);
    exp_bits = 0; exp_err = 0;
    sent.delete();
    for (int t = 0; t < n; t++) begin
      logic [1:0] r, e;
      r = 2'($urandom);
      sent.push_back(r);
      ref_bits  <= r;
      ref_valid <= 1;
      if (t >= L) begin
        e = (err_every != 0 && t % err_every == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
        rx_bits  <= sent[t-L] ^ e;
        rx_valid <= 1;
        exp_bits += 2;
        exp_err  += longint'(e[0]) + longint'(e[1]);
      end else begin
        rx_valid <= 0;
      end
      @(posedge clk);
    end
    rx_valid  <= 0;
    ref_valid <= 0;
  endtask

  initial begin
    longint eb, ee;
    delay = 8'(L);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(5000, 7, eb, ee);
    @(posedge clk); #1;
    check(bits_cnt == 64'(eb), $sformatf("bits %0d want %0d", bits_cnt, eb));
    check(errors_cnt == 64'(ee), $sformatf("errors %0d want %0d", errors_cnt, ee));
    check(ee > 0, "errors were injected");
    clear <= 1; @(posedge clk); clear <= 0; #1;
    check(bits_cnt == 0 && errors_cnt == 0, "clear zeroes the counters");
    run(3000, 0, eb, ee);
    @(posedge clk); #1;
    check(errors_cnt == 0, $sformatf("error-free run: %0d errors", errors_cnt));
    check(bits_cnt == 64'(eb), $sformatf("bits after clear %0d want %0d", bits_cnt, eb));
    // wrong delay: about half of the bits differ
    clear <= 1; delay <= 8'(L + 3); @(posedge clk); clear <= 0;
    run(3000, 0, eb, ee);
    @(posedge clk); #1;
    check(errors_cnt > bits_cnt / 3 && errors_cnt < (2 * bits_cnt) / 3,
          $sformatf("misaligned: %0d of %0d", errors_cnt, bits_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
