// tb_rng - checks the RNG against an independent xorshift32 model: every
// output word, the one-clock 'valid' latency, and that 'en' low holds the
// state. Also checks that all four 2-bit values occur with similar frequency.
module tb_rng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] bits;
  logic valid;
  int checks = 0, failures = 0;
  int hist [4];
  logic [31:0] m;

  always #5 clk = ~clk;
  rng #(.SEED(32'hDEAD_BEEF), .BITS(2)) dut (.clk, .rst_n, .en, .bits, .valid);

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
    m = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(valid == 0, "valid low before enable");
    en <= 1;
    @(posedge clk);           // first enabled edge
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      m = m ^ (m << 13); m = m ^ (m >> 17); m = m ^ (m << 5);
      check(valid == 1, "valid high while enabled");
      check(bits == m[1:0], $sformatf("word %0d: got %0d want %0d", n, bits, m[1:0]));
      hist[bits]++;
      if (n == 10000) en <= 0;
      if (n == 10000) begin
        @(posedge clk);  // edge where en is sampled low
        m = m ^ (m << 13); m = m ^ (m >> 17); m = m ^ (m << 5);
        @(posedge clk);
        check(valid == 0, "valid drops one clock after en");
        repeat (5) @(posedge clk);
        check(bits == m[1:0], "bits held while disabled");
        en <= 1;
        @(posedge clk);
      end
    end
    for (int v = 0; v < 4; v++)
      check(hist[v] > 4500 && hist[v] < 5500, $sformatf("value %0d count %0d", v, hist[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
