// error_counter - bit and bit-error counters of one channel.
//
// The transmitted bits from the RNG are written into a circular delay line on
// every 'ref_valid' clock; each received symbol ('rx_valid') is compared with
// the entry written 'delay' clocks before, which must equal the latency of the
// link. 'bits_cnt' grows by BITS per received symbol and 'errors_cnt' by the
// number of differing bits. Counting starts once the delay line holds 'delay'
// entries; 'clear' zeroes both counters and restarts that fill. The 64-bit
// counters follow the simulation traces of the document; the delay line and
// its run-time delay are this design's choice.
//
// Timing: counters are registered and update one clock after a received
// symbol. Reference and received streams must advance together (one symbol
// per clock), which the system does.
module error_counter #(
  parameter int BITS      = 2,
  parameter int CNT_W     = 64,
  parameter int MAX_DELAY = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  input  logic [BITS-1:0]              ref_bits,
  input  logic                         ref_valid,
  input  logic [BITS-1:0]              rx_bits,
  input  logic                         rx_valid,
  output logic [CNT_W-1:0]             bits_cnt,
  output logic [CNT_W-1:0]             errors_cnt
);
  localparam int AW = $clog2(MAX_DELAY);

  logic [BITS-1:0] mem [MAX_DELAY];
  logic [AW-1:0]   wr_ptr;
  logic [AW:0]     fill;        // entries written since reset/clear, saturating
  logic [BITS-1:0] ref_d;

  assign ref_d = mem[wr_ptr - delay];

  function automatic logic [CNT_W-1:0] popcount(input logic [BITS-1:0] v);
    logic [CNT_W-1:0] c;
    c = '0;
    for (int b = 0; b < BITS; b++) c += CNT_W'(v[b]);
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (ref_valid) mem[wr_ptr] <= ref_bits;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr     <= '0;
      fill       <= '0;
      bits_cnt   <= '0;
      errors_cnt <= '0;
    end else begin
      if (ref_valid) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (fill <= (AW+1)'(delay)) fill <= fill + 1'b1;
      end
      if (rx_valid && fill >= (AW+1)'(delay) && fill != 0) begin
        bits_cnt   <= bits_cnt + CNT_W'(BITS);
        errors_cnt <= errors_cnt + popcount(rx_bits ^ ref_d);
      end
    end
  end
endmodule
