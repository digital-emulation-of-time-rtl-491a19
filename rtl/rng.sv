// rng - pseudo-random data source for one channel.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) steps once
// per clock while 'en' is high; its BITS least significant bits are the data
// of one symbol. The system uses one instance per polarization, each with its
// own seed. The document asks only for a pseudo-random generator; the xorshift
// choice, the seed and the rate of one symbol per clock are this design's.
//
// Timing: 'bits' and 'valid' are registered; after reset 'valid' rises one
// clock after the first clock with 'en' high, and a new word appears on every
// clock that 'en' is high.
module rng #(
  parameter logic [31:0] SEED = 32'h1234_5678,   // must not be zero
  parameter int          BITS = 2
) (
  input  logic            clk,
  input  logic            rst_n,     // synchronous, active low
  input  logic            en,
  output logic [BITS-1:0] bits,
  output logic            valid
);
  logic [31:0] state, nxt;

  always_comb begin
    nxt = state;
    nxt = nxt ^ (nxt << 13);
    nxt = nxt ^ (nxt >> 17);
    nxt = nxt ^ (nxt << 5);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SEED;
      bits  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        state <= nxt;
        bits  <= nxt[BITS-1:0];
      end
    end
  end

  initial assert (SEED != 0) else $error("rng: SEED must be non-zero");
endmodule
