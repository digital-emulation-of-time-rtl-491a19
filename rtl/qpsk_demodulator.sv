// qpsk_demodulator - hard-decision QPSK detector.
//
// The inverse of qpsk_modulator: bit 1 is set when I is negative and bit 0
// when Q is negative. Works on any amplitude, so it needs no gain control.
//
// Timing: registered, latency 1; 'out_valid' follows 'in_valid'.
module qpsk_demodulator
  import pmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      sym,
  input  logic       in_valid,
  output logic [1:0] bits,
  output logic       out_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= {sym.i[SW-1], sym.q[SW-1]};
    end
  end
endmodule
