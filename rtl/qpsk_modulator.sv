// qpsk_modulator - maps two bits to one QPSK symbol.
//
// bits[1] selects the sign of I and bits[0] the sign of Q: a 0 maps to +AMP,
// a 1 to -AMP (Gray mapping, each bit on its own axis). AMP is in sample LSBs
// (13 fraction bits), 4096 = 0.5. The mapping and amplitude are this design's
// choice; the document only names a QPSK modulator.
//
// Timing: one symbol per clock, registered (latency 1); 'out_valid' follows
// 'in_valid' by one clock.
module qpsk_modulator
  import pmd_pkg::*;
#(
  parameter int AMP = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] bits,
  input  logic       in_valid,
  output cplx_t      sym,
  output logic       out_valid
);
  localparam sample_t P = sample_t'(AMP);
  localparam sample_t N = sample_t'(-AMP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sym.i <= bits[1] ? N : P;
        sym.q <= bits[0] ? N : P;
      end
    end
  end
endmodule
