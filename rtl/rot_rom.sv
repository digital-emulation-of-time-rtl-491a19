// rot_rom - rotation-angle ROM: angle in whole degrees to cos and sin.
//
// A 360-entry table, filled at elaboration from pmd_pkg::rot_table, holds
// cos(theta) and sin(theta) with 14 fraction bits. Each rotation stage of the
// PMD emulator has its own ROM, as in the emulator's block diagram. Angles of
// 360 and above wrap to (angle - 360). Indexing by whole degrees and the table
// size are this design's choice.
//
// Timing: synchronous read, 'cs' is valid one clock after 'angle'.
module rot_rom
  import pmd_pkg::*;
(
  input  logic   clk,
  input  angle_t angle,
  output cs_t    cs
);
  localparam rot_table_t TAB = rot_table();

  logic [ANG_W-1:0] addr;
  always_comb addr = (angle >= ANG_W'(ANGLES)) ? angle - ANG_W'(ANGLES) : angle;

  always_ff @(posedge clk) cs <= cs_t'(TAB[addr]);
endmodule
