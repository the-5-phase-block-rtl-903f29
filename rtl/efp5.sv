// efp5: 5-phase block-encoded frame partitioning cell (top level).
//
// Splits every frame of five clock periods among the blocks of one of the
// 52 partitions of the frame's phases, chosen by the 6-bit control word ctl.
// Output fpclk[n] belongs to phase n+1; it carries a half-period pulse (the
// clk-high half) in phase b+1 of each frame, where b is the block that phase
// n+1 belongs to. Phases in the same block therefore pulse together, and the
// block number becomes a time slot. Example, ctl = 36 = {0,1,2,0,1}: fpclk[0]
// and fpclk[3] pulse in phase 1, fpclk[1] and fpclk[4] in phase 2, fpclk[2]
// in phase 3, and nothing pulses in phases 4 and 5.
//
// Structure: efp5_phase_gen (reg1 on the rising edge, reg2 on the falling
// edge, next-state logic) produces the phased signals pclk[10..1];
// efp5_partition_rom decodes ctl; efp5_output_logic XORs pclk pairs and
// routes them to the output lines.
//
// Timing: reset is asynchronous and active high. The first clock period
// that begins with a rising edge after reset is released is phase 1 of the
// first frame. ctl is read combinationally and may change at any time; a
// change shows from the next pulse on. Words 52..63 select partition 0.
// rstflag is high during reset and while the internal codeword is invalid.
// All outputs are gated by the level of clk and so carry its edges.
module efp5
  import efp5_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  ctl_t              ctl,
  output logic              rstflag,
  output logic [PHASES-1:0] fpclk
);

  codeword_t pclk;
  logic      invalid;
  rgs_t      rgs;
  logic      ctl_unused;

  efp5_phase_gen u_phase_gen (
    .clk(clk), .reset(reset), .pclk(pclk), .invalid(invalid)
  );

  efp5_partition_rom u_partition_rom (
    .ctl(ctl), .rgs(rgs), .ctl_unused(ctl_unused)
  );

  efp5_output_logic u_output_logic (
    .pclk(pclk), .rgs(rgs), .reset(reset), .invalid(invalid),
    .fpclk(fpclk), .rstflag(rstflag)
  );

endmodule
