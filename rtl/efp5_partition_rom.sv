// efp5_partition_rom: control word -> block-encoded partition.
//
// Combinational look-up of the restricted growth string (RGS) selected by the
// 6-bit control word. Words 0..51 pick the partitions of a 5-phase frame in
// ascending lexicographic order of their RGS (word 36 gives {0,1,2,0,1}:
// phases 1 and 4 in block 0, phases 2 and 5 in block 1, phase 3 in block 2).
// The 12 words 52..63 name no partition; like the original description of
// the cell they fall back to partition 0, the single block {0,0,0,0,0}, and
// raise ctl_unused so that a caller can see it.
//
// The table is computed at elaboration by efp5_pkg::rgs_table() rather than
// written out. No clock, no state: rgs is valid one propagation delay after
// ctl changes.
module efp5_partition_rom
  import efp5_pkg::*;
(
  input  ctl_t ctl,         // control word CTL[5..0]
  output rgs_t rgs,         // rgs[n] = block of phase n+1
  output logic ctl_unused   // ctl is 52..63; rgs then holds partition 0
);

  localparam rgs_table_t TABLE = rgs_table();

  always_comb begin
    ctl_unused = (int'(ctl) >= int'(NUM_PARTITIONS));
    rgs        = ctl_unused ? TABLE[0] : TABLE[ctl];
  end

endmodule
