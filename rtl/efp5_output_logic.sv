// efp5_output_logic: turns the phased signals into the block-encoded
// partition outputs.
//
// Block b of a frame is marked by pclk_(2b+1) XOR pclk_(2b+2): the two
// signals differ only in the half period after pclk_(2b+1) changes, which is
// the first (clk-high) half of phase b+1 of every frame. Output line n
// carries the pulse of the block that phase n+1 belongs to in the selected
// partition, rgs[n]. Lines whose phases share a block therefore pulse
// together, and a frame of fpclk shows the whole partition: line n pulses in
// phase rgs[n]+1. A block number above 4 (never produced by the partition
// table) gives a constant 0. rstflag is high during reset and whenever the
// phase generator holds an invalid codeword. All of this follows the
// original description.
//
// Purely combinational.
module efp5_output_logic
  import efp5_pkg::*;
(
  input  codeword_t         pclk,
  input  rgs_t              rgs,
  input  logic              reset,
  input  logic              invalid,
  output logic [PHASES-1:0] fpclk,
  output logic              rstflag
);

  logic [PHASES-1:0] block_pulse;  // block_pulse[b]: block b's slot is now

  always_comb begin
    for (int unsigned b = 0; b < PHASES; b++)
      block_pulse[b] = pclk[2*b] ^ pclk[2*b+1];
    for (int unsigned n = 0; n < PHASES; n++)
      fpclk[n] = (int'(rgs[n]) < int'(PHASES)) ? block_pulse[rgs[n]] : 1'b0;
    rstflag = reset | invalid;
  end

endmodule
