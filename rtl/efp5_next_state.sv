// efp5_next_state: next-state logic of the EFP5 phase generator.
//
// Given the codeword held by one of the two state registers, returns the
// codeword the other register must take at the next clock edge, and whether
// the given codeword is one of the 20 valid ones. A valid codeword advances
// one step of the 10-stage twisted ring (pclk1 <= ~pclk10, pclk(i+1) <=
// pclk(i)). Any of the other 1004 words is not part of the cycle and a plain
// twisted ring would never leave it, so an invalid input instead yields the
// RESTART codeword and valid drops; the cell reports that on RSTFLAG.
// Comparing against the 20-entry table follows the original description;
// what the cell loads after an invalid word is this design's own choice.
//
// Purely combinational.
module efp5_next_state
  import efp5_pkg::*;
#(
  parameter codeword_t RESTART = FRAME_START  // loaded after an invalid word
)(
  input  codeword_t cur,    // present state
  output codeword_t nxt,    // state for the next half period
  output logic      valid   // cur is one of the 20 valid codewords
);

  always_comb begin
    valid = 1'b0;
    for (int unsigned k = 0; k < NUM_CODEWORDS; k++)
      if (cur == codeword_at(k)) valid = 1'b1;
    nxt = valid ? johnson_step(cur) : RESTART;
  end

endmodule
