// efp5_phase_gen: the two state registers of the EFP5 cell and the phased
// signals pclk[10..1] they produce.
//
// The codeword must change at every clock edge, rising and falling, so the
// state is kept in two 10-bit registers: reg1 (present_state1) is loaded on
// the rising edge of clk and is shown while clk is high, reg2
// (present_state2) is loaded on the falling edge and is shown while clk is
// low. Each register takes the successor of the other one's codeword, so
// pclk walks the 20-entry twisted-ring sequence one entry per half period and
// every pclk_i is a square wave of period 10*T lagging pclk_(i-1) by T/2.
//
// Reset is asynchronous and active high. It clears reg1 to the all-zero
// codeword (entry 0 of the sequence) and sets reg2 to all ones (entry 10),
// which gives ten flip-flops with asynchronous reset and ten with
// asynchronous preset, as the synthesis of the original cell reports. Both entries mark
// no block (pclk_(2b+1) = pclk_(2b+2) for every b), so the outputs stay
// quiet during reset. The first rising edge after reset loads the successor
// of all ones, which starts phase 1 of the first frame.
//
// invalid is high while the codeword on pclk is not one of the 20 valid
// words (possible only after power-up without reset or an upset). The
// register that is loaded next then takes a restart codeword: reg1 restarts
// at phase 1 of a frame and reg2 at the word just before it, so the cell is
// back in step within one clock period.
//
// Note: pclk and invalid are selected by the level of clk, as in the
// original description; they are clock-derived signals, not register
// outputs, and carry the clock's edges.
module efp5_phase_gen
  import efp5_pkg::*;
(
  input  logic      clk,
  input  logic      reset,     // asynchronous, active high
  output codeword_t pclk,      // pclk[0] is pclk1
  output logic      invalid    // present codeword is not a valid one
);

  localparam codeword_t REG1_RESET = '0;   // entry 0 of the sequence
  localparam codeword_t REG2_RESET = '1;   // entry 10

  codeword_t state1_q, state2_q;           // reg1, reg2
  codeword_t state1_d, state2_d;
  logic      state1_valid, state2_valid;

  // Successor of reg2 for reg1, successor of reg1 for reg2.
  efp5_next_state #(.RESTART(FRAME_START)) u_next1 (
    .cur(state2_q), .nxt(state1_d), .valid(state2_valid)
  );
  efp5_next_state #(.RESTART(codeword_at(0))) u_next2 (
    .cur(state1_q), .nxt(state2_d), .valid(state1_valid)
  );

  always_ff @(posedge clk or posedge reset)
    if (reset) state1_q <= REG1_RESET;
    else       state1_q <= state1_d;

  always_ff @(negedge clk or posedge reset)
    if (reset) state2_q <= REG2_RESET;
    else       state2_q <= state2_d;

  always_comb begin
    pclk    = clk ? state1_q : state2_q;
    invalid = clk ? !state1_valid : !state2_valid;
  end

endmodule
