// efp5_pkg: types, constants and elaboration-time functions shared by the
// 5-phase block-encoded frame partitioning (EFP5) cell.
//
// The cell divides a frame of five clock periods ("phases") among the blocks
// of one of the 52 set partitions of {phase-1 .. phase-5}. A partition is
// written as a restricted growth string (RGS): element n names the block that
// phase n+1 belongs to, element 0 is always 0, and each element is at most one
// more than the largest element before it. The 52 strings are numbered 0..51
// in ascending lexicographic order, and that number is the 6-bit control word.
//
// Inside, a 10-bit codeword pclk[10..1] steps through 20 states, one per half
// clock period, in the order of a 10-stage twisted-ring (Johnson) counter:
// pclk1 takes the inverse of pclk10 and every other stage takes the value of
// the stage before it. Each pclk_i is then a square wave of period 10*T that
// lags pclk_(i-1) by T/2. Codeword bit 0 here is pclk1, bit 9 is pclk10.
//
// The partition table is not stored as literal data: rgs_table() builds it
// when the design is elaborated by stepping from 00000 to the next RGS in
// lexicographic order 51 times. The same holds for the codeword list, which
// is the Johnson sequence from the all-zero word.
package efp5_pkg;

  localparam int unsigned PHASES         = 5;   // frame length in clock periods
  localparam int unsigned NUM_PARTITIONS = 52;  // Bell number B(5)
  localparam int unsigned CTL_W          = 6;   // control word width
  localparam int unsigned CODE_W         = 10;  // pclk[10..1]
  localparam int unsigned NUM_CODEWORDS  = 20;  // states of the twisted ring
  localparam int unsigned BLK_W          = 3;   // enough for block numbers 0..4

  typedef logic [CTL_W-1:0]  ctl_t;
  typedef logic [CODE_W-1:0] codeword_t;
  typedef logic [BLK_W-1:0]  block_t;
  // rgs_t[n] is the block of phase n+1.
  typedef block_t [PHASES-1:0] rgs_t;
  typedef rgs_t [NUM_PARTITIONS-1:0] rgs_table_t;

  // One step of the twisted ring: pclk1 <= ~pclk10, pclk(i+1) <= pclk(i).
  function automatic codeword_t johnson_step(codeword_t c);
    return {c[CODE_W-2:0], ~c[CODE_W-1]};
  endfunction

  // Entry k (0..19) of the valid codeword sequence; entry 0 is all zeros.
  function automatic codeword_t codeword_at(int unsigned k);
    codeword_t c = '0;
    for (int unsigned i = 0; i < k; i++) c = johnson_step(c);
    return c;
  endfunction

  // First codeword of a frame. Half period h (0..9) of a frame shows entry
  // h+1 or entry h+11, its complement, which gives the same pair XORs; entry 1
  // is the first in which pclk1 differs from pclk2, i.e. block 0's slot.
  localparam codeword_t FRAME_START = codeword_at(1);

  // Next restricted growth string in ascending lexicographic order.
  function automatic rgs_t rgs_next(rgs_t r);
    rgs_t   n;
    block_t mx;
    int     pos;
    n   = r;
    pos = -1;
    // Rightmost element that may still grow: it must not exceed the
    // maximum of the elements to its left.
    for (int i = 1; i < int'(PHASES); i++) begin
      mx = '0;
      for (int j = 0; j < i; j++) if (r[j] > mx) mx = r[j];
      if (r[i] <= mx) pos = i;
    end
    if (pos > 0) begin
      n[pos] = r[pos] + 1'b1;
      for (int i = pos + 1; i < int'(PHASES); i++) n[i] = '0;
    end
    return n;
  endfunction

  // All 52 partitions, index = control word.
  function automatic rgs_table_t rgs_table();
    rgs_table_t t;
    rgs_t       r;
    r = '0;
    for (int i = 0; i < int'(NUM_PARTITIONS); i++) begin
      t[i] = r;
      r    = rgs_next(r);
    end
    return t;
  endfunction

endpackage
