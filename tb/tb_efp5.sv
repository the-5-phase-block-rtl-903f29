// tb_efp5: end-to-end test of the EFP5 cell at its only size.
//
// The clock (period 10 time units) is generated by hand and the outputs are
// sampled 2 units after every edge. The reference model knows only the
// cell's external behaviour: counting clock periods from the first rising
// edge after reset, period c is phase (c mod 5)+1 of a frame; in its high
// half fpclk[n] must equal (block of phase n+1 == c mod 5), in its low half
// fpclk must be 0, and rstflag must be 0. The partition list is rebuilt here
// by filtering base-5 strings, not taken from the design.
//
// Sequence:
//   1. reset, then control words 0, 1, 7, 20, 36, 51, two frames each;
//   2. every control word 0..51 for one frame, then the unused words 52..63,
//      which must behave as word 0;
//   3. an asynchronous reset in mid-frame: rstflag high, fpclk quiet, and a
//      fresh frame after release;
//   4. an invalid codeword forced into each state register: rstflag must rise
//      at once and the next rising edge must start phase 1 of a new frame.
// Each mechanism is counted and one that never happened counts as a failure.
// The latency from reset release to the first phase-1 pulse (one edge) and
// from recovery to the new frame are checked as part of the phase count.
module tb_efp5;
  import efp5_pkg::*;

  logic              clk = 0, reset = 1;
  ctl_t              ctl = '0;
  logic              rstflag;
  logic [PHASES-1:0] fpclk;
  int                checks = 0, failures = 0;
  int                cyc;                  // clock periods since frame alignment
  rgs_t              ref_list [$];
  int                n_frames = 0, n_ctl_switch = 0, n_unused = 0, n_resets = 0;
  int                n_recover = 0, n_pulses = 0;
  bit                seen [52];
  int                FIG_WORDS [6] = '{0, 1, 7, 20, 36, 51};

  efp5 dut (.clk(clk), .reset(reset), .ctl(ctl), .rstflag(rstflag), .fpclk(fpclk));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [PHASES-1:0] expect_hi(ctl_t c, int slot);
    rgs_t r;
    logic [PHASES-1:0] e;
    int idx;
    idx = int'(c);
    if (idx >= 52) idx = 0;
    r = ref_list[idx];
    for (int n = 0; n < 5; n++) e[n] = (int'(r[n]) == slot);
    return e;
  endfunction

  // One clock period: rising edge, check high half, falling edge, check low.
  task automatic period();
    #3 clk = 1;
    #2;
    check(fpclk == expect_hi(ctl, cyc % 5) && !rstflag,
          $sformatf("ctl=%0d phase %0d high half: fpclk=%b expected %b rstflag=%b",
                    ctl, cyc % 5 + 1, fpclk, expect_hi(ctl, cyc % 5), rstflag));
    if (fpclk != 0) n_pulses++;
    #3 clk = 0;
    #2;
    check(fpclk == '0 && !rstflag,
          $sformatf("ctl=%0d phase %0d low half: fpclk=%b", ctl, cyc % 5 + 1, fpclk));
    cyc++;
    if (cyc % 5 == 0) n_frames++;
  endtask

  task automatic frames(int f);
    for (int i = 0; i < 5 * f; i++) period();
  endtask

  task automatic set_ctl(int c);
    if (ctl != ctl_t'(c)) n_ctl_switch++;
    ctl = ctl_t'(c);
    if (c < 52) seen[c] = 1;
    else        n_unused++;
  endtask

  // Reset asserted in the low half for two periods, released in a low half.
  task automatic do_reset();
    reset = 1;
    n_resets++;
    for (int i = 0; i < 2; i++) begin
      #3 clk = 1;
      #2 check(rstflag && fpclk == '0, "high half during reset");
      #3 clk = 0;
      #2 check(rstflag && fpclk == '0, "low half during reset");
    end
    reset = 0;
    #1 check(!rstflag, "rstflag falls with reset");   // low half is 1 unit longer
    cyc = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reference partitions: base-5 strings in increasing order that obey
    // the restricted growth rule.
    for (int v = 0; v < 3125; v++) begin
      int d [5];
      int x, mx;
      bit ok;
      rgs_t r;
      x = v;
      for (int i = 4; i >= 0; i--) begin d[i] = x % 5; x = x / 5; end
      ok = (d[0] == 0);
      mx = 0;
      for (int i = 1; i < 5; i++) begin
        if (d[i] > mx + 1) ok = 0;
        if (d[i] > mx) mx = d[i];
      end
      if (ok) begin
        for (int i = 0; i < 5; i++) r[i] = block_t'(d[i]);
        ref_list.push_back(r);
      end
    end
    check(ref_list.size() == 52, "52 reference partitions");

    #2;
    do_reset();
    // 1. The control words of the published waveform, two frames each.
    foreach (FIG_WORDS[i]) begin
      set_ctl(FIG_WORDS[i]);
      frames(2);
    end
    // 2. Every word, one frame each.
    for (int c = 0; c < 64; c++) begin
      set_ctl(c);
      frames(1);
    end
    // 3. Reset in the middle of a frame (in the high half of phase 3).
    set_ctl(36);
    period(); period();
    #3 clk = 1;
    #1 reset = 1;
    #1 check(rstflag && fpclk == '0, "asynchronous reset silences fpclk at once");
    #3 clk = 0;
    #2;
    do_reset();
    frames(2);

    // 4a. Invalid codeword in reg2 (present_state2), injected in a low half.
    set_ctl(51);
    period(); period();
    force dut.u_phase_gen.state2_q = 10'b0110010110;
    #1 check(rstflag, "rstflag raised by invalid reg2 codeword");
    release dut.u_phase_gen.state2_q;
    n_recover++;
    cyc = 0;              // next rising edge starts a frame
    frames(2);
    // 4b. Invalid codeword in reg1 (present_state1), injected in a high half.
    set_ctl(20);
    period();
    #3 clk = 1;
    #1 force dut.u_phase_gen.state1_q = 10'b1010101010;
    #1 check(rstflag, "rstflag raised by invalid reg1 codeword");
    release dut.u_phase_gen.state1_q;
    #3 clk = 0;
    #2 check(!rstflag && fpclk == '0, "reg2 restarted with a valid codeword");
    n_recover++;
    cyc = 0;
    frames(2);

    // Mechanism coverage.
    check(n_resets >= 2, "resets applied");
    check(n_ctl_switch > 0, "control word switched");
    check(n_unused == 12, "unused control words applied");
    check(n_recover == 2, "invalid codeword recoveries");
    check(n_pulses > 0, "partition pulses seen");
    foreach (seen[c]) check(seen[c], $sformatf("partition %0d selected", c));
    $display("coverage: frames=%0d resets=%0d ctl_switches=%0d unused_words=%0d recoveries=%0d pulses=%0d",
             n_frames, n_resets, n_ctl_switch, n_unused, n_recover, n_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
