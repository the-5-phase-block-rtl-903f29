// tb_efp5_phase_gen: checks the phased signals pclk[10..1] half period by
// half period.
//
// The clock is generated here by hand (period 10 time units) and pclk is
// sampled 2 units after every edge. The reference sequence is written
// independently of the design: entry k of the 20-entry cycle is 2^k-1 (k ones
// at the pclk1 end) for k <= 10 and ~(2^(k-10)-1) for k > 10. During reset the cell must show entry 0 (clk high) and entry 10
// (clk low); after release it must advance one entry per half period, so the
// first clk-high half shows entry 11. From the samples the test also measures
// the waveforms themselves: every pclk_i must rise once every 20 half periods
// (period 10*T) and one half period after pclk_(i-1) (lag T/2).
// Then an asynchronous reset is applied in mid-cycle, and an invalid codeword
// is forced into each register in turn: invalid must rise at once and the
// cell must resume the sequence at the restart entry at the next edge.
module tb_efp5_phase_gen;
  import efp5_pkg::*;

  logic      clk = 0, reset = 1;
  codeword_t pclk;
  logic      invalid;
  int        checks = 0, failures = 0;
  int        k;                 // expected entry
  int        half_no = 0;       // half periods since the start
  int        last_rise [10];
  int        rise_checks = 0;
  codeword_t prev;

  efp5_phase_gen dut (.clk(clk), .reset(reset), .pclk(pclk), .invalid(invalid));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic codeword_t entry(int e);
    if (e <= 10) return codeword_t'((1 << e) - 1);
    return ~codeword_t'((1 << (e - 10)) - 1);
  endfunction

  // Forget waveform history after a jump in the sequence.
  task automatic resync();
    foreach (last_rise[i]) last_rise[i] = -1;
    prev = pclk;
  endtask

  // Toggle the clock, advance the reference (or set it to set_k when that
  // is not negative) and sample 2 units later.
  task automatic half(int set_k);
    #3 clk = ~clk;
    half_no++;
    if (set_k < 0) k = (k + 1) % 20;
    else           k = set_k;
    #2;
    check(pclk == entry(k) && !invalid,
          $sformatf("pclk=%b invalid=%b expected entry %0d = %b",
                    pclk, invalid, k, entry(k)));
    for (int i = 0; i < 10; i++) begin
      if (!prev[i] && pclk[i]) begin
        if (last_rise[i] >= 0) begin
          rise_checks++;
          check(half_no - last_rise[i] == 20,
                $sformatf("pclk%0d period %0d half periods", i + 1, half_no - last_rise[i]));
        end
        if (i > 0 && last_rise[i-1] >= 0 && last_rise[i] >= 0) begin
          check(half_no - last_rise[i-1] == 1,
                $sformatf("pclk%0d rises %0d half periods after pclk%0d",
                          i + 1, half_no - last_rise[i-1], i));
        end
        last_rise[i] = half_no;
      end
    end
    prev = pclk;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset for three cycles: entry 0 while clk is high, entry 10 while low.
    #2;
    for (int c = 0; c < 6; c++) begin
      #3 clk = ~clk;
      #2 check(pclk == entry(clk ? 0 : 10) && !invalid,
               $sformatf("during reset pclk=%b", pclk));
    end
    // Release in the low half: entry 10 stays, the next rising edge gives 11.
    reset = 0;
    k = 10;
    resync();
    for (int c = 0; c < 100; c++) half(-1);
    check(rise_checks >= 40, $sformatf("only %0d pclk periods measured", rise_checks));

    // Asynchronous reset in the middle of a high half.
    if (!clk) half(-1);
    #1 reset = 1;
    #1 check(pclk == '0, "asynchronous reset acts at once (high half)");
    resync();
    half(10);           // reg2 preset to all ones
    reset = 0;
    resync();
    for (int c = 0; c < 24; c++) half(-1);

    // Invalid word in reg2, injected in a low half.
    if (clk) half(-1);
    force dut.state2_q = 10'b0101100101;
    #1 check(invalid, "invalid flagged for corrupted reg2");
    release dut.state2_q;
    resync();
    half(1);            // reg1 restarts at entry 1
    resync();
    for (int c = 0; c < 24; c++) half(-1);

    // Invalid word in reg1, injected in a high half.
    if (!clk) half(-1);
    force dut.state1_q = 10'b1100000011;
    #1 check(invalid, "invalid flagged for corrupted reg1");
    release dut.state1_q;
    resync();
    half(0);            // reg2 restarts at entry 0
    resync();
    for (int c = 0; c < 24; c++) half(-1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
