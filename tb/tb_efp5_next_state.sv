// tb_efp5_next_state: exhaustive check of the next-state logic.
//
// All 1024 codewords are applied. The reference says a word is valid when it
// is 2^k-1 (k ones at the pclk1 end) or its complement, k = 0..10, which
// gives 20 distinct words; a valid word 2^k-1 is followed by 2^(k+1)-1 (or by
// ~1 after all ones) and ~(2^k-1) by ~(2^(k+1)-1) (or by 1 after all zeros).
// Invalid words must give the RESTART parameter. The walk from all zeros is
// also followed for 20 steps to check that it returns to its start.
module tb_efp5_next_state;
  import efp5_pkg::*;

  localparam codeword_t RST = 10'h155;   // arbitrary, recognisable restart

  codeword_t cur, nxt;
  logic      valid;
  int        checks = 0, failures = 0;
  int        nvalid = 0;

  efp5_next_state #(.RESTART(RST)) dut (.cur(cur), .nxt(nxt), .valid(valid));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      bit        exp_valid;
      codeword_t exp_nxt;
      exp_valid = 0;
      exp_nxt   = RST;
      for (int k = 0; k <= 10; k++) begin
        codeword_t ones;
        ones = codeword_t'((1 << k) - 1);
        if (codeword_t'(v) == ones) begin
          exp_valid = 1;
          exp_nxt   = (k == 10) ? ~codeword_t'(1) : codeword_t'((1 << (k + 1)) - 1);
        end
        if (codeword_t'(v) == ~ones) begin
          exp_valid = 1;
          exp_nxt   = (k == 10) ? codeword_t'(1) : ~codeword_t'((1 << (k + 1)) - 1);
        end
      end
      cur = codeword_t'(v);
      #1;
      if (exp_valid) nvalid++;
      check(valid == exp_valid && nxt == exp_nxt,
            $sformatf("cur=%b valid=%b nxt=%b expected %b/%b", cur, valid, nxt,
                      exp_valid, exp_nxt));
    end
    check(nvalid == 20, $sformatf("%0d valid codewords, expected 20", nvalid));

    cur = '0;
    for (int s = 0; s < 20; s++) begin
      #1;
      check(valid, $sformatf("step %0d left the cycle: %b", s, cur));
      cur = nxt;
    end
    #1;
    check(cur == '0, "20 steps return to the all-zero codeword");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
