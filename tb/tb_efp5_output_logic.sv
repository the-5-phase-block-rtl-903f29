// tb_efp5_output_logic: checks the XOR/routing output stage.
//
// Hand-worked cases first: the first half of phase 1 (codeword entry 1 or
// its equivalent entry 11) with partition {0,1,2,0,1} must drive lines 0
// and 3; the first half of phase 3 (entry 5) must drive line 2 only. Then
// 2000 random codewords, block strings (including the unused block numbers
// 5..7, which must give 0), reset and invalid values are compared with a
// model that finds, for each block, whether its two pclk lines differ.
module tb_efp5_output_logic;
  import efp5_pkg::*;

  codeword_t         pclk;
  rgs_t              rgs;
  logic              reset, invalid;
  logic [PHASES-1:0] fpclk;
  logic              rstflag;
  int                checks = 0, failures = 0;

  efp5_output_logic dut (.pclk(pclk), .rgs(rgs), .reset(reset), .invalid(invalid),
                         .fpclk(fpclk), .rstflag(rstflag));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 0; invalid = 0;
    rgs = {3'd1, 3'd0, 3'd2, 3'd1, 3'd0};        // phases 5..1 = {0,1,2,0,1}
    pclk = 10'b0000000001; #1;
    check(fpclk == 5'b01001 && !rstflag, $sformatf("entry 1, ctl 36: %b", fpclk));
    pclk = 10'b1111111110; #1;
    check(fpclk == 5'b01001, $sformatf("entry 11, ctl 36: %b", fpclk));
    pclk = 10'b0000011111; #1;
    check(fpclk == 5'b00100, $sformatf("entry 5, ctl 36: %b", fpclk));
    pclk = 10'b0000000011; #1;
    check(fpclk == 5'b00000, $sformatf("entry 2 (second half), ctl 36: %b", fpclk));

    for (int t = 0; t < 2000; t++) begin
      logic [PHASES-1:0] exp;
      pclk    = codeword_t'($urandom);
      rgs     = rgs_t'($urandom);
      reset   = 1'($urandom);
      invalid = 1'($urandom);
      #1;
      for (int n = 0; n < 5; n++) begin
        int b;
        b = int'(rgs[n]);
        exp[n] = (b <= 4) && (pclk[2*b] != pclk[2*b+1]);
      end
      check(fpclk == exp && rstflag == (reset || invalid),
            $sformatf("pclk=%b rgs=%h fpclk=%b exp=%b", pclk, rgs, fpclk, exp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
