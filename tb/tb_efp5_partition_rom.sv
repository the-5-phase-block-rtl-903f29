// tb_efp5_partition_rom: checks the control word -> partition decoder.
//
// The reference list is built here in a different way from the design: all
// 5^5 base-5 strings are visited in increasing numeric order and those that
// satisfy the restricted growth rule are kept, which yields the partitions
// in ascending lexicographic order. All 64 control words are then applied
// and compared; words 52..63 must return partition 0 with ctl_unused set.
// A few entries are also checked against hand-worked values (0, 1, 7, 20,
// 36, 51) and the list length against the Bell number 52.
module tb_efp5_partition_rom;
  import efp5_pkg::*;

  ctl_t ctl;
  rgs_t rgs;
  logic ctl_unused;
  int   checks = 0, failures = 0;

  efp5_partition_rom dut (.ctl(ctl), .rgs(rgs), .ctl_unused(ctl_unused));

  rgs_t ref_list [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic rgs_t mk(int a, int b, int c, int d, int e);
    rgs_t r;
    r[0] = block_t'(a); r[1] = block_t'(b); r[2] = block_t'(c);
    r[3] = block_t'(d); r[4] = block_t'(e);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Most significant digit = phase 1, so numeric order = lexicographic order.
    for (int v = 0; v < 3125; v++) begin
      int   d [5];
      int   x, mx;
      bit   ok;
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
    check(ref_list.size() == 52, "reference list has 52 partitions");

    for (int c = 0; c < 64; c++) begin
      ctl = ctl_t'(c);
      #1;
      if (c < 52) begin
        check(rgs == ref_list[c] && !ctl_unused,
              $sformatf("ctl=%0d rgs=%h expected %h", c, rgs, ref_list[c]));
      end else begin
        check(rgs == '0 && ctl_unused,
              $sformatf("ctl=%0d (unused) rgs=%h unused=%b", c, rgs, ctl_unused));
      end
    end

    // Hand-worked entries.
    ctl = 6'd0;  #1; check(rgs == mk(0,0,0,0,0), "ctl 0");
    ctl = 6'd1;  #1; check(rgs == mk(0,0,0,0,1), "ctl 1");
    ctl = 6'd7;  #1; check(rgs == mk(0,0,1,0,2), "ctl 7");
    ctl = 6'd20; #1; check(rgs == mk(0,1,0,1,2), "ctl 20");
    ctl = 6'd36; #1; check(rgs == mk(0,1,2,0,1), "ctl 36");
    ctl = 6'd51; #1; check(rgs == mk(0,1,2,3,4), "ctl 51");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
