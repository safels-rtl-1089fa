// tb_safels_cmp: self-checking test of the lockstep comparator.
//
// Drives random aligned pairs of output bundles, sometimes identical,
// sometimes with one or more groups differing, with the valid flag on or
// off. A reference model computes the expected per-group mismatch, the
// sticky per-group flags and the sticky error flag, which must rise in the
// cycle after the first mismatch. The test resets between rounds to check
// that only reset clears the error.
module tb_safels_cmp;
  import safels_pkg::*;
  import tb_safels_util_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      valid;
  core_out_t main_dly, shadow_out;
  grp_vec_t  mismatch_o, err_grp_o;
  logic      error_o;

  int checks = 0, failures = 0;
  int seen_grp[NGROUPS];

  safels_cmp dut (.clk, .rst_n, .valid, .main_dly, .shadow_out, .mismatch_o, .error_o, .err_grp_o);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    grp_vec_t exp_mm, exp_grp;
    logic     exp_err;
    for (int i = 0; i < NGROUPS; i++) seen_grp[i] = 0;
    valid = 1'b0;
    main_dly = '0;
    shadow_out = '0;
    for (int round = 0; round < 8; round++) begin
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      check(error_o == 1'b0 && err_grp_o == '0, "cleared by reset");
      rst_n = 1'b1;
      exp_grp = '0;
      exp_err = 1'b0;
      for (int k = 0; k < 100; k++) begin
        // new stimulus
        valid      = ($urandom % 8) != 0;
        main_dly   = rand_core_out();
        shadow_out = main_dly;
        exp_mm     = '0;
        // mostly equal; in the later rounds sometimes corrupt groups
        if (round > 0 && ($urandom % 16) == 0) begin
          for (int g = 0; g < NGROUPS; g++) begin
            if ($urandom % 2) begin
              shadow_out = flip_group(shadow_out, out_group_e'(g), $urandom % 64);
              exp_mm[g]  = 1'b1;
            end
          end
        end
        if (!valid) exp_mm = '0;
        #1;
        check(mismatch_o == exp_mm, $sformatf("mismatch round %0d k %0d", round, k));
        check(error_o == exp_err, $sformatf("error flag before edge round %0d k %0d", round, k));
        @(negedge clk);
        for (int g = 0; g < NGROUPS; g++) if (exp_mm[g]) seen_grp[g]++;
        exp_grp |= exp_mm;
        exp_err |= |exp_mm;
        check(error_o == exp_err, $sformatf("error flag after edge round %0d k %0d", round, k));
        check(err_grp_o == exp_grp, $sformatf("group flags round %0d k %0d", round, k));
      end
    end
    for (int g = 0; g < NGROUPS; g++) check(seen_grp[g] > 0, $sformatf("group %0d mismatch exercised", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
