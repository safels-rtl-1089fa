// tb_safels: end-to-end test of the SafeLS lockstep wrapper at its default
// parameters, with two behavioural stand-in cores (tb_core_model) as the
// main and the shadow core.
//
// For each stagger setting (0, which must be clamped to 1, then 1..3) the
// test resets the wrapper and runs the pair on random SoC inputs, checking
// every cycle that
//   - the main core gets the SoC inputs unchanged and its outputs reach the
//     SoC unchanged in the same cycle (direct delivery),
//   - the shadow core leaves reset N cycles after the main core and gets the
//     inputs of N cycles before,
//   - no mismatch or error is reported while both cores agree.
// It then injects faults:
//   - a one-cycle output error in the shadow core, group by group: the
//     mismatch must show in the same cycle, error_o one cycle later, and
//     both must stay set (with the right group) after the fault is gone;
//   - a one-cycle output error in the main core: the wrong value reaches the
//     SoC at once and the mismatch must show exactly N cycles later;
//   - a state upset in the shadow core: it must be detected.
// Each mechanism is counted; one that never happened is a failure.
module tb_safels;
  import safels_pkg::*;
  import tb_safels_util_pkg::*;

  localparam int unsigned MAXS = MAX_STAGGER_DEFAULT;
  localparam int unsigned SW   = $clog2(MAXS + 1);

  logic                clk = 1'b0;
  logic                rst_n;
  logic [SW-1:0]       stagger_i, stagger_o;
  core_in_t            soc_in;
  ahb_mst_out_t        ahbo_o;
  nv_irq_out_t         irqo_o;
  nv_debug_out_t       dbgo_o;
  nv_counter_out_t     cnt_o;
  logic                error_o;
  grp_vec_t            err_grp_o, mismatch_o;
  logic                main_rst_n, shadow_rst_n;
  core_in_t            main_in, shadow_in;
  core_out_t           main_out, shadow_out;

  logic       m_flip_state, m_flip_out, s_flip_state, s_flip_out;
  out_group_e m_flip_grp, s_flip_grp;

  safels dut (
    .clk, .rst_n, .stagger_i,
    .ahbi_i (soc_in.ahbi), .ahbsi_i (soc_in.ahbsi), .ahbso_i (soc_in.ahbso),
    .irqi_i (soc_in.irqi), .dbgi_i (soc_in.dbgi),
    .ahbo_o, .irqo_o, .dbgo_o, .cnt_o,
    .error_o, .err_grp_o, .mismatch_o, .stagger_o,
    .main_rst_n_o (main_rst_n), .main_in_o (main_in), .main_out_i (main_out),
    .shadow_rst_n_o (shadow_rst_n), .shadow_in_o (shadow_in), .shadow_out_i (shadow_out)
  );

  tb_core_model u_main (
    .clk, .rst_n (main_rst_n), .in (main_in),
    .flip_state (m_flip_state), .flip_out (m_flip_out), .flip_grp (m_flip_grp), .out (main_out)
  );

  tb_core_model u_shadow (
    .clk, .rst_n (shadow_rst_n), .in (shadow_in),
    .flip_state (s_flip_state), .flip_out (s_flip_out), .flip_grp (s_flip_grp), .out (shadow_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_direct = 0, n_stagger_in = 0, n_shadow_reset = 0, n_compare = 0, n_clamp = 0;
  int n_shadow_detect[NGROUPS], n_main_detect = 0, n_escape = 0, n_state_detect = 0, n_sticky = 0;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic core_out_t soc_out();
    core_out_t o;
    o.ahbo = ahbo_o;
    o.irqo = irqo_o;
    o.dbgo = dbgo_o;
    o.cnt  = cnt_o;
    return o;
  endfunction

  core_in_t hist[$];
  int       k;      // negedges since release

  // Reset with stagger setting `s`, release at negedge 0.
  task automatic do_reset(int s);
    stagger_i = SW'(s);
    rst_n = 1'b0;
    m_flip_state = 1'b0; m_flip_out = 1'b0;
    s_flip_state = 1'b0; s_flip_out = 1'b0;
    repeat (3) @(negedge clk);
    check(error_o == 1'b0 && err_grp_o == '0, "error cleared by reset");
    check(shadow_rst_n == 1'b0, "shadow in reset");
    hist.delete();
    k = 0;
    rst_n = 1'b1;
  endtask

  // Checks made in every cycle, before new inputs are driven.
  task automatic cycle_checks(int n, bit expect_clean);
    check(main_rst_n == 1'b1, "main out of reset");
    check(main_in == soc_in, "main gets inputs at once");
    check(soc_out() == main_out, "main outputs delivered directly");
    n_direct++;
    check(shadow_rst_n == (k >= n), $sformatf("shadow reset release k=%0d", k));
    if (k == n) n_shadow_reset++;
    if (k >= n) begin
      check(shadow_in == hist[k - n], $sformatf("shadow input staggered k=%0d", k));
      n_stagger_in++;
    end
    if (k >= n) n_compare++;   // both cores running, outputs compared
    if (expect_clean) begin
      check(mismatch_o == '0, $sformatf("no mismatch k=%0d", k));
      check(error_o == 1'b0, $sformatf("no error k=%0d", k));
    end
  endtask

  // Advance one cycle: drive new random inputs, wait for the next negedge.
  task automatic step();
    soc_in = rand_core_in();
    hist.push_back(soc_in);
    @(negedge clk);
    k++;
    #1;
  endtask

  initial begin
    int n;
    core_out_t prev_out;
    for (int g = 0; g < NGROUPS; g++) n_shadow_detect[g] = 0;
    m_flip_grp = GRP_AHB;
    s_flip_grp = GRP_AHB;
    soc_in = rand_core_in();

    for (int s = 0; s <= int'(MAXS); s++) begin
      n = (s == 0) ? 1 : s;

      // ---- clean run, then a transient shadow output error per group
      for (int g = 0; g < NGROUPS; g++) begin
        do_reset(s);
        check(stagger_o == SW'(n), "stagger setting in use");
        if (s == 0 && stagger_o == SW'(1)) n_clamp++;
        for (int c = 0; c < 40; c++) begin
          cycle_checks(n, 1'b1);
          step();
        end
        // one-cycle error on the shadow core's group g
        s_flip_grp = out_group_e'(g);
        s_flip_out = 1'b1;
        #1;
        cycle_checks(n, 1'b0);
        check(mismatch_o == grp_vec_t'(1 << g), $sformatf("shadow fault seen, group %0d", g));
        check(error_o == 1'b0, "error not yet registered");
        step();
        s_flip_out = 1'b0;
        #1;
        check(error_o == 1'b1, "error raised after shadow fault");
        check(err_grp_o == grp_vec_t'(1 << g), $sformatf("group flag %0d", g));
        if (error_o && err_grp_o == grp_vec_t'(1 << g)) n_shadow_detect[g]++;
        for (int c = 0; c < 10; c++) begin
          cycle_checks(n, 1'b0);
          check(mismatch_o == '0, "fault gone");
          step();
        end
        check(error_o == 1'b1 && err_grp_o == grp_vec_t'(1 << g), "error held");
        if (error_o) n_sticky++;
      end

      // ---- one-cycle error on the main core's AHB outputs
      do_reset(s);
      for (int c = 0; c < 30; c++) begin
        cycle_checks(n, 1'b1);
        step();
      end
      prev_out = main_out;
      m_flip_grp = GRP_AHB;
      m_flip_out = 1'b1;
      #1;
      check(ahbo_o != prev_out.ahbo && ahbo_o == main_out.ahbo, "faulty main output delivered at once");
      if (ahbo_o != prev_out.ahbo) n_escape++;
      for (int j = 0; j < n; j++) begin
        cycle_checks(n, 1'b1);   // not detected before N cycles
        step();
        m_flip_out = 1'b0;
        #1;
      end
      check(mismatch_o == grp_vec_t'(1 << GRP_AHB), "main fault detected exactly N cycles later");
      if (mismatch_o[GRP_AHB]) n_main_detect++;
      step();
      check(error_o == 1'b1, "error after main fault");

      // ---- state upset in the shadow core
      do_reset(s);
      for (int c = 0; c < 30; c++) begin
        cycle_checks(n, 1'b1);
        step();
      end
      s_flip_state = 1'b1;
      step();
      s_flip_state = 1'b0;
      for (int c = 0; c < 5 && !error_o; c++) step();
      check(error_o == 1'b1, "shadow state upset detected");
      if (error_o) n_state_detect++;
    end

    // every mechanism must have happened
    check(n_direct > 0, "direct delivery exercised");
    check(n_stagger_in > 0, "input stagger exercised");
    check(n_shadow_reset > 0, "staggered shadow reset exercised");
    check(n_compare > 0, "comparison exercised");
    check(n_clamp > 0, "stagger clamp exercised");
    for (int g = 0; g < NGROUPS; g++)
      check(n_shadow_detect[g] > 0, $sformatf("shadow fault in group %0d detected", g));
    check(n_main_detect > 0, "main fault detected");
    check(n_escape > 0, "main fault delivered before detection");
    check(n_state_detect > 0, "state upset detected");
    check(n_sticky > 0, "error held");
    $display("mechanisms: direct=%0d stagger_in=%0d shadow_reset=%0d compare=%0d clamp=%0d",
             n_direct, n_stagger_in, n_shadow_reset, n_compare, n_clamp);
    $display("            shadow_detect=%0d/%0d/%0d/%0d main_detect=%0d escape=%0d state=%0d sticky=%0d",
             n_shadow_detect[0], n_shadow_detect[1], n_shadow_detect[2], n_shadow_detect[3],
             n_main_detect, n_escape, n_state_detect, n_sticky);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
