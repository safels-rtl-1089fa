// tb_safels_delayed: test of the SafeLS wrapper built with DELAY_OUTPUTS=1,
// the canonical lockstep scheme in which the SoC only sees main core
// outputs that have already been compared with the shadow core.
//
// Two behavioural stand-in cores run on random SoC inputs. For each stagger
// N in 1..3 the test checks every cycle that the SoC outputs are the main
// core outputs of N cycles before (idle until the first aligned word), then
// injects a one-cycle error into the main core's AHB outputs and checks
// that N cycles later the wrong word is withheld (idle outputs instead)
// and the error is raised, and that a shadow core error also withholds the
// output of its cycle.
module tb_safels_delayed;
  import safels_pkg::*;
  import tb_safels_util_pkg::*;

  localparam int unsigned MAXS = 3;
  localparam int unsigned SW   = $clog2(MAXS + 1);

  logic            clk = 1'b0;
  logic            rst_n;
  logic [SW-1:0]   stagger_i, stagger_o;
  core_in_t        soc_in;
  ahb_mst_out_t    ahbo_o;
  nv_irq_out_t     irqo_o;
  nv_debug_out_t   dbgo_o;
  nv_counter_out_t cnt_o;
  logic            error_o;
  grp_vec_t        err_grp_o, mismatch_o;
  logic            main_rst_n, shadow_rst_n;
  core_in_t        main_in, shadow_in;
  core_out_t       main_out, shadow_out;
  logic            m_flip, s_flip;

  safels #(.MAX_STAGGER(MAXS), .DELAY_OUTPUTS(1'b1)) dut (
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
    .flip_state (1'b0), .flip_out (m_flip), .flip_grp (GRP_AHB), .out (main_out)
  );

  tb_core_model u_shadow (
    .clk, .rst_n (shadow_rst_n), .in (shadow_in),
    .flip_state (1'b0), .flip_out (s_flip), .flip_grp (GRP_CNT), .out (shadow_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_delayed = 0, n_idle_warmup = 0, n_blocked_main = 0, n_blocked_shadow = 0;

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

  function automatic core_out_t soc_out();
    core_out_t o;
    o.ahbo = ahbo_o;
    o.irqo = irqo_o;
    o.dbgo = dbgo_o;
    o.cnt  = cnt_o;
    return o;
  endfunction

  initial begin
    core_out_t mhist[$];
    m_flip = 1'b0;
    s_flip = 1'b0;
    soc_in = rand_core_in();
    for (int n = 1; n <= int'(MAXS); n++) begin
      stagger_i = SW'(n);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      check(soc_out() == CORE_OUT_IDLE, "idle in reset");
      mhist.delete();
      rst_n = 1'b1;
      for (int k = 0; k < 60; k++) begin
        if (k > 0) @(negedge clk);
        m_flip = (k == 30);
        s_flip = (k == 45);
        soc_in = rand_core_in();
        #1;
        mhist.push_back(main_out);
        if (k < n) begin
          check(soc_out() == CORE_OUT_IDLE, $sformatf("idle before alignment n=%0d k=%0d", n, k));
          n_idle_warmup++;
        end else if (k == 30 + n) begin
          check(mismatch_o == grp_vec_t'(1 << GRP_AHB), "main fault detected after N cycles");
          check(soc_out() == CORE_OUT_IDLE, "faulty main word withheld");
          if (soc_out() == CORE_OUT_IDLE && mismatch_o[GRP_AHB]) n_blocked_main++;
        end else if (k == 45) begin
          check(mismatch_o == grp_vec_t'(1 << GRP_CNT), "shadow fault detected");
          check(soc_out() == CORE_OUT_IDLE, "word withheld on shadow fault");
          if (soc_out() == CORE_OUT_IDLE && mismatch_o[GRP_CNT]) n_blocked_shadow++;
        end else begin
          check(mismatch_o == '0, $sformatf("no mismatch n=%0d k=%0d", n, k));
          check(soc_out() == mhist[k - n], $sformatf("delayed output n=%0d k=%0d", n, k));
          n_delayed++;
        end
        check(error_o == (k > 30 + n), $sformatf("error flag n=%0d k=%0d", n, k));
      end
      m_flip = 1'b0;
      s_flip = 1'b0;
    end
    check(n_delayed > 0, "delayed delivery exercised");
    check(n_idle_warmup > 0, "idle during warm-up exercised");
    check(n_blocked_main > 0, "main fault withheld");
    check(n_blocked_shadow > 0, "shadow fault withheld");
    $display("mechanisms: delayed=%0d warmup_idle=%0d blocked_main=%0d blocked_shadow=%0d",
             n_delayed, n_idle_warmup, n_blocked_main, n_blocked_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
