// tb_safels_stagger_out: self-checking test of the output stagger.
//
// For every stagger N in 1..MAX_STAGGER: reset, release, and present a new
// random main-core output bundle every cycle. Checks that the delayed copy
// equals the bundle presented N cycles earlier, and that the valid flag
// rises N edges after release, carrying the word the main core showed
// during reset (the shadow core shows that word N cycles later).
module tb_safels_stagger_out;
  import safels_pkg::*;
  import tb_safels_util_pkg::*;

  localparam int unsigned MAXS = MAX_STAGGER_DEFAULT;
  localparam int unsigned SW   = $clog2(MAXS + 1);
  localparam int unsigned CYCLES = 60;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [SW-1:0] depth;
  core_out_t     main_out, main_dly;
  logic          dly_valid;

  int checks = 0, failures = 0;

  safels_stagger_out dut (
    .clk, .rst_n, .depth, .main_out, .main_dly, .dly_valid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    core_out_t hist[$];
    main_out = rand_core_out();
    for (int d = 1; d <= int'(MAXS); d++) begin
      depth = SW'(d);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      check(dly_valid == 1'b0, "not valid in reset");
      hist.delete();
      // The value shown during reset is captured by the first edge after
      // release; it is hist[0].
      hist.push_back(main_out);
      rst_n = 1'b1;
      for (int k = 1; k <= int'(CYCLES); k++) begin
        @(negedge clk);
        // after k edges: valid once k >= d, word = hist[k - d]
        check(dly_valid == (k >= d), $sformatf("valid d=%0d k=%0d", d, k));
        if (k >= d) check(main_dly == hist[k - d], $sformatf("delayed word d=%0d k=%0d", d, k));
        main_out = rand_core_out();
        hist.push_back(main_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
