// tb_safels_stagger_in: self-checking test of the input stagger.
//
// For every stagger N in 1..MAX_STAGGER: reset, release, then drive a new
// random input bundle every cycle. Checks that the shadow reset is released
// exactly N edges after the wrapper reset, and that from then on the shadow
// input equals the bundle driven N cycles earlier (kept in a history queue).
module tb_safels_stagger_in;
  import safels_pkg::*;
  import tb_safels_util_pkg::*;

  localparam int unsigned MAXS = MAX_STAGGER_DEFAULT;
  localparam int unsigned SW   = $clog2(MAXS + 1);
  localparam int unsigned CYCLES = 60;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [SW-1:0] depth;
  core_in_t      soc_in, shadow_in;
  logic          shadow_rst_n;

  int checks = 0, failures = 0;

  safels_stagger_in dut (
    .clk, .rst_n, .depth, .soc_in, .shadow_in, .shadow_rst_n
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
    core_in_t hist[$];
    rst_n  = 1'b0;
    soc_in = rand_core_in();
    for (int d = 1; d <= int'(MAXS); d++) begin
      depth = SW'(d);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      check(shadow_rst_n == 1'b0, "shadow held in reset");
      hist.delete();
      // release at negedge 0, drive hist[k] at negedge k
      rst_n = 1'b1;
      for (int k = 0; k < int'(CYCLES); k++) begin
        if (k > 0) @(negedge clk);
        check(shadow_rst_n == (k >= d), $sformatf("shadow reset release d=%0d k=%0d", d, k));
        if (k >= d) check(shadow_in == hist[k - d], $sformatf("shadow input d=%0d k=%0d", d, k));
        soc_in = rand_core_in();
        hist.push_back(soc_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
