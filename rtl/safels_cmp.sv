// safels_cmp: the output comparator of the lockstep wrapper.
//
// Compares the delayed main core outputs with the shadow core outputs in
// the cycle they arrive, group by group: AHB master outputs, interrupt
// outputs, debug outputs and SafeSU event lines. Comparison is enabled only
// while `valid` says the two streams are aligned (both cores out of reset
// and the delay line filled).
//
// Outputs:
//   mismatch_o  per-group mismatch in the current cycle (combinational)
//   error_o     the wrapper's error signal: set in the cycle after the first
//               mismatch and held until reset
//   err_grp_o   which groups have mismatched since reset (held until reset)
//
// The published SafeLS design states that a mismatch raises an error signal and leaves
// its handling to the SoC; the per-group flags and holding the error until
// reset are this design's choice.
module safels_cmp
  import safels_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      valid,        // main_dly and shadow_out are aligned
  input  core_out_t main_dly,     // main core outputs, staggered
  input  core_out_t shadow_out,   // shadow core outputs
  output grp_vec_t  mismatch_o,
  output logic      error_o,
  output grp_vec_t  err_grp_o
);

  grp_vec_t diff;

  always_comb begin
    diff          = '0;
    diff[GRP_AHB] = main_dly.ahbo != shadow_out.ahbo;
    diff[GRP_IRQ] = main_dly.irqo != shadow_out.irqo;
    diff[GRP_DBG] = main_dly.dbgo != shadow_out.dbgo;
    diff[GRP_CNT] = main_dly.cnt  != shadow_out.cnt;
    mismatch_o    = valid ? diff : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_grp_o <= '0;
      error_o   <= 1'b0;
    end else begin
      err_grp_o <= err_grp_o | mismatch_o;
      error_o   <= error_o | (|mismatch_o);
    end
  end

  // Once raised, the error stays raised until reset.
  assert property (@(posedge clk) disable iff (!rst_n) error_o |=> error_o)
    else $error("safels_cmp: error flag dropped without reset");

endmodule
