// safels: dual-core lockstep wrapper for a NOEL-V core (SafeLS).
//
// Two identical cores, a main and a shadow core, run the same instruction
// stream. The shadow core runs `N` cycles behind the main core, so that at
// any moment the two are in electrically different states and a single
// common-cause disturbance (clock, power) cannot corrupt both in the same
// way. The sphere of replication is the full core including its L1 caches
// and MMU; everything that crosses its boundary passes through this
// wrapper:
//
//   SoC inputs  --+----------------------------------> main core
//                 +--> stagger_in (N cycles) --------> shadow core
//   main core outputs --+----------------------------> SoC
//                       +--> stagger_out (N cycles) --> cmp <-- shadow core outputs
//                                                        |
//                                                        +--> error_o
//
// The cores themselves are not part of this module: their input bundle,
// output bundle and reset are ports (main_* and shadow_*), so that any core
// with this boundary can be dropped in.
//
// Stagger: `stagger_i` is sampled on every clock edge while rst_n is low and
// held once reset is released; values are clamped to 1..MAX_STAGGER. Keep
// rst_n low for at least one clock edge. The main core leaves reset with
// the wrapper; the shadow core leaves reset N cycles later.
//
// Output delivery (parameter DELAY_OUTPUTS):
//   0 (default) the main core outputs reach the SoC in the same cycle, and
//     the staggered copy is only compared. This keeps the AHB timing of a
//     plain core; a wrong output is flagged N cycles after it was driven.
//   1 the SoC sees the main core outputs N cycles late, and only when they
//     match the shadow core; in a cycle with a mismatch the wrapper drives
//     an idle bus master with no interrupt acknowledge, debug data or
//     events instead. This is the canonical lockstep scheme; it changes the
//     core's bus timing.
//
// Error: error_o rises in the cycle after the first mismatch and stays high
// until reset; err_grp_o tells which output groups mismatched, mismatch_o
// shows the current cycle. Acting on the error is left to the SoC.
//
// What follows the published SafeLS design: the sphere of replication, the signal groups,
// inputs to the main core at once and to the shadow core N cycles later,
// main outputs delayed N cycles and compared, outputs delivered directly in
// the integrated design, an error output, trace outputs left out. This
// design's own choices: the record contents (see safels_pkg), the range
// and loading of N, the staggered shadow reset, the error flag being held,
// the per-group flags and the idle value in the delayed-output variant.
module safels
  import safels_pkg::*;
#(
  parameter int unsigned MAX_STAGGER   = MAX_STAGGER_DEFAULT,
  parameter bit          DELAY_OUTPUTS = 1'b0,
  localparam int unsigned SW           = $clog2(MAX_STAGGER + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SW-1:0]       stagger_i,     // N, sampled during reset

  // SoC side: what a single core would see
  input  ahb_mst_in_t         ahbi_i,        // from the AHB (to the L2 cache)
  input  ahb_slv_in_t         ahbsi_i,       // AHB slave inputs (snooping)
  input  ahb_slv_out_vector_t ahbso_i,       // AHB slave output vector
  input  nv_irq_in_t          irqi_i,        // from the CLINT
  input  nv_debug_in_t        dbgi_i,        // from the DSU
  output ahb_mst_out_t        ahbo_o,        // to the AHB
  output nv_irq_out_t         irqo_o,        // to the CLINT
  output nv_debug_out_t       dbgo_o,        // to the DSU
  output nv_counter_out_t     cnt_o,         // to the SafeSU

  // Lockstep status
  output logic                error_o,
  output grp_vec_t            err_grp_o,
  output grp_vec_t            mismatch_o,
  output logic [SW-1:0]       stagger_o,     // N in use

  // Main core
  output logic                main_rst_n_o,
  output core_in_t            main_in_o,
  input  core_out_t           main_out_i,

  // Shadow core
  output logic                shadow_rst_n_o,
  output core_in_t            shadow_in_o,
  input  core_out_t           shadow_out_i
);

  // ------------------------------------------------------------ stagger N
  logic [SW-1:0] depth_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      if (stagger_i == '0)                    depth_q <= SW'(1);
      else if (stagger_i > SW'(MAX_STAGGER))  depth_q <= SW'(MAX_STAGGER);
      else                                    depth_q <= stagger_i;
    end
  end

  assign stagger_o = depth_q;

  // ------------------------------------------------------------ inputs
  core_in_t soc_in;

  always_comb begin
    soc_in.ahbi  = ahbi_i;
    soc_in.ahbsi = ahbsi_i;
    soc_in.ahbso = ahbso_i;
    soc_in.irqi  = irqi_i;
    soc_in.dbgi  = dbgi_i;
  end

  assign main_rst_n_o = rst_n;
  assign main_in_o    = soc_in;

  safels_stagger_in #(
    .MAX_STAGGER (MAX_STAGGER)
  ) u_stagger_in (
    .clk          (clk),
    .rst_n        (rst_n),
    .depth        (depth_q),
    .soc_in       (soc_in),
    .shadow_in    (shadow_in_o),
    .shadow_rst_n (shadow_rst_n_o)
  );

  // ------------------------------------------------------------ outputs
  core_out_t main_dly;
  logic      dly_valid;

  safels_stagger_out #(
    .MAX_STAGGER (MAX_STAGGER)
  ) u_stagger_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .depth     (depth_q),
    .main_out  (main_out_i),
    .main_dly  (main_dly),
    .dly_valid (dly_valid)
  );

  safels_cmp u_cmp (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid      (dly_valid),
    .main_dly   (main_dly),
    .shadow_out (shadow_out_i),
    .mismatch_o (mismatch_o),
    .error_o    (error_o),
    .err_grp_o  (err_grp_o)
  );

  core_out_t soc_out;

  always_comb begin
    if (!DELAY_OUTPUTS)                      soc_out = main_out_i;
    else if (dly_valid && mismatch_o == '0)  soc_out = main_dly;
    else                                     soc_out = CORE_OUT_IDLE;
  end

  assign ahbo_o = soc_out.ahbo;
  assign irqo_o = soc_out.irqo;
  assign dbgo_o = soc_out.dbgo;
  assign cnt_o  = soc_out.cnt;

  // The shadow core never runs ahead of the main core.
  assert property (@(posedge clk) disable iff (!rst_n) shadow_rst_n_o |-> main_rst_n_o)
    else $error("safels: shadow core out of reset before the main core");

endmodule
