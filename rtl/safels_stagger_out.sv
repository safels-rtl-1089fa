// safels_stagger_out: the output stagger of the lockstep wrapper.
//
// Delays every output of the main core (AHB master outputs, interrupt
// outputs, debug outputs, SafeSU event lines) by `depth` cycles, so that
// each delayed word lines up with the word the shadow core produces from
// the same input history. The valid bit that travels with the data marks
// words taken while the main core was out of reset; it tells the comparator
// when the two streams are aligned.
//
// Timing: the main core output seen in the cycle before clock edge e
// appears at `main_dly` after edge e + depth - 1, i.e. together with the
// shadow output of the same step. `depth` is 1..MAX_STAGGER and is held
// steady outside reset.
//
// The published SafeLS design gives the function (main core outputs delayed by N cycles
// and compared with the shadow core); the implementation as a tapped shift
// register is this design's choice.
module safels_stagger_out
  import safels_pkg::*;
#(
  parameter int unsigned MAX_STAGGER = MAX_STAGGER_DEFAULT,
  localparam int unsigned SW         = $clog2(MAX_STAGGER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] depth,      // stagger in cycles
  input  core_out_t     main_out,   // main core outputs
  output core_out_t     main_dly,   // main core outputs, depth cycles later
  output logic          dly_valid   // main_dly is aligned with the shadow core
);

  logic [CORE_OUT_W-1:0] dl_data;

  safels_delay_line #(
    .W         (CORE_OUT_W),
    .MAX_DEPTH (MAX_STAGGER)
  ) u_dl (
    .clk       (clk),
    .rst_n     (rst_n),
    .depth     (depth),
    .in_valid  (1'b1),
    .in_data   (main_out),
    .out_valid (dly_valid),
    .out_data  (dl_data)
  );

  assign main_dly = core_out_t'(dl_data);

endmodule
