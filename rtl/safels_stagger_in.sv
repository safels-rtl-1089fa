// safels_stagger_in: the input stagger of the lockstep wrapper.
//
// Every signal that enters the sphere of replication (AHB master inputs,
// AHB snoop inputs, AHB slave output vector, interrupt inputs, debug
// inputs) goes to the main core unchanged and, through this block, to the
// shadow core `depth` cycles later. The reset release of the shadow core is
// staggered the same way: a valid bit enters the delay line once the
// wrapper leaves reset, and the shadow core is held in reset until that bit
// reaches the tap. The shadow core therefore sees, from its first active
// clock edge on, exactly the input sequence the main core saw `depth`
// cycles before.
//
// Timing: a value sampled by the main core at clock edge e is sampled by
// the shadow core at edge e + depth. `depth` is 1..MAX_STAGGER and must be
// held steady outside reset.
//
// The published SafeLS design gives the function (inputs delayed by a programmable number
// of cycles to the shadow core); the shift register with a selectable tap
// and the staggered shadow reset are this design's choice.
module safels_stagger_in
  import safels_pkg::*;
#(
  parameter int unsigned MAX_STAGGER = MAX_STAGGER_DEFAULT,
  localparam int unsigned SW         = $clog2(MAX_STAGGER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] depth,          // stagger in cycles
  input  core_in_t      soc_in,         // inputs as the SoC drives them
  output core_in_t      shadow_in,      // the same inputs, depth cycles later
  output logic          shadow_rst_n    // shadow core reset, released depth cycles late
);

  logic           dl_valid;
  logic [CORE_IN_W-1:0] dl_data;

  safels_delay_line #(
    .W         (CORE_IN_W),
    .MAX_DEPTH (MAX_STAGGER)
  ) u_dl (
    .clk       (clk),
    .rst_n     (rst_n),
    .depth     (depth),
    .in_valid  (1'b1),
    .in_data   (soc_in),
    .out_valid (dl_valid),
    .out_data  (dl_data)
  );

  assign shadow_in    = core_in_t'(dl_data);
  assign shadow_rst_n = dl_valid;

endmodule
