// safels_delay_line: a shift register with a programmable output tap.
//
// Every cycle the input word and its valid bit move one stage further
// along a chain of MAX_DEPTH registers. The output is taken after stage
// `depth`, so a word presented in cycle t appears at the output in cycle
// t + depth. `depth` must lie in 1..MAX_DEPTH and must not change while
// words are in flight (the wrapper only loads it during reset).
//
// Only the valid bits are reset; the data registers are not, because a
// word is never used unless its valid bit is set. This is the building
// block of both the input and the output stagger of the lockstep wrapper.
module safels_delay_line #(
  parameter int unsigned W         = 8,
  parameter int unsigned MAX_DEPTH = 3,
  localparam int unsigned DW       = $clog2(MAX_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] depth,     // stagger in cycles, 1..MAX_DEPTH
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  output logic [W-1:0]  out_data
);

  logic [W-1:0]         data_q  [MAX_DEPTH];
  logic [MAX_DEPTH-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      valid_q[0] <= in_valid;
      for (int unsigned i = 1; i < MAX_DEPTH; i++) valid_q[i] <= valid_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    data_q[0] <= in_data;
    for (int unsigned i = 1; i < MAX_DEPTH; i++) data_q[i] <= data_q[i-1];
  end

  // Tap after stage `depth` (stage index depth-1).
  always_comb begin
    out_valid = 1'b0;
    out_data  = data_q[0];
    for (int unsigned i = 0; i < MAX_DEPTH; i++) begin
      if (DW'(i + 1) == depth) begin
        out_valid = valid_q[i];
        out_data  = data_q[i];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) depth >= 1 && depth <= DW'(MAX_DEPTH))
    else $error("safels_delay_line: depth %0d out of range", depth);

endmodule
