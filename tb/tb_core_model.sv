// tb_core_model: behavioural stand-in for a NOEL-V core in the SafeLS tests.
//
// Not a processor. It is a deterministic state machine with the core's
// boundary: each active clock edge folds the whole input bundle into a
// 64-bit state, and the outputs are functions of that state (plus a few
// input bits combinationally, as a core's handshake outputs can be). Two
// instances fed the same input sequence from their reset release on
// produce the same output sequence, which is all the lockstep wrapper
// relies on.
//
// Fault hooks: `flip_state` inverts a state bit at the next edge (a
// lasting divergence); `flip_out`/`flip_grp` invert one bit of an output
// group for as long as flip_out is high (a transient output error).
module tb_core_model
  import safels_pkg::*;
  import tb_safels_util_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  core_in_t   in,
  input  logic       flip_state,
  input  logic       flip_out,
  input  out_group_e flip_grp,
  output core_out_t  out
);

  logic [63:0] s;
  logic [31:0] steps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s     <= 64'h0123_4567_89ab_cdef;
      steps <= '0;
    end else begin
      s     <= ({s[62:0], s[63] ^ s[60] ^ s[59] ^ s[57]} ^ fold_in(in)) ^ {63'd0, flip_state};
      steps <= steps + 1;
    end
  end

  core_out_t o;

  always_comb begin
    o = '0;
    o.ahbo.hbusreq  = s[0];
    o.ahbo.htrans   = s[0] ? (s[1] ? HTRANS_SEQ : HTRANS_NONSEQ) : HTRANS_IDLE;
    o.ahbo.haddr    = s[31:0];
    o.ahbo.hwrite   = s[2];
    o.ahbo.hsize    = 3'd3;
    o.ahbo.hwdata   = {s[31:0], s[63:32]};
    o.ahbo.hprot    = s[7:4];
    o.irqo.irqack   = in.irqi.meip & s[3];
    o.irqo.irqcause = s[12:8];
    o.dbgo.halted   = in.dbgi.halt;
    o.dbgo.running  = ~in.dbgi.halt;
    o.dbgo.dvalid   = in.dbgi.denable;
    o.dbgo.ddata    = s ^ in.dbgi.ddata;
    o.cnt.events    = steps ^ s[63:32];
    out = flip_out ? flip_group(o, flip_grp, 5) : o;
  end

endmodule
