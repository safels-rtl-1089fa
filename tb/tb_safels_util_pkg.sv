// tb_safels_util_pkg: random stimulus helpers shared by the SafeLS testbenches.
//
// Builds random input and output bundles 32 bits at a time with $urandom,
// and folds a wide bundle into 64 bits for the behavioural core model.
package tb_safels_util_pkg;
  import safels_pkg::*;

  function automatic core_in_t rand_core_in();
    logic [CORE_IN_W-1:0] v;
    for (int i = 0; i < CORE_IN_W; i += 32) v[i +: 32] = 32'($urandom);
    return core_in_t'(v);
  endfunction

  function automatic core_out_t rand_core_out();
    logic [CORE_OUT_W-1:0] v;
    for (int i = 0; i < CORE_OUT_W; i += 32) v[i +: 32] = 32'($urandom);
    return core_out_t'(v);
  endfunction

  // XOR-fold of an input bundle into 64 bits.
  function automatic logic [63:0] fold_in(core_in_t x);
    logic [CORE_IN_W-1:0] v;
    logic [63:0] f;
    v = x;
    f = '0;
    for (int i = 0; i < CORE_IN_W; i++) f[i % 64] ^= v[i];
    return f;
  endfunction

  // A core output bundle with one bit of group g inverted.
  function automatic core_out_t flip_group(core_out_t x, out_group_e g, int unsigned bitpos);
    core_out_t y;
    y = x;
    case (g)
      GRP_AHB: y.ahbo.haddr[bitpos % AHB_ADDR_W] = ~y.ahbo.haddr[bitpos % AHB_ADDR_W];
      GRP_IRQ: y.irqo.irqcause[bitpos % 5]       = ~y.irqo.irqcause[bitpos % 5];
      GRP_DBG: y.dbgo.ddata[bitpos % DBG_DATA_W] = ~y.dbgo.ddata[bitpos % DBG_DATA_W];
      default: y.cnt.events[bitpos % CNT_EVENTS] = ~y.cnt.events[bitpos % CNT_EVENTS];
    endcase
    return y;
  endfunction

endpackage
