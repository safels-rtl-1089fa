// safels_pkg: types and constants shared by the SafeLS lockstep wrapper.
//
// The wrapper sits on the boundary of a NOEL-V core (the sphere of
// replication includes the L1 caches and MMU) and sees exactly the signal
// groups that cross that boundary in the SELENE SoC: the AHB master and
// snoop inputs, the AHB master outputs, the interrupt inputs and outputs,
// the debug inputs and outputs, and the event counter outputs that feed the
// SafeSU. The trace outputs are not used by that SoC and are left out.
//
// The grouping and the record names (ahb_mst_in_type, nv_irq_in_type, ...)
// follow the NOEL-V/GRLIB interface. The fields inside each record and
// their widths are this design's choice: a reduced AMBA AHB record set with
// a 32-bit address and a 64-bit data bus, and small interrupt, debug and
// counter records. The wrapper never looks inside a record except to tell
// which group mismatched, so any other field set works unchanged.
package safels_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned AHB_ADDR_W = 32;  // AMBA AHB address width
  localparam int unsigned AHB_DATA_W = 64;  // AHB data bus width
  localparam int unsigned AHB_NMST   = 16;  // masters on the AHB (grant vector)
  localparam int unsigned AHB_NSLV   = 16;  // slaves on the AHB (slave output vector)
  localparam int unsigned AHB_NIRQ   = 32;  // AHB interrupt lines
  localparam int unsigned DBG_DATA_W = 64;  // debug data path
  localparam int unsigned DBG_ADDR_W = 16;  // debug register address
  localparam int unsigned CNT_EVENTS = 32;  // event lines to the SafeSU

  // Largest stagger (in cycles) the delay lines are built for.
  localparam int unsigned MAX_STAGGER_DEFAULT = 3;

  // AHB transfer types
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // ---------------------------------------------------------------- AHB
  // ahb_mst_in_type: what the bus returns to a master.
  typedef struct packed {
    logic [AHB_NMST-1:0]   hgrant;
    logic                  hready;
    logic [1:0]            hresp;
    logic [AHB_DATA_W-1:0] hrdata;
    logic [AHB_NIRQ-1:0]   hirq;
  } ahb_mst_in_t;

  // ahb_mst_out_type: what a master drives onto the bus.
  typedef struct packed {
    logic                  hbusreq;
    logic                  hlock;
    htrans_e               htrans;
    logic [AHB_ADDR_W-1:0] haddr;
    logic                  hwrite;
    logic [2:0]            hsize;
    logic [2:0]            hburst;
    logic [3:0]            hprot;
    logic [AHB_DATA_W-1:0] hwdata;
    logic [AHB_NIRQ-1:0]   hirq;
  } ahb_mst_out_t;

  // ahb_slv_in_type: the bus as every slave sees it (used by the core
  // for cache snooping).
  typedef struct packed {
    logic [AHB_NSLV-1:0]   hsel;
    logic [AHB_ADDR_W-1:0] haddr;
    logic                  hwrite;
    htrans_e               htrans;
    logic [2:0]            hsize;
    logic [2:0]            hburst;
    logic [AHB_DATA_W-1:0] hwdata;
    logic [3:0]            hprot;
    logic                  hready;
    logic [3:0]            hmaster;
    logic                  hmastlock;
    logic [AHB_NIRQ-1:0]   hirq;
  } ahb_slv_in_t;

  // One entry of ahb_slv_out_vector.
  typedef struct packed {
    logic                  hready;
    logic [1:0]            hresp;
    logic [AHB_DATA_W-1:0] hrdata;
    logic [AHB_NMST-1:0]   hsplit;
    logic [AHB_NIRQ-1:0]   hirq;
  } ahb_slv_out_t;

  typedef ahb_slv_out_t [AHB_NSLV-1:0] ahb_slv_out_vector_t;

  // ---------------------------------------------------------------- IRQ
  // nv_irq_in_type: interrupt lines from the CLINT / interrupt controller.
  typedef struct packed {
    logic                  meip;    // machine external
    logic                  seip;    // supervisor external
    logic                  mtip;    // machine timer
    logic                  msip;    // machine software
    logic [AHB_ADDR_W-1:0] rstvec;  // reset vector
  } nv_irq_in_t;

  // nv_irq_out_type: interrupt acknowledge from the core.
  typedef struct packed {
    logic       irqack;
    logic [4:0] irqcause;
  } nv_irq_out_t;

  // ---------------------------------------------------------------- debug
  // nv_debug_in_type: control from the debug support unit.
  typedef struct packed {
    logic                  dsuen;
    logic                  halt;
    logic                  resume;
    logic                  reset;
    logic                  freeze;
    logic                  denable;
    logic                  dwrite;
    logic [DBG_ADDR_W-1:0] daddr;
    logic [DBG_DATA_W-1:0] ddata;
  } nv_debug_in_t;

  // nv_debug_out_type: core state reported to the debug support unit.
  typedef struct packed {
    logic                  halted;
    logic                  running;
    logic                  error;
    logic                  dvalid;
    logic [DBG_DATA_W-1:0] ddata;
  } nv_debug_out_t;

  // ---------------------------------------------------------------- counters
  // nv_counter_out_type: event lines fed straight into the SafeSU.
  typedef struct packed {
    logic [CNT_EVENTS-1:0] events;
  } nv_counter_out_t;

  // ---------------------------------------------------------------- bundles
  // Everything that enters the sphere of replication.
  typedef struct packed {
    ahb_mst_in_t         ahbi;
    ahb_slv_in_t         ahbsi;
    ahb_slv_out_vector_t ahbso;
    nv_irq_in_t          irqi;
    nv_debug_in_t        dbgi;
  } core_in_t;

  // Everything that leaves the sphere of replication.
  typedef struct packed {
    ahb_mst_out_t    ahbo;
    nv_irq_out_t     irqo;
    nv_debug_out_t   dbgo;
    nv_counter_out_t cnt;
  } core_out_t;

  localparam int unsigned CORE_IN_W  = $bits(core_in_t);
  localparam int unsigned CORE_OUT_W = $bits(core_out_t);

  // Output groups the comparator reports separately (Fig. 3 colours).
  typedef enum logic [1:0] {
    GRP_AHB = 2'd0,
    GRP_IRQ = 2'd1,
    GRP_DBG = 2'd2,
    GRP_CNT = 2'd3
  } out_group_e;

  localparam int unsigned NGROUPS = 4;

  // Per-group mismatch flags, indexed by out_group_e.
  typedef logic [NGROUPS-1:0] grp_vec_t;

  // What the SoC sees from the wrapper when an output is withheld (only in
  // the delayed-output variant): an idle AHB master, no interrupt
  // acknowledge, no debug data and no events.
  localparam core_out_t CORE_OUT_IDLE = '0;

endpackage
