// vina_pkg: types and constants shared by every block of the ring-pipelined
// Vina line-search accelerator.
//
// Numbers are signed fixed point with FIX_W = 18 bits (the 18-bit width is the
// one the design is built around); FRAC = 10 of them are fraction bits.  Atom
// and ligand positions are expressed in grid-point units, so the integer part
// of a coordinate is directly a grid index.  Sums that grow over many atoms
// (energy, gradient, dot products) are carried in ACC_W = 32 bit accumulators
// with the same 10 fraction bits; the split into 10 fraction bits and the
// accumulator width are this design's choices.
//
// task_pkt_t is the AG task packet.  It is the only object that moves between
// the Tasks Buffer, the computation units and the ring links: it carries the
// line-search state (start point x0, direction p, step alpha, start energy e0,
// directional derivative g0p), the ligand model (atom types and offsets), the
// atom coordinates produced by P2C, and the running energy and gradient that
// the PEC stages of successive nodes add to.  `origin` and `counter` are the
// energy tag: the node where the energy traversal started and the number of
// grid partitions already summed.
package vina_pkg;

  localparam int FIX_W     = 18;
  localparam int FRAC      = 10;
  localparam int ACC_W     = 32;
  localparam int MAX_ATOMS = 32;   // ligand atoms a packet can carry
  localparam int ATYPE_W   = 3;    // up to 8 grid maps (ligand atom types)
  localparam int NODE_W    = 4;    // up to 16 nodes in the ring
  localparam int CNT_W     = 5;
  localparam int TASK_ID_W = 8;
  localparam int TRIAL_W   = 4;
  localparam int NATOM_W   = 6;
  localparam int GADDR_W   = 24;   // grid-load address width at node ports
  localparam int LINK_W    = 64;   // link word width of the SFP framing

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef fix_t [2:0] vec_t;       // [0]=x, [1]=y, [2]=z
  typedef acc_t [2:0] avec_t;

  typedef struct packed {
    logic [TASK_ID_W-1:0]               task_id;
    logic [NODE_W-1:0]                  origin;   // energy tag: first partition's node
    logic [CNT_W-1:0]                   counter;  // energy tag: partitions summed
    logic [TRIAL_W-1:0]                 trial;    // AG trial number (alpha halvings)
    logic [NATOM_W-1:0]                 n_atoms;
    fix_t                               alpha;
    vec_t                               x0;
    vec_t                               p;
    vec_t                               x;        // trial position, written by POT-U
    acc_t                               e0;
    acc_t                               g0p;
    acc_t                               energy;   // running intermolecular energy
    avec_t                              grad;     // running gradient
    logic [MAX_ATOMS-1:0][ATYPE_W-1:0]  atype;
    vec_t [MAX_ATOMS-1:0]               offs;     // atom offsets from the ligand position
    vec_t [MAX_ATOMS-1:0]               coord;    // atom coordinates, written by P2C
  } task_pkt_t;

  typedef struct packed {
    logic [TASK_ID_W-1:0] task_id;
    logic                 accepted;   // AG condition met (else trials exhausted)
    logic [TRIAL_W-1:0]   trial;
    logic [NODE_W-1:0]    node;       // node whose DER finished the task
    fix_t                 alpha;
    vec_t                 x;
    acc_t                 energy;
    avec_t                grad;
    acc_t                 gp;         // grad . p at the new point
  } ag_result_t;

  // Per-node event pulses, one bit per mechanism, for monitoring.
  typedef struct packed {
    logic local_dispatch;   // task from the Tasks Buffer sent to a POT-U
    logic ring_dispatch;    // ring task sent to a PEC
    logic local_pec;        // locally started task sent to a PEC
    logic forward;          // PEC result sent to the next node (counter < N)
    logic retain;           // PEC result kept for a local DER (counter = N)
    logic bypass;           // ring packet not for this node, passed on
    logic retry;            // DER failed the AG test: new trial queued here
    logic result;           // DER result returned to the PS
    logic stall_local;      // local task waiting, no POT-U idle
    logic stall_ring;       // ring task waiting, no PEC idle
  } node_events_t;

  function automatic fix_t sat_fix(input logic signed [63:0] v);
    if (v > 64'sd131071)       return 18'sh1FFFF;
    else if (v < -64'sd131072) return 18'sh20000;
    else                       return fix_t'(v);
  endfunction

  // a * b for two FRAC-scaled numbers, saturated to 18 bits
  function automatic fix_t fix_mul(input fix_t a, input fix_t b);
    logic signed [63:0] prod;
    prod = 64'(a) * 64'(b);
    return sat_fix(prod >>> FRAC);
  endfunction

  function automatic fix_t fix_add(input fix_t a, input fix_t b);
    return sat_fix(64'(a) + 64'(b));
  endfunction

endpackage
