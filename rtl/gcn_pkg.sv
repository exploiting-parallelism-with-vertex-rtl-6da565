// gcn_pkg: shared constants and types of the RP-GCN accelerator.
//
// Data geometry: vertex features, normalized adjacency weights and MLP
// weights are 8-bit fixed point (the uniform 8-bit quantization the
// accelerator is built around). RRAM cells and DAC input slices are 2 bits
// wide, so one 8-bit operand spans four cells (bit slices) and four input
// cycles. The crossbar size (128 x 128 cells), the number of crossbars per
// aggregation core, the core counts and the instruction encoding are this
// design's own choices; the vertex-id width (18 bits) is sized to hold the
// largest evaluated graph (232,965 vertices).
package gcn_pkg;

  // ---------------- data geometry ----------------
  localparam int DATA_W      = 8;                    // fixed-point data width
  localparam int CELL_BITS   = 2;                    // bits per RRAM cell
  localparam int DAC_BITS    = 2;                    // bits per DAC input slice
  localparam int SLICES      = DATA_W / CELL_BITS;   // cells per 8-bit value
  localparam int IN_SLICES   = DATA_W / DAC_BITS;    // input cycles per 8-bit input
  localparam int XB_ROWS     = 128;                  // crossbar word lines
  localparam int XB_COLS     = 128;                  // crossbar bit lines
  localparam int FEAT_PER_XB = XB_COLS / SLICES;     // 8-bit features per crossbar
  localparam int XB_PER_CORE = 2;                    // crossbars per aggregation core
  localparam int FEAT        = FEAT_PER_XB * XB_PER_CORE; // feature length held per vertex
  localparam int ACC_W       = 32;                   // aggregation accumulator width
  localparam int VID_W       = 18;                   // vertex id width

  // ---------------- system sizes ----------------
  localparam int N_AGG       = 8;                    // aggregation cores
  localparam int N_FWD       = 4;                    // data forwarding units
  localparam int N_MLP       = 4;                    // MLP cores
  localparam int N_SLOTS     = 2;                    // merge slots (multi-core vertices in flight)
  localparam int CORE_W      = $clog2(N_AGG);
  localparam int SLOT_W      = $clog2(N_SLOTS);
  localparam int NPART_W     = $clog2(N_AGG + 1);
  localparam int NB_DEPTH    = 512;                  // neighbor buffer entries (64 KB of adjacency weights)
  localparam int NB_AW       = $clog2(NB_DEPTH);

  // ---------------- types ----------------
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ACC_W-1:0]  acc_t;
  typedef logic [VID_W-1:0]  vid_t;
  typedef data_t [FEAT-1:0]  feat_vec_t;
  typedef acc_t  [FEAT-1:0]  acc_vec_t;
  typedef data_t [XB_ROWS-1:0] adj_vec_t;

  typedef enum logic [0:0] {AGG_SUM = 1'b0, AGG_MAX = 1'b1} agg_mode_e;

  // One neighbor-buffer entry: the adjacency weights of vertex `vid` towards
  // the rows of aggregation core `core`. Entries of one vertex are stored
  // next to each other; `nparts` says how many cores hold its neighbors.
  typedef struct packed {
    vid_t                 vid;
    logic [CORE_W-1:0]    core;
    logic [NPART_W-1:0]   nparts;
    adj_vec_t             adj;
  } nb_entry_t;

  // Aggregation request sent to one core.
  typedef struct packed {
    vid_t                 vid;
    logic [SLOT_W-1:0]    slot;
    logic [NPART_W-1:0]   nparts;
    agg_mode_e            mode;
    adj_vec_t             adj;
  } agg_req_t;

  // Partial aggregation result leaving a core.
  typedef struct packed {
    vid_t                 vid;
    logic [SLOT_W-1:0]    slot;
    logic [NPART_W-1:0]   nparts;
    agg_mode_e            mode;
    acc_vec_t             acc;
  } part_t;

  // Complete aggregation result of one vertex.
  typedef struct packed {
    vid_t                 vid;
    acc_vec_t             acc;
  } agg_res_t;

  // Updated feature vector of one vertex (combination result).
  typedef struct packed {
    vid_t                 vid;
    feat_vec_t            feat;
  } upd_t;

  // ---------------- instruction set ----------------
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_CFG  = 4'h1,   // base[0]: aggregation mode; count[4:0]: aggregation shift; count[9:5]: MLP output shift
    OP_AGG  = 4'h2,   // aggregate entries nb[base .. base+count-1]
    OP_COMB = 4'h3,   // combine `count` aggregation results
    OP_UPD  = 4'h4,   // write `count` combination results into the update space
    OP_OUT  = 4'h5,   // send `count` combination results to the host
    OP_SWAP = 4'h6,   // exchange work and update spaces (end of a layer)
    OP_SYNC = 4'h7,   // wait until every engine is idle
    OP_HALT = 4'h8    // wait until idle, then raise done
  } opcode_e;

  typedef struct packed {
    opcode_e      op;
    logic [15:0]  count;
    logic [11:0]  base;
  } instr_t;

  function automatic instr_t mk_instr(opcode_e op, int unsigned count, int unsigned base);
    instr_t i;
    i.op    = op;
    i.count = 16'(count);
    i.base  = 12'(base);
    return i;
  endfunction

endpackage
