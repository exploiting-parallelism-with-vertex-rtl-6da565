// agg_core_array: the aggregation core array and its forwarding network.
//
// N_CORES aggregation cores work concurrently and independently on the
// requests the controller sends them (one request bus, addressed by core
// index). Their partial results travel over a crossbar-style network to
// N_FWDU data forwarding units, which also work in parallel: a partial
// result of a vertex spread over several cores goes to unit
// (slot mod N_FWDU), so all parts of one vertex meet in the same unit; a
// single-core result goes to unit (vid mod N_FWDU). Complete aggregation
// results leave through a round-robin arbiter, one per cycle, towards the
// intermediate buffer. Feature updates, row-map loads and the work/update
// swap are broadcast to every core (row-map writes select one core).
// `slot_free` is a mask of merge slots released this cycle.
// The number of cores and forwarding units and the all-to-all routing are
// this design's choice; the structure (cores plus merging forwarding units
// in a network) follows the described array.
module agg_core_array
  import gcn_pkg::*;
#(
  parameter int unsigned N_CORES = N_AGG,
  parameter int unsigned N_FWDU  = N_FWD,
  parameter int unsigned ROWS    = XB_ROWS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requests
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic [CORE_W-1:0]        req_core,
  input  agg_req_t                 req,
  // complete results
  output logic                     res_valid,
  input  logic                     res_ready,
  output agg_res_t                 res,
  output logic [N_SLOTS-1:0]       slot_free,
  // broadcast update, row map, swap
  input  logic                     upd_valid,
  input  upd_t                     upd,
  input  logic                     map_we,
  input  logic [CORE_W-1:0]        map_core,
  input  logic [$clog2(ROWS)-1:0]  map_row,
  input  vid_t                     map_vid,
  input  logic                     map_ok,
  input  logic                     swap,
  output logic                     work_sel,      // which copy is the work space
  output logic                     busy,
  output logic [N_CORES-1:0]       core_busy,
  output logic                     ev_merge,
  output logic                     ev_bypass,
  output logic                     ev_contention  // two or more cores targeted one unit in a cycle
);
  localparam int FW = (N_FWDU > 1) ? $clog2(N_FWDU) : 1;

  logic [N_CORES-1:0] c_req_ready, c_part_valid, c_part_ready, c_sel;
  part_t              c_part [N_CORES];
  logic [FW-1:0]      c_dest [N_CORES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    agg_core #(.ROWS(ROWS)) u_core (
      .clk, .rst_n,
      .req_valid  (req_valid && req_core == CORE_W'(c)),
      .req_ready  (c_req_ready[c]),
      .req        (req),
      .part_valid (c_part_valid[c]),
      .part_ready (c_part_ready[c]),
      .part       (c_part[c]),
      .upd_valid  (upd_valid),
      .upd        (upd),
      .map_we     (map_we && map_core == CORE_W'(c)),
      .map_row    (map_row),
      .map_vid    (map_vid),
      .map_ok     (map_ok),
      .swap       (swap),
      .work_sel   (c_sel[c]),
      .busy       (core_busy[c])
    );
    assign c_dest[c] = (c_part[c].nparts > NPART_W'(1)) ? FW'(c_part[c].slot % N_FWDU)
                                                        : FW'(c_part[c].vid  % N_FWDU);
  end

  assign req_ready = c_req_ready[req_core];

  // ---------------- forwarding units ----------------
  logic [N_CORES-1:0] f_in_valid [N_FWDU];
  logic [N_CORES-1:0] f_in_ready [N_FWDU];
  logic [N_FWDU-1:0]  f_out_valid, f_out_ready, f_rel, f_merge, f_bypass;
  agg_res_t           f_out [N_FWDU];
  logic [SLOT_W-1:0]  f_rel_slot [N_FWDU];

  for (genvar d = 0; d < N_FWDU; d++) begin : g_fwd
    always_comb
      for (int c = 0; c < N_CORES; c++)
        f_in_valid[d][c] = c_part_valid[c] && (c_dest[c] == FW'(d));
    fwd_unit #(.N_IN(N_CORES), .SLOTS(N_SLOTS)) u_fwd (
      .clk, .rst_n,
      .in_valid  (f_in_valid[d]),
      .in_ready  (f_in_ready[d]),
      .in_part   (c_part),
      .out_valid (f_out_valid[d]),
      .out_ready (f_out_ready[d]),
      .out_res   (f_out[d]),
      .rel_valid (f_rel[d]),
      .rel_slot  (f_rel_slot[d]),
      .ev_merge  (f_merge[d]),
      .ev_bypass (f_bypass[d])
    );
  end

  always_comb begin
    c_part_ready  = '0;
    slot_free     = '0;
    ev_contention = 1'b0;
    for (int d = 0; d < N_FWDU; d++) begin
      c_part_ready |= f_in_ready[d];
      if (f_rel[d]) slot_free[f_rel_slot[d]] = 1'b1;
      if (!$onehot0(f_in_valid[d])) ev_contention = 1'b1;
    end
  end
  assign ev_merge  = |f_merge;
  assign ev_bypass = |f_bypass;

  // ---------------- output arbiter ----------------
  logic [FW-1:0] last, pick;
  logic          any;
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= N_FWDU; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N_FWDU;
      if (!any && f_out_valid[i]) begin
        any  = 1'b1;
        pick = FW'(i);
      end
    end
  end
  assign res_valid = any;
  assign res       = f_out[pick];
  always_comb begin
    f_out_ready = '0;
    if (any && res_ready) f_out_ready[pick] = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= '0;
    else if (any && res_ready) last <= pick;
  end

  assign busy     = (|core_busy) || (|f_out_valid);
  assign work_sel = c_sel[0];

endmodule
