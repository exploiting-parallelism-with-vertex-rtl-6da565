// rp_gcn_top: RRAM-based multi-core processing-in-memory GCN accelerator.
//
// A GCN layer is H' = f(A * H * W). The accelerator keeps the dense feature
// matrix H in RRAM crossbars of many aggregation cores (one vertex per
// crossbar row, vertices grouped by graph clustering so that most
// neighbors of a vertex sit in the same core) and streams the sparse
// normalized adjacency matrix A from the neighbor buffer as word-line
// inputs, so each core computes in-situ the partial aggregation of a vertex
// over the neighbors it holds. Data forwarding units merge the partial
// results of vertices whose neighbors span several cores. The complete
// aggregation results pass through the intermediate buffer to the
// combination array, where MLP cores (weights in crossbars, non-linearity
// in a look-up table) produce the next layer's features, which are written
// back into the update space of the aggregation cores while the work space
// keeps serving the current layer (ping-pong). The control block runs the
// three phases of different iterations concurrently.
//
// Host interface: instructions (valid/ready), neighbor-buffer writes,
// row-map writes (which vertex each core row holds), direct feature writes
// into the update space (accepted while no UPD instruction drives the update
// bus), MLP weight-row and LUT writes, and a valid/ready output stream of
// combination results (OUT instruction). `done` rises after HALT; the ev_*
// outputs pulse when the corresponding mechanism acts (for monitoring).
module rp_gcn_top
  import gcn_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // instructions
  input  logic                        instr_valid,
  output logic                        instr_ready,
  input  instr_t                      instr,
  // neighbor buffer fill
  input  logic                        nb_we,
  input  logic [NB_AW-1:0]            nb_waddr,
  input  nb_entry_t                   nb_wdata,
  // row map of the aggregation cores
  input  logic                        map_we,
  input  logic [CORE_W-1:0]           map_core,
  input  logic [$clog2(XB_ROWS)-1:0]  map_row,
  input  vid_t                        map_vid,
  input  logic                        map_ok,
  // initial features (written into the update space)
  input  logic                        feat_we,
  output logic                        feat_ready,
  input  upd_t                        feat,
  // MLP weights and LUT
  input  logic                        w_we,
  input  logic [$clog2(FEAT)-1:0]     w_row,
  input  logic [FEAT-1:0][DATA_W-1:0] w_data,
  input  logic                        lut_we,
  input  logic [DATA_W-1:0]           lut_addr,
  input  data_t                       lut_data,
  // results to the host
  output logic                        out_valid,
  input  logic                        out_ready,
  output upd_t                        out_upd,
  // status
  output logic                        done,
  output logic                        work_sel,
  output logic                        ev_stall,
  output logic                        ev_slot_stall,
  output logic                        ev_overlap,
  output logic                        ev_merge,
  output logic                        ev_bypass,
  output logic                        ev_contention,
  output logic                        ev_mlp_parallel
);
  agg_mode_e  agg_mode;
  logic [4:0] agg_shift, out_shift;

  // neighbor buffer
  logic             nb_re;
  logic [NB_AW-1:0] nb_raddr;
  nb_entry_t        nb_rdata;
  neighbor_buffer u_nb (
    .clk, .we(nb_we), .waddr(nb_waddr), .wdata(nb_wdata),
    .re(nb_re), .raddr(nb_raddr), .rdata(nb_rdata)
  );

  // aggregation core array
  logic               req_valid, req_ready, res_valid, res_ready, agg_busy, swap;
  logic [CORE_W-1:0]  req_core;
  agg_req_t           req;
  agg_res_t           res;
  logic [N_SLOTS-1:0] slot_free;
  logic               upd_valid_c, upd_bus_valid;
  upd_t               upd_bus;
  logic [N_AGG-1:0]   agg_core_busy;

  agg_core_array u_agg (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_core, .req,
    .res_valid, .res_ready, .res, .slot_free,
    .upd_valid (upd_bus_valid), .upd (upd_bus),
    .map_we, .map_core, .map_row, .map_vid, .map_ok,
    .swap, .work_sel, .busy(agg_busy), .core_busy(agg_core_busy),
    .ev_merge, .ev_bypass, .ev_contention
  );

  // intermediate buffer
  logic     ib_agg_valid, ib_agg_ready, ib_upd_valid, ib_upd_ready;
  logic     comb_in_valid, comb_in_ready, comb_out_valid, comb_out_ready;
  agg_res_t ib_agg;
  upd_t     ib_upd, comb_out;
  inter_buffer u_ib (
    .clk, .rst_n,
    .agg_in_valid(res_valid), .agg_in_ready(res_ready), .agg_in(res),
    .agg_out_valid(ib_agg_valid), .agg_out_ready(ib_agg_ready), .agg_out(ib_agg),
    .upd_in_valid(comb_out_valid), .upd_in_ready(comb_out_ready), .upd_in(comb_out),
    .upd_out_valid(ib_upd_valid), .upd_out_ready(ib_upd_ready), .upd_out(ib_upd),
    .agg_count(), .upd_count()
  );

  // combination core array
  logic [N_MLP-1:0] mlp_busy;
  comb_core_array u_comb (
    .clk, .rst_n, .agg_shift, .out_shift,
    .in_valid(comb_in_valid), .in_ready(comb_in_ready), .in_res(ib_agg),
    .out_valid(comb_out_valid), .out_ready(comb_out_ready), .out_upd(comb_out),
    .w_we, .w_row, .w_data, .lut_we, .lut_addr, .lut_data,
    .busy(), .wq_count(), .core_busy(mlp_busy)
  );
  assign ev_mlp_parallel = !$onehot0(mlp_busy);

  // control block
  control_block u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr_ready, .instr,
    .agg_mode, .agg_shift, .out_shift,
    .nb_re, .nb_raddr, .nb_rdata,
    .req_valid, .req_ready, .req_core, .req,
    .agg_res_fire(res_valid && res_ready), .slot_free, .agg_busy, .swap,
    .ib_agg_valid, .ib_agg_ready, .comb_in_valid, .comb_in_ready,
    .comb_out_fire(comb_out_valid && comb_out_ready),
    .ib_upd_valid, .ib_upd_ready, .upd_valid(upd_valid_c),
    .host_out_valid(out_valid), .host_out_ready(out_ready),
    .done, .iq_level(), .ev_stall, .ev_slot_stall, .ev_overlap
  );

  // update bus: controller write-back has priority over host feature writes
  assign feat_ready    = !upd_valid_c;
  assign upd_bus_valid = upd_valid_c || feat_we;
  assign upd_bus       = upd_valid_c ? ib_upd : feat;
  assign out_upd       = ib_upd;

endmodule
