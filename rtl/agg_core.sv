// agg_core: one RRAM aggregation core.
//
// The core holds the feature vectors of up to ROWS vertices, one vertex per
// crossbar row, FEAT 8-bit features per row spread over XB_PER_CORE
// crossbars (each 8-bit feature occupies four adjacent 2-bit cells, least
// significant slice first). It keeps two copies of this storage, the work
// space and the update space, used ping-pong: aggregation reads the work
// space while feature updates of the next layer are written into the update
// space; `swap` exchanges the roles at the end of a layer.
//
// Aggregation modes (chosen per request):
//  * AGG_SUM: the adjacency weights of the request drive the word lines, two
//    bits per cycle over four cycles (DAC slices). Each cycle the bit-line
//    sums are recombined across cell slices and accumulated with the weight
//    of the input slice (shift-and-add), giving sum_r adj[r]*feat[r] for
//    every feature. Latency: 4 compute cycles + 1 output cycle.
//  * AGG_MAX: rows with a non-zero adjacency weight are read one per cycle
//    (a one-hot word-line input) and compared feature by feature, giving the
//    element-wise maximum over the neighbors held here. Latency: one cycle
//    per neighbor + 1 output cycle; an empty neighbor set yields zeros.
//
// Feature updates arrive as a broadcast (vertex id, feature vector). A small
// row map, loaded by the host, records which vertex each row holds; every
// row holding the broadcast vertex is rewritten in the update space, so a
// vertex duplicated into idle rows of several cores stays consistent.
// Request and result use valid/ready; the result is held until accepted.
// The row-map broadcast and the bit-serial schedule are this design's own
// choice; the ping-pong spaces and the adder/comparator merging follow the
// described core.
module agg_core
  import gcn_pkg::*;
#(
  parameter int unsigned ROWS = XB_ROWS
) (
  input  logic       clk,
  input  logic       rst_n,
  // aggregation request
  input  logic       req_valid,
  output logic       req_ready,
  input  agg_req_t   req,
  // partial result
  output logic       part_valid,
  input  logic       part_ready,
  output part_t      part,
  // feature update broadcast (written into the update space)
  input  logic       upd_valid,
  input  upd_t       upd,
  // row map load
  input  logic                     map_we,
  input  logic [$clog2(ROWS)-1:0]  map_row,
  input  vid_t                     map_vid,
  input  logic                     map_ok,
  // exchange work and update space
  input  logic       swap,
  output logic       work_sel,
  output logic       busy
);
  localparam int unsigned ADC_W = CELL_BITS + DAC_BITS + $clog2(ROWS);
  localparam int unsigned XCOLS = FEAT_PER_XB * SLICES;

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_MAX, S_OUT} state_e;
  state_e state;

  // ---------------- row map ----------------
  vid_t               row_vid [ROWS];
  logic [ROWS-1:0]    row_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_ok <= '0;
    else if (map_we) row_ok[map_row] <= map_ok;
  end
  always_ff @(posedge clk) if (map_we) row_vid[map_row] <= map_vid;

  logic [ROWS-1:0] upd_rows;
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      upd_rows[r] = upd_valid && row_ok[r] && (row_vid[r] == upd.vid);
  end

  // ---------------- crossbars: [bank][crossbar] ----------------
  logic [ROWS-1:0][DAC_BITS-1:0] drive;
  logic [XCOLS-1:0][ADC_W-1:0]   xb_out [2][XB_PER_CORE];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar x = 0; x < XB_PER_CORE; x++) begin : g_xb
      logic [XCOLS-1:0][CELL_BITS-1:0] wd;
      logic [ROWS-1:0][DAC_BITS-1:0]   rin;
      always_comb begin
        for (int f = 0; f < FEAT_PER_XB; f++)
          for (int s = 0; s < SLICES; s++)
            wd[f*SLICES+s] = upd.feat[x*FEAT_PER_XB+f][s*CELL_BITS +: CELL_BITS];
        rin = (work_sel == 1'(b)) ? drive : '0;
      end
      rram_crossbar #(
        .ROWS(ROWS), .COLS(XCOLS), .CELL_BITS(CELL_BITS), .DAC_BITS(DAC_BITS)
      ) u_xb (
        .clk     (clk),
        .we_rows ((work_sel != 1'(b)) ? upd_rows : '0),
        .wdata   (wd),
        .row_in  (rin),
        .col_out (xb_out[b][x])
      );
    end
  end

  // Recombine the cell slices of the work space into per-feature values.
  acc_vec_t feat_sum;
  always_comb begin
    for (int x = 0; x < XB_PER_CORE; x++)
      for (int f = 0; f < FEAT_PER_XB; f++) begin
        acc_t v;
        v = '0;
        for (int s = 0; s < SLICES; s++)
          v += acc_t'(xb_out[work_sel][x][f*SLICES+s]) << (s*CELL_BITS);
        feat_sum[x*FEAT_PER_XB+f] = v;
      end
  end

  // ---------------- sequencing ----------------
  agg_req_t                      cur;
  logic [$clog2(IN_SLICES)-1:0]  slice;
  logic [ROWS-1:0]               pend;     // neighbors not yet read (max mode)
  logic                          first;    // no neighbor compared yet (max mode)
  acc_vec_t                      acc;

  logic [$clog2(ROWS)-1:0] sel_row;
  always_comb begin
    sel_row = '0;
    for (int r = ROWS-1; r >= 0; r--)
      if (pend[r]) sel_row = r[$clog2(ROWS)-1:0];
  end

  always_comb begin
    drive = '0;
    if (state == S_SUM) begin
      for (int r = 0; r < ROWS; r++)
        drive[r] = cur.adj[r][slice*DAC_BITS +: DAC_BITS];
    end else if (state == S_MAX && pend != '0) begin
      drive[sel_row] = DAC_BITS'(1);
    end
  end

  logic [ROWS-1:0] nz;
  always_comb for (int r = 0; r < ROWS; r++) nz[r] = (req.adj[r] != '0);

  assign req_ready  = (state == S_IDLE);
  assign part_valid = (state == S_OUT);
  assign busy       = (state != S_IDLE);
  always_comb begin
    part.vid    = cur.vid;
    part.slot   = cur.slot;
    part.nparts = cur.nparts;
    part.mode   = cur.mode;
    part.acc    = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      work_sel <= 1'b0;
      slice    <= '0;
      pend     <= '0;
      first    <= 1'b0;
      acc      <= '0;
      cur      <= '0;
    end else begin
      if (swap) work_sel <= ~work_sel;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur   <= req;
          acc   <= '0;
          slice <= '0;
          pend  <= nz;
          first <= 1'b1;
          state <= (req.mode == AGG_MAX) ? S_MAX : S_SUM;
        end
        S_SUM: begin
          for (int f = 0; f < FEAT; f++)
            acc[f] <= acc[f] + (feat_sum[f] << (slice*DAC_BITS));
          slice <= slice + 1'b1;
          if (slice == $clog2(IN_SLICES)'(IN_SLICES-1)) state <= S_OUT;
        end
        S_MAX: begin
          if (pend == '0) state <= S_OUT;
          else begin
            for (int f = 0; f < FEAT; f++)
              if (first || feat_sum[f] > acc[f]) acc[f] <= feat_sum[f];
            first <= 1'b0;
            pend[sel_row] <= 1'b0;
            if ((pend & ~(ROWS'(1) << sel_row)) == '0) state <= S_OUT;
          end
        end
        S_OUT: if (part_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A swap while a request is in flight would change the data under it.
  a_swap_idle: assert property (@(posedge clk) disable iff (!rst_n) swap |-> state == S_IDLE);

endmodule
