// mlp_core: one PIM core of the combination array.
//
// Computes one GCN combination step for one vertex: the aggregation result
// is requantized to 8-bit fixed point (arithmetic right shift by
// `agg_shift`, saturated to 0..255), multiplied by the layer's weight
// matrix held in RRAM crossbars, scaled again (`out_shift`, saturated to a
// signed 8-bit index) and passed through a 256-entry look-up table that
// implements the non-linear function (ReLU, sigmoid, ... as loaded).
//
// Signed weights use a pair of crossbars, one for the positive and one for
// the negative part, each 8-bit magnitude split over four 2-bit cells; the
// input is applied two bits per cycle over four cycles and the bit-line
// sums are recombined by shift-and-add and subtracted.
//
// The core is a three-stage pipeline (input quantization, crossbar MVM,
// LUT/output register): a new vector is accepted while the previous one is
// still in the MVM stage. Output valid rises 5 cycles after the input is
// accepted; throughput is one vector per 4 cycles. Weight rows (one input
// feature's FEAT_OUT weights) and LUT entries are written by the host; every
// MLP core of the array receives the same writes.
// The crossbar-plus-LUT structure and the pipelined execution follow the
// described MLP core; the quantization shifts, the pos/neg crossbar pair
// and the stage split are this design's own choice.
module mlp_core
  import gcn_pkg::*;
#(
  parameter int unsigned FEAT_IN  = FEAT,
  parameter int unsigned FEAT_OUT = FEAT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [4:0]                    agg_shift,
  input  logic [4:0]                    out_shift,
  // input vector
  input  logic                          in_valid,
  output logic                          in_ready,
  input  agg_res_t                      in_res,
  // output vector
  output logic                          out_valid,
  input  logic                          out_ready,
  output upd_t                          out_upd,
  // weight load: row w_row takes FEAT_OUT signed weights
  input  logic                          w_we,
  input  logic [$clog2(FEAT_IN)-1:0]    w_row,
  input  logic [FEAT_OUT-1:0][DATA_W-1:0] w_data,   // two's complement weights
  // LUT load
  input  logic                          lut_we,
  input  logic [DATA_W-1:0]             lut_addr,
  input  data_t                         lut_data,
  output logic                          busy
);
  localparam int unsigned XCOLS = FEAT_OUT * SLICES;
  localparam int unsigned ADC_W = CELL_BITS + DAC_BITS + $clog2(FEAT_IN);
  typedef logic signed [ACC_W-1:0] sacc_t;

  // ---------------- weight crossbars ----------------
  logic [FEAT_IN-1:0]                 we_rows;
  logic [XCOLS-1:0][CELL_BITS-1:0]    wd_pos, wd_neg;
  logic [FEAT_IN-1:0][DAC_BITS-1:0]   drive;
  logic [XCOLS-1:0][ADC_W-1:0]        col_pos, col_neg;

  always_comb begin
    we_rows = '0;
    if (w_we) we_rows[w_row] = 1'b1;
    for (int j = 0; j < FEAT_OUT; j++) begin
      logic signed [DATA_W:0] w;
      logic [DATA_W-1:0]      mp, mn;
      w  = (DATA_W+1)'(signed'(w_data[j]));
      mp = (w > 0) ? w[DATA_W-1:0] : '0;
      mn = (w < 0) ? DATA_W'(-w)   : '0;
      for (int s = 0; s < SLICES; s++) begin
        wd_pos[j*SLICES+s] = mp[s*CELL_BITS +: CELL_BITS];
        wd_neg[j*SLICES+s] = mn[s*CELL_BITS +: CELL_BITS];
      end
    end
  end

  rram_crossbar #(.ROWS(FEAT_IN), .COLS(XCOLS), .CELL_BITS(CELL_BITS), .DAC_BITS(DAC_BITS))
    u_xb_pos (.clk, .we_rows, .wdata(wd_pos), .row_in(drive), .col_out(col_pos));
  rram_crossbar #(.ROWS(FEAT_IN), .COLS(XCOLS), .CELL_BITS(CELL_BITS), .DAC_BITS(DAC_BITS))
    u_xb_neg (.clk, .we_rows, .wdata(wd_neg), .row_in(drive), .col_out(col_neg));

  // ---------------- LUT ----------------
  data_t lut [256];
  always_ff @(posedge clk) if (lut_we) lut[lut_addr] <= lut_data;

  // ---------------- stage 1: input quantization ----------------
  logic                           v1;
  vid_t                           vid1;
  logic [FEAT_IN-1:0][DATA_W-1:0] x1;

  assign in_ready = !v1;

  // ---------------- stage 2: crossbar MVM ----------------
  logic                           v2;
  vid_t                           vid2;
  logic [FEAT_IN-1:0][DATA_W-1:0] x2;
  logic [$clog2(IN_SLICES)-1:0]   slice;
  sacc_t                          y [FEAT_OUT];

  always_comb begin
    drive = '0;
    for (int r = 0; r < FEAT_IN; r++)
      drive[r] = v2 ? x2[r][slice*DAC_BITS +: DAC_BITS] : '0;
  end

  sacc_t yn [FEAT_OUT];     // y after this cycle's slice
  always_comb begin
    for (int j = 0; j < FEAT_OUT; j++) begin
      sacc_t t;
      t = '0;
      for (int s = 0; s < SLICES; s++)
        t += (sacc_t'(col_pos[j*SLICES+s]) - sacc_t'(col_neg[j*SLICES+s])) <<< (s*CELL_BITS);
      yn[j] = y[j] + (t <<< (slice*DAC_BITS));
    end
  end

  wire last_slice = (slice == $clog2(IN_SLICES)'(IN_SLICES-1));
  wire out_free   = !out_valid || out_ready;
  wire s2_done    = v2 && last_slice && out_free;

  // ---------------- stage 3: LUT and output ----------------
  feat_vec_t lut_out;
  always_comb begin
    lut_out = '0;
    for (int j = 0; j < FEAT_OUT; j++) begin
      sacc_t       q;
      logic [7:0]  idx;
      q = yn[j] >>> out_shift;
      if (q > sacc_t'(127))       idx = 8'd255;
      else if (q < sacc_t'(-128)) idx = 8'd0;
      else                        idx = q[7:0] ^ 8'h80;
      lut_out[j] = lut[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      vid1 <= '0; vid2 <= '0; x1 <= '0; x2 <= '0; slice <= '0;
      out_upd <= '0;
      for (int j = 0; j < FEAT_OUT; j++) y[j] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      // stage 1
      if (in_valid && in_ready) begin
        v1   <= 1'b1;
        vid1 <= in_res.vid;
        for (int r = 0; r < FEAT_IN; r++) begin
          acc_t a;
          a = in_res.acc[r] >> agg_shift;
          x1[r] <= (a > acc_t'(255)) ? 8'hFF : a[7:0];
        end
      end
      // stage 2
      if (v2 && !last_slice) begin
        for (int j = 0; j < FEAT_OUT; j++) y[j] <= yn[j];
        slice <= slice + 1'b1;
      end
      if (s2_done) begin
        out_valid    <= 1'b1;
        out_upd.vid  <= vid2;
        for (int j = 0; j < FEAT_OUT; j++) out_upd.feat[j] <= lut_out[j];
        v2 <= 1'b0;
      end
      if (v1 && (!v2 || s2_done)) begin
        v2    <= 1'b1;
        vid2  <= vid1;
        x2    <= x1;
        slice <= '0;
        for (int j = 0; j < FEAT_OUT; j++) y[j] <= '0;
        v1    <= (in_valid && in_ready);
      end
    end
  end

  assign busy = v1 || v2 || out_valid;

endmodule
