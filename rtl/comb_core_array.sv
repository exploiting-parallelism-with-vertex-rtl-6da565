// comb_core_array: the combination core array.
//
// Aggregation results read from the intermediate buffer enter a waiting
// queue. Every MLP core stores the complete weights of the current layer,
// so the head of the queue may go to any idle core: it is handed to the
// lowest-numbered core that can accept it. The cores run concurrently, each
// internally pipelined; their results (updated 8-bit feature vectors) leave
// through a round-robin arbiter, one per cycle, towards the intermediate
// buffer. Weight-row and LUT writes are broadcast to all cores.
// Interface timing: valid/ready on input and output. The waiting queue
// depth and the number of cores are this design's choice; the queue plus
// any-idle-core dispatch follows the described array.
module comb_core_array
  import gcn_pkg::*;
#(
  parameter int unsigned N_CORES  = N_MLP,
  parameter int unsigned WQ_DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [4:0]                  agg_shift,
  input  logic [4:0]                  out_shift,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  agg_res_t                    in_res,
  output logic                        out_valid,
  input  logic                        out_ready,
  output upd_t                        out_upd,
  input  logic                        w_we,
  input  logic [$clog2(FEAT)-1:0]     w_row,
  input  logic [FEAT-1:0][DATA_W-1:0] w_data,
  input  logic                        lut_we,
  input  logic [DATA_W-1:0]           lut_addr,
  input  data_t                       lut_data,
  output logic                        busy,
  output logic [$clog2(WQ_DEPTH+1)-1:0] wq_count,
  output logic [N_CORES-1:0]          core_busy
);
  localparam int CW = (N_CORES > 1) ? $clog2(N_CORES) : 1;

  logic     q_valid, q_ready;
  agg_res_t q_res;

  sync_fifo #(.T(agg_res_t), .DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_res),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_res),
    .count(wq_count)
  );

  logic [N_CORES-1:0] m_in_ready, m_in_valid, m_out_valid, m_out_ready;
  upd_t               m_out [N_CORES];

  // dispatch to the lowest-numbered idle core
  always_comb begin
    logic found;
    found      = 1'b0;
    m_in_valid = '0;
    for (int c = 0; c < N_CORES; c++)
      if (!found && m_in_ready[c]) begin
        found = 1'b1;
        m_in_valid[c] = q_valid;
      end
    q_ready = found;
  end

  for (genvar c = 0; c < N_CORES; c++) begin : g_mlp
    mlp_core u_mlp (
      .clk, .rst_n, .agg_shift, .out_shift,
      .in_valid  (m_in_valid[c]),
      .in_ready  (m_in_ready[c]),
      .in_res    (q_res),
      .out_valid (m_out_valid[c]),
      .out_ready (m_out_ready[c]),
      .out_upd   (m_out[c]),
      .w_we, .w_row, .w_data, .lut_we, .lut_addr, .lut_data,
      .busy      (core_busy[c])
    );
  end

  // round-robin output arbiter
  logic [CW-1:0] last, pick;
  logic          any;
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= N_CORES; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N_CORES;
      if (!any && m_out_valid[i]) begin
        any  = 1'b1;
        pick = CW'(i);
      end
    end
  end
  assign out_valid = any;
  assign out_upd   = m_out[pick];
  always_comb begin
    m_out_ready = '0;
    if (any && out_ready) m_out_ready[pick] = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= '0;
    else if (any && out_ready) last <= pick;
  end

  assign busy = q_valid || (|core_busy);

endmodule
