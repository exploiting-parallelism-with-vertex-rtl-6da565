// fwd_unit: data forwarding unit of the aggregation network.
//
// A forwarding unit receives partial aggregation results from every
// aggregation core (one valid/ready input per core, served round-robin),
// merges the partial results that belong to the same vertex and forwards
// the complete aggregation result towards the intermediate buffer.
//  * A partial result of a vertex whose neighbors all sit in one core
//    (nparts == 1) bypasses the merge table and is forwarded directly.
//  * Otherwise the merge slot named in the packet (allocated by the
//    controller before the first request of that vertex was issued) collects
//    the parts: the first part is stored, later parts are added (sum mode)
//    or compared element-wise (max mode). When the last part arrives the
//    merged vector is forwarded and the slot is released to the controller
//    through `rel_valid`/`rel_slot`.
// Timing: one part accepted per cycle while the single-entry output
// register is free or being drained; a result appears one cycle after its
// last part. Merging by slot with controller-side allocation (which makes
// the unit deadlock-free) is this design's own choice; the unit's role of
// receiving, merging and forwarding follows the described forwarding unit.
module fwd_unit
  import gcn_pkg::*;
#(
  parameter int unsigned N_IN  = N_AGG,
  parameter int unsigned SLOTS = N_SLOTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   in_valid,
  output logic [N_IN-1:0]   in_ready,
  input  part_t             in_part [N_IN],
  output logic              out_valid,
  input  logic              out_ready,
  output agg_res_t          out_res,
  output logic              rel_valid,
  output logic [SLOT_W-1:0] rel_slot,
  output logic              ev_merge,     // a part was merged into a slot
  output logic              ev_bypass     // a single-part result bypassed the table
);
  localparam int IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  acc_vec_t                 tab_acc [SLOTS];
  logic [NPART_W-1:0]       tab_cnt [SLOTS];

  // round-robin choice among requesting inputs
  logic [IW-1:0] last, pick;
  logic          any;
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 1; k <= N_IN; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N_IN;
      if (!any && in_valid[i]) begin
        any  = 1'b1;
        pick = IW'(i);
      end
    end
  end

  wire   can_take = !out_valid || out_ready;
  wire   take     = any && can_take;
  part_t p;
  assign p = in_part[pick];

  always_comb begin
    in_ready = '0;
    if (take) in_ready[pick] = 1'b1;
  end

  // merge of the incoming part with the slot contents
  acc_vec_t merged;
  always_comb begin
    for (int f = 0; f < FEAT; f++) begin
      if (p.mode == AGG_MAX)
        merged[f] = (p.acc[f] > tab_acc[p.slot][f]) ? p.acc[f] : tab_acc[p.slot][f];
      else
        merged[f] = p.acc[f] + tab_acc[p.slot][f];
    end
  end

  wire                single = (p.nparts <= NPART_W'(1));
  wire                fresh  = (tab_cnt[p.slot] == '0);
  wire                done   = (tab_cnt[p.slot] + 1'b1 == p.nparts);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= '0;
      out_valid <= 1'b0;
      out_res   <= '0;
      rel_valid <= 1'b0;
      rel_slot  <= '0;
      ev_merge  <= 1'b0;
      ev_bypass <= 1'b0;
      for (int s = 0; s < SLOTS; s++) tab_cnt[s] <= '0;
    end else begin
      rel_valid <= 1'b0;
      ev_merge  <= 1'b0;
      ev_bypass <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        last <= pick;
        if (single) begin
          out_valid   <= 1'b1;
          out_res.vid <= p.vid;
          out_res.acc <= p.acc;
          ev_bypass   <= 1'b1;
        end else if (done && !fresh) begin
          out_valid   <= 1'b1;
          out_res.vid <= p.vid;
          out_res.acc <= merged;
          tab_cnt[p.slot] <= '0;
          rel_valid   <= 1'b1;
          rel_slot    <= p.slot;
          ev_merge    <= 1'b1;
        end else begin
          tab_cnt[p.slot] <= tab_cnt[p.slot] + 1'b1;
          ev_merge        <= !fresh;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take && !single && !done)
      tab_acc[p.slot] <= fresh ? p.acc : merged;
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_res));

endmodule
