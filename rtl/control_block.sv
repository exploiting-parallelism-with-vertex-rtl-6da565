// control_block: instruction queue, decoder and pipeline engines.
//
// The host pushes instructions (gcn_pkg::instr_t) into the instruction
// queue. The decoder takes them in order and hands each one to the engine
// it names. Three engines run concurrently, which gives the coarse-grained
// intra-layer pipeline: while the aggregation engine works on iteration
// k+2, the combination engine can work on k+1 and the update engine on k.
// An instruction whose engine is still busy stalls the queue; SYNC waits
// for all engines, SWAP for the aggregation and update sides.
//
//  * Aggregation engine (AGG base,count): reads neighbor-buffer entries one
//    per cycle, sends each to its aggregation core, and for a vertex spread
//    over several cores allocates a merge slot before its first part is
//    issued (stalling while none is free; slots come back from the
//    forwarding units). It finishes when every entry has been issued and
//    every vertex's complete result has reached the intermediate buffer.
//  * Combination engine (COMB count): moves `count` aggregation results from
//    the intermediate buffer into the combination array's waiting queue and
//    finishes when `count` combination results have been written back.
//  * Update engine (UPD count / OUT count): pops `count` combination results
//    and broadcasts them into the update space of the aggregation cores
//    (UPD) or hands them to the host (OUT).
// CFG sets the aggregation function and the two requantization shifts;
// HALT raises `done` once everything is idle. The instruction encoding is
// this design's own; the queue-plus-decoder structure and the pipeline
// schedule follow the described control block and dataflow.
module control_block
  import gcn_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host instruction port
  input  logic                 instr_valid,
  output logic                 instr_ready,
  input  instr_t               instr,
  // configuration
  output agg_mode_e            agg_mode,
  output logic [4:0]           agg_shift,
  output logic [4:0]           out_shift,
  // neighbor buffer read
  output logic                 nb_re,
  output logic [NB_AW-1:0]     nb_raddr,
  input  nb_entry_t            nb_rdata,
  // aggregation core array
  output logic                 req_valid,
  input  logic                 req_ready,
  output logic [CORE_W-1:0]    req_core,
  output agg_req_t             req,
  input  logic                 agg_res_fire,   // a complete result entered the buffer
  input  logic [N_SLOTS-1:0]   slot_free,
  input  logic                 agg_busy,
  output logic                 swap,
  // intermediate buffer (aggregation region) -> combination array
  input  logic                 ib_agg_valid,
  output logic                 ib_agg_ready,
  output logic                 comb_in_valid,
  input  logic                 comb_in_ready,
  input  logic                 comb_out_fire,  // a combination result entered the buffer
  // intermediate buffer (update region) -> cores or host
  input  logic                 ib_upd_valid,
  output logic                 ib_upd_ready,
  output logic                 upd_valid,
  output logic                 host_out_valid,
  input  logic                 host_out_ready,
  // status
  output logic                 done,
  output logic [$clog2(IQ_DEPTH+1)-1:0] iq_level,
  output logic                 ev_stall,       // decoder waits for a busy engine
  output logic                 ev_slot_stall,  // aggregation engine waits for a merge slot
  output logic                 ev_overlap      // all three engines active in one cycle
);
  // ---------------- instruction queue ----------------
  logic   h_valid, h_pop;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;
  instr_t h;
  sync_fifo #(.T(instr_t), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .in_valid(instr_valid), .in_ready(instr_ready), .in_data(instr),
    .out_valid(h_valid), .out_ready(h_pop), .out_data(h),
    .count(iq_count)
  );

  // ---------------- engine state ----------------
  logic              a_active, a_rd_pend, a_have, a_last_ok;
  logic [NB_AW-1:0]  a_ptr;
  logic [15:0]       a_left, a_groups, a_results;
  nb_entry_t         a_ent;
  vid_t              a_last_vid;
  logic [SLOT_W-1:0] a_cur_slot;
  logic [N_SLOTS-1:0] slot_used;

  logic              c_active;
  logic [15:0]       c_xfer, c_pend;

  logic              u_active, u_host;
  logic [15:0]       u_left;

  // ---------------- decoder ----------------
  wire all_idle = !a_active && !c_active && !u_active && !agg_busy;
  logic start_a, start_c, start_u;
  always_comb begin
    h_pop   = 1'b0;
    start_a = 1'b0;
    start_c = 1'b0;
    start_u = 1'b0;
    swap    = 1'b0;
    if (h_valid) begin
      unique case (h.op)
        OP_AGG:           if (!a_active) begin h_pop = 1'b1; start_a = 1'b1; end
        OP_COMB:          if (!c_active) begin h_pop = 1'b1; start_c = 1'b1; end
        OP_UPD, OP_OUT:   if (!u_active) begin h_pop = 1'b1; start_u = 1'b1; end
        OP_SWAP:          if (!a_active && !u_active && !agg_busy) begin h_pop = 1'b1; swap = 1'b1; end
        OP_SYNC, OP_HALT: h_pop = all_idle;
        default:          h_pop = 1'b1;   // NOP, CFG and undefined codes
      endcase
    end
  end
  assign ev_stall   = h_valid && !h_pop && (h.op inside {OP_AGG, OP_COMB, OP_UPD, OP_OUT, OP_SWAP});
  assign iq_level   = iq_count;
  assign ev_overlap = a_active && c_active && u_active;

  // ---------------- aggregation engine ----------------
  wire new_group = !a_last_ok || (a_ent.vid != a_last_vid);
  wire need_slot = new_group && (a_ent.nparts > NPART_W'(1));
  logic [SLOT_W-1:0] free_slot;
  logic              have_free;
  always_comb begin
    have_free = 1'b0;
    free_slot = '0;
    for (int s = N_SLOTS-1; s >= 0; s--)
      if (!slot_used[s]) begin
        have_free = 1'b1;
        free_slot = SLOT_W'(s);
      end
  end

  assign req_valid     = a_have && !(need_slot && !have_free);
  assign ev_slot_stall = a_have && need_slot && !have_free;
  assign req_core      = a_ent.core;
  always_comb begin
    req.vid    = a_ent.vid;
    req.slot   = need_slot ? free_slot : a_cur_slot;
    req.nparts = a_ent.nparts;
    req.mode   = agg_mode;
    req.adj    = a_ent.adj;
  end
  wire a_fire = req_valid && req_ready;

  assign nb_re    = a_active && (a_left != '0) && !a_rd_pend && (!a_have || a_fire);
  assign nb_raddr = a_ptr;

  // ---------------- combination engine ----------------
  assign comb_in_valid = ib_agg_valid && c_active && (c_xfer != '0);
  assign ib_agg_ready  = comb_in_ready && c_active && (c_xfer != '0);

  // ---------------- update engine ----------------
  wire u_go      = u_active && (u_left != '0);
  assign upd_valid      = ib_upd_valid && u_go && !u_host;
  assign host_out_valid = ib_upd_valid && u_go && u_host;
  assign ib_upd_ready   = u_go && (u_host ? host_out_ready : 1'b1);
  wire u_fire    = ib_upd_valid && ib_upd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      agg_mode   <= AGG_SUM;
      agg_shift  <= '0;
      out_shift  <= '0;
      done       <= 1'b0;
      a_active   <= 1'b0; a_rd_pend <= 1'b0; a_have <= 1'b0; a_last_ok <= 1'b0;
      a_ptr      <= '0;   a_left <= '0; a_groups <= '0; a_results <= '0;
      a_ent      <= '0;   a_last_vid <= '0; a_cur_slot <= '0; slot_used <= '0;
      c_active   <= 1'b0; c_xfer <= '0; c_pend <= '0;
      u_active   <= 1'b0; u_host <= 1'b0; u_left <= '0;
    end else begin
      // configuration and halt
      if (h_pop && h.op == OP_CFG) begin
        agg_mode  <= agg_mode_e'(h.base[0]);
        agg_shift <= h.count[4:0];
        out_shift <= h.count[9:5];
      end
      if (h_pop && h.op == OP_HALT) done <= 1'b1;

      // aggregation engine
      slot_used <= (slot_used & ~slot_free) |
                   ((a_fire && need_slot) ? (N_SLOTS'(1) << free_slot) : '0);
      if (start_a) begin
        a_active  <= 1'b1;
        a_ptr     <= h.base[NB_AW-1:0];
        a_left    <= h.count;
        a_groups  <= '0;
        a_results <= '0;
        a_last_ok <= 1'b0;
      end else if (a_active) begin
        if (nb_re) begin
          a_ptr  <= a_ptr + 1'b1;
          a_left <= a_left - 1'b1;
        end
        a_rd_pend <= nb_re;
        if (a_rd_pend) begin
          a_ent  <= nb_rdata;
          a_have <= 1'b1;
        end else if (a_fire) begin
          a_have <= 1'b0;
        end
        if (a_fire) begin
          a_last_ok  <= 1'b1;
          a_last_vid <= a_ent.vid;
          if (new_group) a_groups <= a_groups + 1'b1;
          if (need_slot) a_cur_slot <= free_slot;
        end
        if (agg_res_fire) a_results <= a_results + 1'b1;
        if (a_left == '0 && !a_rd_pend && !a_have && !nb_re &&
            a_results + (agg_res_fire ? 16'd1 : 16'd0) == a_groups)
          a_active <= 1'b0;
      end

      // combination engine
      if (start_c) begin
        c_active <= (h.count != '0);
        c_xfer   <= h.count;
        c_pend   <= h.count;
      end else if (c_active) begin
        if (comb_in_valid && comb_in_ready) c_xfer <= c_xfer - 1'b1;
        if (comb_out_fire) c_pend <= c_pend - 1'b1;
        if (c_pend == 16'd1 && comb_out_fire) c_active <= 1'b0;
      end

      // update engine
      if (start_u) begin
        u_active <= (h.count != '0);
        u_host   <= (h.op == OP_OUT);
        u_left   <= h.count;
      end else if (u_active) begin
        if (u_fire) u_left <= u_left - 1'b1;
        if (u_left == 16'd1 && u_fire) u_active <= 1'b0;
      end
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_core));

endmodule
