// tb_control_block: checks the instruction queue, decoder and engines.
// The neighbor buffer is a one-cycle-latency array here; the core arrays
// are stand-ins: requests are accepted with random back-pressure, a
// vertex's complete result (and its merge slot) comes back some cycles
// after its last part, every result moved into the combination array
// returns as a combination result a few cycles later. The test runs a
// program of CFG, AGG, COMB, UPD, OUT, SWAP, SYNC and HALT and checks:
// requests equal the buffer entries in order with the configured mode,
// all parts of a vertex share one slot and no slot is handed out twice,
// the engine counts, a single SWAP pulse with no aggregation in flight,
// `done` after HALT, and that decoder stalls and slot stalls occurred.
module tb_control_block;
  import gcn_pkg::*;
  localparam int NE = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic instr_valid, instr_ready; instr_t instr;
  agg_mode_e agg_mode; logic [4:0] agg_shift, out_shift;
  logic nb_re; logic [NB_AW-1:0] nb_raddr; nb_entry_t nb_rdata;
  logic req_valid, req_ready; logic [CORE_W-1:0] req_core; agg_req_t req;
  logic agg_res_fire; logic [N_SLOTS-1:0] slot_free; logic agg_busy, swap;
  logic ib_agg_valid, ib_agg_ready, comb_in_valid, comb_in_ready, comb_out_fire;
  logic ib_upd_valid, ib_upd_ready, upd_valid, host_out_valid, host_out_ready;
  logic done; logic [4:0] iq_level; logic ev_stall, ev_slot_stall, ev_overlap;

  control_block dut (.*);

  // neighbor buffer model
  nb_entry_t nb [NB_DEPTH];
  always_ff @(posedge clk) if (nb_re) nb_rdata <= nb[nb_raddr];

  int n_groups = 0;
  int exp_idx = 0;            // next expected entry
  int slot_of [int];          // vid -> slot
  int parts_left [int];       // vid -> parts still to come
  logic [N_SLOTS-1:0] busy_slots = '0;
  // pending completions: cycle at which a result returns, and its slot (-1 none)
  int pend_t [$], pend_s [$];
  int ib_agg = 0, ib_upd = 0, comb_pend_t [$];
  int n_upd = 0, n_out = 0, n_swap = 0, n_stall = 0, n_slot = 0, n_overlap = 0;
  int cyc = 0;

  always @(negedge clk) begin
    req_ready      = ($urandom_range(0, 2) != 0);
    comb_in_ready  = ($urandom_range(0, 3) != 0);
    host_out_ready = ($urandom_range(0, 1) != 0);
    ib_agg_valid   = (ib_agg > 0);
    ib_upd_valid   = (ib_upd > 0);
    agg_res_fire   = 0;
    slot_free      = '0;
    if (pend_t.size() > 0 && pend_t[0] <= cyc) begin
      int s;
      void'(pend_t.pop_front());
      s = pend_s.pop_front();
      agg_res_fire = 1;
      if (s >= 0) slot_free[s] = 1'b1;
    end
    comb_out_fire = (comb_pend_t.size() > 0 && comb_pend_t[0] <= cyc);
    agg_busy = (pend_t.size() > 0);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_stall += ev_stall; n_slot += ev_slot_stall; n_overlap += ev_overlap;
    if (swap) begin
      n_swap++;
      checks++;
      if (pend_t.size() != 0 || req_valid) begin failures++; $display("swap with aggregation in flight"); end
    end
    if (agg_res_fire) ib_agg++;
    if (slot_free != '0) busy_slots &= ~slot_free;
    if (comb_in_valid && comb_in_ready) begin
      ib_agg--;
      comb_pend_t.push_back(cyc + $urandom_range(2, 8));
    end
    if (comb_out_fire) begin void'(comb_pend_t.pop_front()); ib_upd++; end
    if (upd_valid)                       begin n_upd++; ib_upd--; end
    if (host_out_valid && host_out_ready) begin n_out++; ib_upd--; end
    if (req_valid && req_ready) begin
      nb_entry_t e; logic ok; int v, s;
      e = nb[exp_idx];
      v = int'(req.vid);
      s = int'(req.slot);
      ok = (req.vid == e.vid) && (req_core == e.core) && (req.nparts == e.nparts) &&
           (req.adj == e.adj) && (req.mode == agg_mode);
      if (e.nparts > 1) begin
        if (!parts_left.exists(v)) begin
          if (busy_slots[s]) ok = 0;      // slot handed out twice
          busy_slots[s] = 1'b1;
          slot_of[v] = s;
          parts_left[v] = int'(e.nparts);
        end else if (slot_of[v] != s) ok = 0;
        parts_left[v]--;
        if (parts_left[v] == 0) begin
          parts_left.delete(v);
          pend_t.push_back(cyc + $urandom_range(3, 30));
          pend_s.push_back(s);
        end
      end else begin
        pend_t.push_back(cyc + $urandom_range(3, 30));
        pend_s.push_back(-1);
      end
      checks++;
      if (!ok) begin failures++; $display("request %0d wrong", exp_idx); end
      exp_idx++;
    end
  end

  task automatic push(instr_t i);
    @(negedge clk);
    instr_valid = 1'b1;
    instr       = i;
    while (!instr_ready) @(negedge clk);
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    instr_valid = 0; instr = '0;
    // 30 vertices: parts 1..3, consecutive entries per vertex
    e = 0;
    for (int v = 0; e < NE; v++) begin
      int np;
      np = $urandom_range(1, 3);
      if (e + np > NE) np = NE - e;
      for (int k = 0; k < np; k++) begin
        nb[e] = '0;
        nb[e].vid = vid_t'(v); nb[e].core = CORE_W'(k * 2 + (v % 2)); nb[e].nparts = NPART_W'(np);
        for (int r = 0; r < XB_ROWS; r++) nb[e].adj[r] = data_t'($urandom);
        e++;
      end
      n_groups++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    push(mk_instr(OP_CFG, (5'd9 << 5) | 5'd3, 1));
    push(mk_instr(OP_AGG, 20, 0));
    push(mk_instr(OP_AGG, NE - 20, 20));  // stalls behind the first AGG
    push(mk_instr(OP_SYNC, 0, 0));
    checks += 3;
    if (agg_mode != AGG_MAX || agg_shift != 5'd3 || out_shift != 5'd9) begin failures++; $display("CFG not applied"); end
    push(mk_instr(OP_COMB, n_groups, 0));
    push(mk_instr(OP_UPD, 10, 0));
    push(mk_instr(OP_OUT, n_groups - 10, 0));
    push(mk_instr(OP_SWAP, 0, 0));
    push(mk_instr(OP_HALT, 0, 0));
    wait (done);
    repeat (3) @(negedge clk);
    if (exp_idx != NE) begin failures++; $display("issued %0d of %0d entries", exp_idx, NE); end
    if (n_upd != 10 || n_out != n_groups - 10) begin failures++; $display("upd %0d out %0d", n_upd, n_out); end
    checks += 5;
    if (n_swap != 1) begin failures++; $display("swaps %0d", n_swap); end
    if (n_stall == 0) begin failures++; $display("no decoder stall"); end
    if (n_slot == 0) begin failures++; $display("no slot stall"); end
    if (iq_level != 0) begin failures++; $display("queue not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
