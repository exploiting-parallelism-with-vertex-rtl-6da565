// tb_rp_gcn_top: end-to-end test of the accelerator at its default size.
//
// Runs a two-layer GCN on a clustered synthetic graph of 200 vertices held
// in the 8 aggregation cores (25 home vertices per core plus copies of
// neighboring-cluster vertices in idle rows). Layer 1 uses sum aggregation
// with normalized-weight adjacency; its results are written back into the
// update space and the spaces are swapped. Layer 2 uses max aggregation,
// runs as four pipelined iterations (AGG k+2 / COMB k+1 / OUT k) and
// returns its results to the host, which compares every vertex's feature
// vector with a reference computed here from the same integer arithmetic.
// During layer 1 the host holds back the COMB instruction until the
// intermediate buffer fills, so back-pressure reaches the merge slots.
// Every mechanism (decoder stall, slot stall, pipeline overlap, merge,
// bypass, network contention, parallel MLP cores, swap, output
// back-pressure) must be seen at least once.
module tb_rp_gcn_top;
  import gcn_pkg::*;

  localparam int V      = 200;
  localparam int PER    = 25;      // home vertices per core
  localparam int NDUP   = 6;       // copies of the next cluster's vertices per core
  localparam int QS1    = 3, OS1 = 7;
  localparam int QS2    = 0, OS2 = 6;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic instr_valid, instr_ready; instr_t instr;
  logic nb_we; logic [NB_AW-1:0] nb_waddr; nb_entry_t nb_wdata;
  logic map_we; logic [CORE_W-1:0] map_core; logic [$clog2(XB_ROWS)-1:0] map_row; vid_t map_vid; logic map_ok;
  logic feat_we, feat_ready; upd_t feat;
  logic w_we; logic [$clog2(FEAT)-1:0] w_row; logic [FEAT-1:0][DATA_W-1:0] w_data;
  logic lut_we; logic [7:0] lut_addr; data_t lut_data;
  logic out_valid, out_ready; upd_t out_upd;
  logic done, work_sel, ev_stall, ev_slot_stall, ev_overlap, ev_merge, ev_bypass, ev_contention, ev_mlp_parallel;

  rp_gcn_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference data ----------------
  int h0 [V][FEAT];
  int h1 [V][FEAT];
  int h2 [V][FEAT];
  int w  [FEAT][FEAT];
  int nbr_n [V];
  int nbr   [V][8];
  int nbw   [V][8];
  int row_of_home [V];
  // row map: core, row -> vertex (-1 empty)
  int rmap [N_AGG][XB_ROWS];
  // neighbor-buffer image
  nb_entry_t nbe [NB_DEPTH];
  int n_entries;
  int it_first_entry [5];
  int it_first_vtx   [5];

  function automatic int home(int v); return v / PER; endfunction

  function automatic int lut_f(int idx); return (idx >= 128) ? idx - 128 : 0; endfunction

  function automatic void mlp_ref(input int a [FEAT], input int qs, input int os, output int o [FEAT]);
    int x [FEAT];
    for (int i = 0; i < FEAT; i++) begin
      x[i] = a[i] >>> qs;
      if (x[i] > 255) x[i] = 255;
    end
    for (int j = 0; j < FEAT; j++) begin
      int y, q;
      y = 0;
      for (int i = 0; i < FEAT; i++) y += x[i] * w[i][j];
      q = y >>> os;
      if (q > 127) q = 127;
      if (q < -128) q = -128;
      o[j] = lut_f(q + 128);
    end
  endfunction

  // where vertex n is read from when aggregating vertex u: a core already
  // used by u if n has a copy there, else the home core of u if n has a copy
  // there, else n's home core
  function automatic int find_row(int c, int n);
    for (int r = 0; r < XB_ROWS; r++) if (rmap[c][r] == n) return r;
    return -1;
  endfunction

  // ---------------- counters ----------------
  int n_stall = 0, n_slot = 0, n_overlap = 0, n_merge = 0, n_bypass = 0, n_cont = 0, n_mlp = 0;
  int n_swap = 0, n_outbp = 0;
  logic ws_q;
  always @(posedge clk) if (rst_n) begin
    n_stall   += ev_stall;
    n_slot    += ev_slot_stall;
    n_overlap += ev_overlap;
    n_merge   += ev_merge;
    n_bypass  += ev_bypass;
    n_cont    += ev_contention;
    n_mlp     += ev_mlp_parallel;
    if (work_sel != ws_q) n_swap++;
    ws_q <= work_sel;
    if (out_valid && !out_ready) n_outbp++;
  end

  // ---------------- output collection ----------------
  int got [V];
  int n_out = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      int v; logic ok;
      v = int'(out_upd.vid);
      ok = 1'b1;
      if (v >= V) ok = 1'b0;
      else begin
        for (int f = 0; f < FEAT; f++) if (int'(out_upd.feat[f]) != h2[v][f]) ok = 1'b0;
        if (got[v] != 0) ok = 1'b0;
        got[v]++;
      end
      checks++;
      n_out++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("MISMATCH vertex %0d at cycle %0d", v, cyc);
      end
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
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ecount;
    instr_valid = 0; instr = '0; nb_we = 0; nb_waddr = '0; nb_wdata = '0;
    map_we = 0; map_core = '0; map_row = '0; map_vid = '0; map_ok = 0;
    feat_we = 0; feat = '0; w_we = 0; w_row = '0; w_data = '0;
    lut_we = 0; lut_addr = '0; lut_data = '0; out_ready = 1'b1; ws_q = 1'b0;
    for (int v = 0; v < V; v++) got[v] = 0;

    // ---------- graph, mapping and reference ----------
    for (int c = 0; c < N_AGG; c++) for (int r = 0; r < XB_ROWS; r++) rmap[c][r] = -1;
    for (int v = 0; v < V; v++) begin
      rmap[home(v)][v % PER] = v;
      row_of_home[v] = v % PER;
    end
    for (int c = 0; c < N_AGG; c++)
      for (int k = 0; k < NDUP; k++)
        rmap[c][PER + k] = ((c + 1) % N_AGG) * PER + k;
    for (int v = 0; v < V; v++) begin
      nbr_n[v] = 1;
      nbr[v][0] = v; nbw[v][0] = $urandom_range(1, 15);
      for (int k = 1; k < 1 + $urandom_range(1, 5); k++) begin
        int n, dup;
        if ($urandom_range(0, 9) < 4) n = home(v) * PER + $urandom_range(0, PER - 1);
        else                          n = $urandom_range(0, V - 1);
        dup = 0;
        for (int j = 0; j < nbr_n[v]; j++) if (nbr[v][j] == n) dup = 1;
        if (!dup) begin
          nbr[v][nbr_n[v]] = n;
          nbw[v][nbr_n[v]] = $urandom_range(1, 15);
          nbr_n[v]++;
        end
      end
    end
    for (int v = 0; v < V; v++) for (int f = 0; f < FEAT; f++) h0[v][f] = $urandom_range(0, 15);
    for (int i = 0; i < FEAT; i++) for (int j = 0; j < FEAT; j++) w[i][j] = int'($urandom_range(0, 15)) - 7;

    // neighbor-buffer entries, iteration by iteration (4 iterations of 50)
    n_entries = 0;
    for (int it = 0; it < 4; it++) begin
      it_first_entry[it] = n_entries;
      it_first_vtx[it]   = it * (V / 4);
      // vertices are visited round-robin over their home cores
      for (int i = it * (V / 4); i < (it + 1) * (V / 4); i++) begin
        int v;
        int cores [N_AGG];
        int ncore;
        int loc_c [8], loc_r [8];
        v = (i % N_AGG) * PER + i / N_AGG;
        ncore = 0;
        for (int j = 0; j < nbr_n[v]; j++) begin
          int n, c, r;
          n = nbr[v][j];
          c = -1; r = -1;
          for (int k = 0; k < ncore && c < 0; k++) begin
            r = find_row(cores[k], n);
            if (r >= 0) c = cores[k];
          end
          if (c < 0) begin
            r = find_row(home(v), n);
            if (r >= 0) c = home(v);
          end
          if (c < 0) begin
            c = home(n);
            r = row_of_home[n];
          end
          loc_c[j] = c; loc_r[j] = r;
          begin
            int seen; seen = 0;
            for (int k = 0; k < ncore; k++) if (cores[k] == c) seen = 1;
            if (!seen) begin cores[ncore] = c; ncore++; end
          end
        end
        for (int k = 0; k < ncore; k++) begin
          nb_entry_t e;
          e = '0;
          e.vid    = vid_t'(v);
          e.core   = CORE_W'(cores[k]);
          e.nparts = NPART_W'(ncore);
          for (int j = 0; j < nbr_n[v]; j++)
            if (loc_c[j] == cores[k]) e.adj[loc_r[j]] = data_t'(nbw[v][j]);
          nbe[n_entries] = e;
          n_entries++;
        end
      end
    end
    it_first_entry[4] = n_entries;
    it_first_vtx[4]   = V;

    // reference: layer 1 (sum), layer 2 (max)
    for (int v = 0; v < V; v++) begin
      int a [FEAT]; int o [FEAT];
      for (int f = 0; f < FEAT; f++) begin
        a[f] = 0;
        for (int j = 0; j < nbr_n[v]; j++) a[f] += nbw[v][j] * h0[nbr[v][j]][f];
      end
      mlp_ref(a, QS1, OS1, o);
      for (int f = 0; f < FEAT; f++) h1[v][f] = o[f];
    end
    for (int v = 0; v < V; v++) begin
      int a [FEAT]; int o [FEAT];
      for (int f = 0; f < FEAT; f++) begin
        a[f] = 0;
        for (int j = 0; j < nbr_n[v]; j++) if (h1[nbr[v][j]][f] > a[f]) a[f] = h1[nbr[v][j]][f];
      end
      mlp_ref(a, QS2, OS2, o);
      for (int f = 0; f < FEAT; f++) h2[v][f] = o[f];
    end
    $display("graph: %0d vertices, %0d neighbor-buffer entries", V, n_entries);

    // ---------- load ----------
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < N_AGG; c++)
      for (int r = 0; r < XB_ROWS; r++) begin
        map_we <= 1'b1; map_core <= CORE_W'(c); map_row <= 7'(r);
        map_vid <= vid_t'(rmap[c][r] < 0 ? 0 : rmap[c][r]); map_ok <= (rmap[c][r] >= 0);
        @(posedge clk);
      end
    map_we <= 1'b0;
    for (int e = 0; e < n_entries; e++) begin
      nb_we <= 1'b1; nb_waddr <= NB_AW'(e); nb_wdata <= nbe[e];
      @(posedge clk);
    end
    nb_we <= 1'b0;
    for (int i = 0; i < FEAT; i++) begin
      w_we <= 1'b1; w_row <= 6'(i);
      for (int j = 0; j < FEAT; j++) w_data[j] <= data_t'(w[i][j]);
      @(posedge clk);
    end
    w_we <= 1'b0;
    for (int i = 0; i < 256; i++) begin
      lut_we <= 1'b1; lut_addr <= 8'(i); lut_data <= data_t'(lut_f(i));
      @(posedge clk);
    end
    lut_we <= 1'b0;
    for (int v = 0; v < V; v++) begin
      feat_we <= 1'b1; feat.vid <= vid_t'(v);
      for (int f = 0; f < FEAT; f++) feat.feat[f] <= data_t'(h0[v][f]);
      @(posedge clk);
    end
    feat_we <= 1'b0;

    // ---------- layer 1: sum aggregation, one batch ----------
    push(mk_instr(OP_SWAP, 0, 0));
    push(mk_instr(OP_CFG, (OS1 << 5) | QS1, int'(AGG_SUM)));
    push(mk_instr(OP_AGG, n_entries, 0));
    // hold back the combination until the merge slots run out
    ecount = 0;
    while (n_slot == 0 && ecount < 60000) begin @(posedge clk); ecount++; end
    repeat (50) @(posedge clk);
    push(mk_instr(OP_COMB, V, 0));
    push(mk_instr(OP_UPD, V, 0));
    push(mk_instr(OP_SYNC, 0, 0));
    push(mk_instr(OP_SWAP, 0, 0));

    // ---------- layer 2: max aggregation, pipelined iterations ----------
    push(mk_instr(OP_CFG, (OS2 << 5) | QS2, int'(AGG_MAX)));
    for (int k = 0; k < 6; k++) begin
      if (k < 4) push(mk_instr(OP_AGG, it_first_entry[k+1] - it_first_entry[k], it_first_entry[k]));
      if (k >= 1 && k <= 4) push(mk_instr(OP_COMB, V / 4, 0));
      if (k >= 2) push(mk_instr(OP_OUT, V / 4, 0));
    end
    push(mk_instr(OP_HALT, 0, 0));

    while (!done) @(posedge clk);
    repeat (5) @(posedge clk);

    // every vertex returned exactly once
    for (int v = 0; v < V; v++) begin
      checks++;
      if (got[v] != 1) begin
        failures++;
        if (failures < 10) $display("vertex %0d returned %0d times", v, got[v]);
      end
    end
    $display("cycles=%0d outputs=%0d stall=%0d slot_stall=%0d overlap=%0d merge=%0d bypass=%0d contention=%0d mlp_parallel=%0d swaps=%0d out_backpressure=%0d",
             cyc, n_out, n_stall, n_slot, n_overlap, n_merge, n_bypass, n_cont, n_mlp, n_swap, n_outbp);
    begin
      int ev [9];
      string nm [9];
      ev = '{n_stall, n_slot, n_overlap, n_merge, n_bypass, n_cont, n_mlp, n_swap, n_outbp};
      nm = '{"decoder stall", "slot stall", "pipeline overlap", "merge", "bypass", "contention", "parallel MLP", "swap", "output backpressure"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("mechanism never seen: %s", nm[i]); end
      end
      checks++;
      if (n_swap != 2) begin failures++; $display("expected 2 swaps, saw %0d", n_swap); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
