// tb_agg_core_array: checks the aggregation cores with the forwarding
// network. Core c holds vertices 100*c .. 100*c+59 in rows 0..59, and core
// c also holds a copy of vertex 100*((c+1)%8) in row 60. Random vertices
// are aggregated over neighbors spread across 1..4 cores (sum and max
// mode), parts issued back to back to the addressed cores with distinct
// merge slots; every complete result is compared with a reference. A
// feature update of the duplicated vertex must reach both copies.
module tb_agg_core_array;
  import gcn_pkg::*;
  localparam int NV = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, res_valid, res_ready, upd_valid, map_we, map_ok, swap, work_sel, busy;
  logic ev_merge, ev_bypass, ev_contention;
  logic [CORE_W-1:0] req_core, map_core;
  agg_req_t req; agg_res_t res; upd_t upd;
  logic [N_SLOTS-1:0] slot_free;
  logic [6:0] map_row; vid_t map_vid;
  logic [N_AGG-1:0] core_busy;

  agg_core_array dut (.*);

  int feat [N_AGG][NV][FEAT];
  int exp_a [int][FEAT];
  int n_res = 0, n_exp = 0, n_merge = 0, n_byp = 0, n_free = 0;

  always @(negedge clk) res_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    n_merge += ev_merge; n_byp += ev_bypass; n_free += $countones(slot_free);
    if (res_valid && res_ready) begin
      logic ok; int v;
      v = int'(res.vid);
      ok = exp_a.exists(v);
      if (ok) for (int f = 0; f < FEAT; f++) if (int'(res.acc[f]) != exp_a[v][f]) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("result for %0d wrong", v); end
      if (exp_a.exists(v)) exp_a.delete(v);
      n_res++;
    end
  end

  task automatic send(int c, agg_req_t r);
    @(negedge clk);
    req_valid = 1; req_core = CORE_W'(c); req = r;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int multi;
    req_valid = 0; upd_valid = 0; map_we = 0; swap = 0; req = '0; upd = '0; req_core = '0;
    map_core = '0; map_row = '0; map_vid = '0; map_ok = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N_AGG; c++)
      for (int r = 0; r < XB_ROWS; r++) begin
        @(negedge clk);
        map_we = 1; map_core = CORE_W'(c); map_row = 7'(r);
        map_ok = (r <= NV);
        map_vid = vid_t'((r < NV) ? 100 * c + r : 100 * ((c + 1) % N_AGG));
      end
    @(negedge clk); map_we = 0;
    for (int c = 0; c < N_AGG; c++)
      for (int v = 0; v < NV; v++) begin
        @(negedge clk);
        upd_valid = 1; upd.vid = vid_t'(100 * c + v);
        for (int f = 0; f < FEAT; f++) begin
          feat[c][v][f] = $urandom_range(0, 255);
          upd.feat[f] = data_t'(feat[c][v][f]);
        end
      end
    @(negedge clk); upd_valid = 0;
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    multi = 0;
    for (int t = 0; t < 120; t++) begin
      int np; agg_mode_e m; int cs [4]; agg_req_t r [4]; int e [FEAT];
      np = $urandom_range(1, 4);
      m = agg_mode_e'(t % 2);
      for (int k = 0; k < np; k++) begin
        logic dup;
        do begin
          cs[k] = $urandom_range(0, N_AGG - 1);
          dup = 0;
          for (int j = 0; j < k; j++) if (cs[j] == cs[k]) dup = 1;
        end while (dup);
      end
      for (int f = 0; f < FEAT; f++) e[f] = 0;
      for (int k = 0; k < np; k++) begin
        r[k] = '0;
        r[k].vid = vid_t'(5000 + t); r[k].slot = SLOT_W'(multi % N_SLOTS);
        r[k].nparts = NPART_W'(np); r[k].mode = m;
        for (int row = 0; row <= NV; row++)
          if ($urandom_range(0, 9) == 0) begin
            int fv;
            r[k].adj[row] = data_t'($urandom_range(1, 255));
            for (int f = 0; f < FEAT; f++) begin
              fv = (row < NV) ? feat[cs[k]][row][f] : feat[(cs[k] + 1) % N_AGG][0][f];
              if (m == AGG_SUM) e[f] += int'(r[k].adj[row]) * fv;
              else if (fv > e[f]) e[f] = fv;
            end
          end
      end
      for (int f = 0; f < FEAT; f++) exp_a[5000 + t][f] = e[f];
      n_exp++;
      // at most N_SLOTS multi-part vertices in flight: wait for a slot to come back
      if (np > 1) begin
        if (multi >= N_SLOTS) wait (n_free >= multi - N_SLOTS + 1);
        multi++;
      end
      for (int k = 0; k < np; k++) send(cs[k], r[k]);
    end
    wait (n_res == n_exp);
    checks += 3;
    if (n_merge == 0 || n_byp == 0) begin failures++; $display("merge %0d bypass %0d", n_merge, n_byp); end
    if (n_free != multi) begin failures++; $display("slots freed %0d of %0d", n_free, multi); end
    if (busy && !res_valid) begin failures++; $display("array still busy"); end
    // the duplicated vertex 100 lives in core 1 row 0 and core 0 row 60:
    // update it, swap, and read both copies
    @(negedge clk);
    upd_valid = 1; upd.vid = vid_t'(100);
    for (int f = 0; f < FEAT; f++) upd.feat[f] = data_t'(f + 1);
    @(negedge clk); upd_valid = 0;
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    for (int k = 0; k < 2; k++) begin
      agg_req_t rq;
      rq = '0; rq.vid = vid_t'(9000 + k); rq.nparts = 1; rq.mode = AGG_SUM;
      rq.adj[k ? NV : 0] = 8'd2;
      for (int f = 0; f < FEAT; f++) exp_a[9000 + k][f] = 2 * (f + 1);
      n_exp++;
      send(k ? 0 : 1, rq);
    end
    wait (n_res == n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
