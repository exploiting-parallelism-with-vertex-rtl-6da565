// tb_agg_core: checks one aggregation core.
// Maps 120 vertices into the rows (one vertex duplicated into two rows),
// loads their features through the update broadcast, swaps, and runs
// random sum and max requests against a reference. It then rewrites the
// features in the update space while the work space is in use (results
// must not change), swaps again and checks that the new features are used.
// Cycle counts: after the accepting edge, sum requests take IN_SLICES=4
// compute cycles and max requests one per neighbor before the result shows.
module tb_agg_core;
  import gcn_pkg::*;
  localparam int R = XB_ROWS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, part_valid, part_ready, upd_valid, map_we, map_ok, swap, work_sel, busy;
  agg_req_t req; part_t part; upd_t upd;
  logic [$clog2(R)-1:0] map_row; vid_t map_vid;

  agg_core dut (.*);

  int feat [2][200][FEAT];   // two feature generations
  int rowv [R];

  task automatic write_feats(int g);
    for (int v = 0; v < 120; v++) begin
      @(negedge clk);
      upd_valid = 1; upd.vid = vid_t'(500 + v);
      for (int f = 0; f < FEAT; f++) upd.feat[f] = data_t'(feat[g][v][f]);
    end
    @(negedge clk); upd_valid = 0;
  endtask

  task automatic do_swap();
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
  endtask

  task automatic run_req(int g, agg_mode_e mode);
    int exp [FEAT]; int cyc0, cyc1, nnz; logic ok;
    req.vid = vid_t'($urandom_range(0, 1000)); req.slot = SLOT_W'($urandom);
    req.nparts = NPART_W'($urandom_range(1, 3)); req.mode = mode;
    nnz = 0;
    for (int r = 0; r < R; r++) begin
      req.adj[r] = (rowv[r] >= 0 && $urandom_range(0, 15) == 0) ? data_t'($urandom_range(1, 255)) : '0;
      if (req.adj[r] != 0) nnz++;
    end
    for (int f = 0; f < FEAT; f++) begin
      exp[f] = 0;
      for (int r = 0; r < R; r++) if (req.adj[r] != 0) begin
        if (mode == AGG_SUM) exp[f] += int'(req.adj[r]) * feat[g][rowv[r]][f];
        else if (feat[g][rowv[r]][f] > exp[f]) exp[f] = feat[g][rowv[r]][f];
      end
    end
    @(negedge clk);
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    cyc0 = $time;
    @(negedge clk);
    req_valid = 0;
    while (!part_valid) @(negedge clk);
    cyc1 = $time;
    ok = (part.vid == req.vid) && (part.slot == req.slot) && (part.nparts == req.nparts) && (part.mode == mode);
    for (int f = 0; f < FEAT; f++) if (int'(part.acc[f]) != exp[f]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("mode %0d result mismatch (nnz %0d)", mode, nnz); end
    checks++;
    if ((cyc1 - cyc0) / 10 != 1 + ((mode == AGG_SUM) ? IN_SLICES : ((nnz == 0) ? 1 : nnz))) begin
      failures++; $display("mode %0d latency %0d cycles, nnz %0d", mode, (cyc1 - cyc0) / 10, nnz);
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    part_ready = 1; @(negedge clk); part_ready = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; part_ready = 0; upd_valid = 0; map_we = 0; swap = 0; req = '0; upd = '0;
    map_row = '0; map_vid = '0; map_ok = 0;
    for (int g = 0; g < 2; g++) for (int v = 0; v < 200; v++) for (int f = 0; f < FEAT; f++)
      feat[g][v][f] = $urandom_range(0, 255);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // rows 0..119 hold vertices 500..619, row 120 duplicates vertex 507, rest empty
    for (int r = 0; r < R; r++) begin
      rowv[r] = (r < 120) ? r : (r == 120 ? 7 : -1);
      @(negedge clk);
      map_we = 1; map_row = 7'(r); map_vid = vid_t'(rowv[r] < 0 ? 0 : 500 + rowv[r]); map_ok = (rowv[r] >= 0);
    end
    @(negedge clk); map_we = 0;
    write_feats(0);
    do_swap();
    checks++;
    if (work_sel != 1'b1) begin failures++; $display("swap did not toggle work_sel"); end
    for (int t = 0; t < 20; t++) run_req(0, (t % 2) ? AGG_MAX : AGG_SUM);
    // write generation 1 into the update space: work space results unchanged
    write_feats(1);
    for (int t = 0; t < 10; t++) run_req(0, (t % 2) ? AGG_MAX : AGG_SUM);
    do_swap();
    for (int t = 0; t < 20; t++) run_req(1, (t % 2) ? AGG_MAX : AGG_SUM);
    // an empty max request yields zeros
    begin
      logic ok;
      @(negedge clk);
      req.adj = '0; req.mode = AGG_MAX; req_valid = 1;
      @(negedge clk); req_valid = 0;
      while (!part_valid) @(negedge clk);
      ok = 1; for (int f = 0; f < FEAT; f++) if (part.acc[f] != 0) ok = 0;
      checks++; if (!ok) begin failures++; $display("empty max not zero"); end
      part_ready = 1; @(negedge clk); part_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
