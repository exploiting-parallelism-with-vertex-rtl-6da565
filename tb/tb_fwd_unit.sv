// tb_fwd_unit: checks a forwarding unit with 8 inputs.
// Random traffic of single-part vertices (must bypass the table) and
// vertices split into 2..4 parts that arrive from different inputs in
// random order, in sum and max mode, with output back-pressure. Every
// forwarded result is compared with the merge computed here, and every
// multi-part vertex must release its slot exactly once.
module tb_fwd_unit;
  import gcn_pkg::*;
  localparam int NI = N_AGG;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NI-1:0] in_valid, in_ready;
  part_t in_part [NI];
  logic out_valid, out_ready, rel_valid, ev_merge, ev_bypass;
  agg_res_t out_res;
  logic [SLOT_W-1:0] rel_slot;

  fwd_unit dut (.*);

  // expected results by vertex id
  int exp_acc [int][FEAT];
  int exp_cnt = 0, got_cnt = 0, rel_cnt = 0, exp_rel = 0, n_byp = 0, n_mrg = 0;

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (ev_bypass) n_byp++;
    if (ev_merge) n_mrg++;
    if (rel_valid) rel_cnt++;
    if (out_valid && out_ready) begin
      logic ok; int v;
      v = int'(out_res.vid);
      ok = exp_acc.exists(v);
      if (ok) for (int f = 0; f < FEAT; f++) if (int'(out_res.acc[f]) != exp_acc[v][f]) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("result for vertex %0d wrong", v); end
      if (exp_acc.exists(v)) exp_acc.delete(v);
      got_cnt++;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one vertex at a time per slot; parts issued on distinct inputs
  task automatic send_vertex(int vid, int slot);
    int np; agg_mode_e m; int order [NI]; part_t p [4];
    np = ($urandom_range(0, 2) == 0) ? 1 : $urandom_range(2, 4);
    m  = agg_mode_e'($urandom_range(0, 1));
    for (int k = 0; k < np; k++) begin
      p[k].vid = vid_t'(vid); p[k].slot = SLOT_W'(slot); p[k].nparts = NPART_W'(np); p[k].mode = m;
      for (int f = 0; f < FEAT; f++) p[k].acc[f] = acc_t'($urandom_range(0, 100000));
    end
    for (int f = 0; f < FEAT; f++) begin
      int e; e = int'(p[0].acc[f]);
      for (int k = 1; k < np; k++)
        e = (m == AGG_SUM) ? e + int'(p[k].acc[f]) : ((int'(p[k].acc[f]) > e) ? int'(p[k].acc[f]) : e);
      exp_acc[vid][f] = e;
    end
    exp_cnt++;
    if (np > 1) exp_rel++;
    // drive all parts at once on inputs 0..np-1 rotated, hold each until taken
    begin
      int base; logic [NI-1:0] pend;
      base = $urandom_range(0, NI - 1);
      pend = '0;
      @(negedge clk);
      for (int k = 0; k < np; k++) begin
        in_part[(base + k) % NI] = p[k];
        pend[(base + k) % NI] = 1'b1;
      end
      in_valid = pend;
      while (in_valid != '0) begin
        logic [NI-1:0] taken;
        #1 taken = in_valid & in_ready;
        @(negedge clk);
        in_valid = in_valid & ~taken;
      end
    end
  endtask

  initial begin
    in_valid = '0;
    for (int i = 0; i < NI; i++) in_part[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) send_vertex(t, t % N_SLOTS);
    repeat (20) @(negedge clk);
    checks += 4;
    if (got_cnt != exp_cnt) begin failures++; $display("got %0d results, expected %0d", got_cnt, exp_cnt); end
    if (rel_cnt != exp_rel) begin failures++; $display("released %0d slots, expected %0d", rel_cnt, exp_rel); end
    if (n_byp == 0) begin failures++; $display("no bypass seen"); end
    if (n_mrg == 0) begin failures++; $display("no merge seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
