// tb_comb_core_array: checks the waiting queue plus MLP cores.
// Loads random weights and a ReLU table, streams 60 aggregation results
// with output back-pressure and checks every result (by vertex id, since
// cores finish out of order), that each vertex comes back once, that
// several MLP cores were busy at the same time and that the waiting queue
// filled up while all cores were busy.
module tb_comb_core_array;
  import gcn_pkg::*;
  localparam int QS = 3, OS = 8, N = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] agg_shift = 5'(QS), out_shift = 5'(OS);
  logic in_valid, in_ready, out_valid, out_ready, w_we, lut_we, busy;
  agg_res_t in_res; upd_t out_upd;
  logic [$clog2(FEAT)-1:0] w_row;
  logic [FEAT-1:0][DATA_W-1:0] w_data;
  logic [7:0] lut_addr; data_t lut_data;
  logic [$clog2(9)-1:0] wq_count;
  logic [N_MLP-1:0] core_busy;

  comb_core_array dut (.*);

  int w [FEAT][FEAT];
  int exp_a [N][FEAT];
  int seen [N];
  int max_busy = 0, max_wq = 0;

  function automatic int lutf(int i); return (i >= 128) ? i - 128 : 0; endfunction

  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if ($countones(core_busy) > max_busy) max_busy = $countones(core_busy);
    if (int'(wq_count) > max_wq) max_wq = int'(wq_count);
    if (out_valid && out_ready) begin
      logic ok; int v;
      v = int'(out_upd.vid);
      ok = (v < N) && (seen[v] == 0);
      if (v < N) begin
        for (int j = 0; j < FEAT; j++) if (int'(out_upd.feat[j]) != exp_a[v][j]) ok = 0;
        seen[v]++;
      end
      checks++;
      if (!ok) begin failures++; $display("vertex %0d wrong", v); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; w_we = 0; lut_we = 0; in_res = '0; w_row = '0; w_data = '0; lut_addr = '0; lut_data = '0;
    for (int v = 0; v < N; v++) seen[v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < FEAT; i++) begin
      @(negedge clk);
      w_we = 1; w_row = 6'(i);
      for (int j = 0; j < FEAT; j++) begin
        w[i][j] = int'($urandom_range(0, 63)) - 32;
        w_data[j] = data_t'(w[i][j]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); w_we = 0; lut_we = 1; lut_addr = 8'(a); lut_data = data_t'(lutf(a));
    end
    @(negedge clk); lut_we = 0;
    for (int k = 0; k < N; k++) begin
      int x [FEAT];
      @(negedge clk);
      in_valid = 1;
      in_res.vid = vid_t'(k);
      for (int i = 0; i < FEAT; i++) begin
        in_res.acc[i] = acc_t'($urandom_range(0, 3000));
        x[i] = int'(in_res.acc[i]) >> QS;
        if (x[i] > 255) x[i] = 255;
      end
      for (int j = 0; j < FEAT; j++) begin
        int y, q;
        y = 0;
        for (int i = 0; i < FEAT; i++) y += x[i] * w[i][j];
        q = y >>> OS;
        if (q > 127) q = 127;
        if (q < -128) q = -128;
        exp_a[k][j] = lutf(q + 128);
      end
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
    repeat (200) @(negedge clk);
    for (int v = 0; v < N; v++) begin
      checks++;
      if (seen[v] != 1) begin failures++; $display("vertex %0d seen %0d times", v, seen[v]); end
    end
    checks += 2;
    if (max_busy < 2) begin failures++; $display("MLP cores never ran in parallel"); end
    if (max_wq < 2) begin failures++; $display("waiting queue never held work"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
