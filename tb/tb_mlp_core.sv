// tb_mlp_core: checks one MLP core.
// Loads random signed weights (including -128 and 127) and a ReLU table,
// then streams random aggregation results back to back with random output
// back-pressure and compares every output vector with requantize ->
// matrix-vector product -> requantize -> table computed here. With the
// output always ready it also checks the 5-cycle latency and that a new
// vector is accepted every 4 cycles (pipelined stages).
module tb_mlp_core;
  import gcn_pkg::*;
  localparam int QS = 4, OS = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] agg_shift = 5'(QS), out_shift = 5'(OS);
  logic in_valid, in_ready, out_valid, out_ready, w_we, lut_we, busy;
  agg_res_t in_res; upd_t out_upd;
  logic [$clog2(FEAT)-1:0] w_row;
  logic [FEAT-1:0][DATA_W-1:0] w_data;
  logic [7:0] lut_addr; data_t lut_data;

  mlp_core dut (.*);

  int w [FEAT][FEAT];
  int exp_a [64][FEAT+1];
  int sent = 0, got = 0;
  int acc_times [$];
  int bp = 1;
  int first_nb = 1;

  function automatic int lutf(int i); return (i >= 128) ? i - 128 : 0; endfunction

  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  int t_in [$];
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) t_in.push_back($time);
    if (out_valid && out_ready) begin
      logic ok; int e [FEAT+1]; int t0;
      e = exp_a[got];
      t0 = t_in.pop_front();
      ok = (int'(out_upd.vid) == e[FEAT]);
      for (int j = 0; j < FEAT; j++) if (int'(out_upd.feat[j]) != e[j]) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("output %0d mismatch vid %0d/%0d f0 %0d/%0d f1 %0d/%0d f5 %0d/%0d", got, out_upd.vid, e[FEAT], out_upd.feat[0], e[0], out_upd.feat[1], e[1], out_upd.feat[5], e[5]); end
      if (!bp && first_nb) begin
        // valid rises 5 cycles after the accepting edge; the transfer is seen on the 6th edge
        checks++;
        first_nb = 0;
        if (($time - t0) / 10 != 6) begin failures++; $display("latency %0d", ($time - t0) / 10); end
      end
      got++;
    end
  end

  task automatic send(int n);
    for (int k = 0; k < n; k++) begin
      int x [FEAT]; int e [FEAT+1];
      @(negedge clk);
      in_valid = 1;
      in_res.vid = vid_t'(sent);
      for (int i = 0; i < FEAT; i++) begin
        in_res.acc[i] = acc_t'($urandom_range(0, 8000));
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
        e[j] = lutf(q + 128);
      end
      e[FEAT] = sent;
      exp_a[sent] = e;
      sent++;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; w_we = 0; lut_we = 0; in_res = '0; w_row = '0; w_data = '0; lut_addr = '0; lut_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < FEAT; i++) begin
      @(negedge clk);
      w_we = 1; w_row = 6'(i);
      for (int j = 0; j < FEAT; j++) begin
        w[i][j] = (i == 0 && j < 2) ? (j ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        w_data[j] = data_t'(w[i][j]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); w_we = 0; lut_we = 1; lut_addr = 8'(a); lut_data = data_t'(lutf(a));
    end
    @(negedge clk); lut_we = 0;
    send(30);
    wait (got == sent);
    // throughput and latency with the output always ready
    bp = 0;
    @(negedge clk);
    begin
      int t_first, t_last;
      t_first = $time;
      send(10);
      t_last = $time;
      wait (got == sent);
      checks++;
      // ten vectors at one per 4 cycles: the last is accepted 36 cycles after the first
      if ((t_last - t_first) / 10 > 4 * 10 + 2) begin failures++; $display("throughput too low: %0d cycles", (t_last - t_first) / 10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
