// tb_inter_buffer: fills and drains both regions with random stalls on
// each side and checks first-in first-out order, occupancy and that a full
// region refuses writes.
module tb_inter_buffer;
  import gcn_pkg::*;
  localparam int AD = 128, UD = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic agg_in_valid, agg_in_ready, agg_out_valid, agg_out_ready;
  logic upd_in_valid, upd_in_ready, upd_out_valid, upd_out_ready;
  agg_res_t agg_in, agg_out;
  upd_t upd_in, upd_out;
  logic [$clog2(AD+1)-1:0] agg_count;
  logic [$clog2(UD+1)-1:0] upd_count;

  inter_buffer dut (.*);

  int a_wr = 0, a_rd = 0, u_wr = 0, u_rd = 0;
  int phase = 0;   // 0: fill only, 1: random traffic

  always @(negedge clk) begin
    agg_in_valid  = (a_wr < 400) && ($urandom_range(0, 3) != 0);
    agg_in.vid    = vid_t'(a_wr);
    for (int f = 0; f < FEAT; f++) agg_in.acc[f] = acc_t'(a_wr * 7 + f);
    upd_in_valid  = (u_wr < 600) && ($urandom_range(0, 3) != 0);
    upd_in.vid    = vid_t'(u_wr);
    for (int f = 0; f < FEAT; f++) upd_in.feat[f] = data_t'(u_wr + f);
    agg_out_ready = (phase == 1) && ($urandom_range(0, 2) != 0);
    upd_out_ready = (phase == 1) && ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (agg_in_valid && agg_in_ready) a_wr++;
    if (upd_in_valid && upd_in_ready) u_wr++;
    if (agg_out_valid && agg_out_ready) begin
      checks++;
      if (int'(agg_out.vid) != a_rd || int'(agg_out.acc[3]) != a_rd * 7 + 3) begin
        failures++; $display("agg region order error at %0d", a_rd);
      end
      a_rd++;
    end
    if (upd_out_valid && upd_out_ready) begin
      checks++;
      if (int'(upd_out.vid) != u_rd || upd_out.feat[5] != data_t'(u_rd + 5)) begin
        failures++; $display("update region order error at %0d", u_rd);
      end
      u_rd++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (1200) @(posedge clk);
    // both regions must now be full and refuse writes
    checks += 2;
    if (!(agg_count == AD && !agg_in_ready)) begin failures++; $display("agg region not full: %0d", agg_count); end
    if (!(upd_count == UD && !upd_in_ready)) begin failures++; $display("update region not full: %0d", upd_count); end
    phase = 1;
    wait (a_rd == 400 && u_rd == 600);
    repeat (3) @(posedge clk);
    checks++;
    if (agg_count != 0 || upd_count != 0 || agg_out_valid || upd_out_valid) begin
      failures++; $display("buffer not empty at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
