// tb_neighbor_buffer: writes random entries to every address, reads them
// back in random order and checks data and the one-cycle read latency.
module tb_neighbor_buffer;
  import gcn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [NB_AW-1:0] waddr, raddr;
  nb_entry_t wdata, rdata;
  nb_entry_t model [NB_DEPTH];

  neighbor_buffer dut (.*);

  function automatic nb_entry_t rnd();
    nb_entry_t e;
    e.vid = vid_t'($urandom); e.core = CORE_W'($urandom); e.nparts = NPART_W'($urandom);
    for (int r = 0; r < XB_ROWS; r++) e.adj[r] = data_t'($urandom);
    return e;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < NB_DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = NB_AW'(a); wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(0, NB_DEPTH - 1);
      re = 1; raddr = NB_AW'(a);
      @(negedge clk);
      re = 0; raddr = NB_AW'(a + 1);
      checks++;
      if (rdata != model[a]) begin failures++; $display("read %0d mismatch", a); end
      @(negedge clk);
      checks++;   // output holds while re is low
      if (rdata != model[a]) begin failures++; $display("read %0d not held", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
