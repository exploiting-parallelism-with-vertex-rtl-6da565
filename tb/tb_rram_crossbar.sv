// tb_rram_crossbar: checks the crossbar model's in-memory MVM.
// Programs every row with random 2-bit cells, then applies random sparse
// and dense 2-bit word-line inputs and compares every bit-line output with
// a dot product computed here. A second instance with a narrow ADC checks
// saturation at full scale.
module tb_rram_crossbar;
  localparam int R = 128, C = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [R-1:0]          we_rows;
  logic [C-1:0][1:0]     wdata;
  logic [R-1:0][1:0]     row_in;
  logic [C-1:0][10:0]    col_out;
  logic [C-1:0][5:0]     col_sat;
  int cells [R][C];

  rram_crossbar dut (.clk, .we_rows, .wdata, .row_in, .col_out);
  rram_crossbar #(.ADC_BITS(6)) dut_sat (.clk, .we_rows, .wdata, .row_in, .col_out(col_sat));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_rows = '0; wdata = '0; row_in = '0;
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      we_rows = '0; we_rows[r] = 1'b1;
      for (int c = 0; c < C; c++) begin
        cells[r][c] = $urandom_range(0, 3);
        wdata[c] = 2'(cells[r][c]);
      end
    end
    @(negedge clk);
    we_rows = '0;
    for (int t = 0; t < 40; t++) begin
      logic ok, oks;
      for (int r = 0; r < R; r++)
        row_in[r] = (t < 20) ? (($urandom_range(0, 9) == 0) ? 2'($urandom_range(1, 3)) : 2'd0)
                             : 2'($urandom_range(0, 3));
      #1;
      ok = 1; oks = 1;
      for (int c = 0; c < C; c++) begin
        int s;
        s = 0;
        for (int r = 0; r < R; r++) s += int'(row_in[r]) * cells[r][c];
        if (int'(col_out[c]) != s) ok = 0;
        if (int'(col_sat[c]) != ((s > 63) ? 63 : s)) oks = 0;
      end
      checks += 2;
      if (!ok)  begin failures++; $display("MVM mismatch at vector %0d", t); end
      if (!oks) begin failures++; $display("ADC saturation mismatch at vector %0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
