// rram_crossbar: behavioural model of one RRAM crossbar with its DACs and
// ADCs (analog in the real part; this model reproduces its arithmetic).
//
// Each of the ROWS x COLS cells stores a CELL_BITS-wide conductance level.
// In a compute cycle every word line is driven by a DAC_BITS-wide input
// slice and each bit line sums the products of input and conductance
// (Ohm's and Kirchhoff's laws); an ADC of ADC_BITS digitizes each bit-line
// sum, saturating at full scale. The default ADC width is lossless for the
// default sizes, so the model is exact unless ADC_BITS is reduced.
// Interface: `col_out` is combinational in `row_in` (the core registers it,
// which stands for the ADC sampling edge). Writes program whole rows: every
// row whose bit in `we_rows` is set takes `wdata` at the clock edge.
// The 2-bit cells and 2-bit input slices follow the low RRAM and input
// precision the accelerator is built around; array sizes are this
// design's choice.
module rram_crossbar #(
  parameter int unsigned ROWS      = 128,
  parameter int unsigned COLS      = 128,
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned DAC_BITS  = 2,
  parameter int unsigned ADC_BITS  = CELL_BITS + DAC_BITS + $clog2(ROWS)
) (
  input  logic                                 clk,
  input  logic [ROWS-1:0]                      we_rows,
  input  logic [COLS-1:0][CELL_BITS-1:0]       wdata,
  input  logic [ROWS-1:0][DAC_BITS-1:0]        row_in,
  output logic [COLS-1:0][ADC_BITS-1:0]        col_out
);
  localparam int unsigned SUM_W = CELL_BITS + DAC_BITS + $clog2(ROWS) + 1;

  logic [COLS-1:0][CELL_BITS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++)
      if (we_rows[r]) cells[r] <= wdata;
  end

  // One adder tree per bit line; word lines driven with zero add nothing.
  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [SUM_W-1:0] sum;
    always_comb begin
      sum = '0;
      for (int r = 0; r < ROWS; r++)
        if (row_in[r] != '0)
          sum += SUM_W'(row_in[r]) * SUM_W'(cells[r][c]);
      col_out[c] = (sum > SUM_W'((1 << ADC_BITS) - 1)) ? '1 : sum[ADC_BITS-1:0];
    end
  end

endmodule
