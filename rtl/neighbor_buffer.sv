// neighbor_buffer: on-chip storage of the adjacency vectors.
//
// Holds DEPTH neighbor-buffer entries (gcn_pkg::nb_entry_t): for one
// destination vertex and one aggregation core, the vertex id, the target
// core, the number of cores its neighbors are spread over, and the 8-bit
// normalized adjacency weights towards the core's 128 rows. With the
// default 512 entries the weight fields fill 64 KB, the buffer size the
// accelerator is evaluated with. The host fills the buffer through the
// write port; the controller reads it through the read port with one cycle
// of latency (registered output, as a synchronous SRAM). The entry format
// and the dense per-core vectors are this design's own choice.
module neighbor_buffer
  import gcn_pkg::*;
#(
  parameter int unsigned DEPTH = NB_DEPTH
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  nb_entry_t                 wdata,
  input  logic                      re,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output nb_entry_t                 rdata
);
  nb_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
