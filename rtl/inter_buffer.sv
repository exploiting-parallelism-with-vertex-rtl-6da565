// inter_buffer: the intermediate buffer between the core arrays.
//
// Two first-in first-out regions share the buffer:
//  * the aggregation region receives complete aggregation results from the
//    forwarding network and is read into the combination array's waiting
//    queue;
//  * the update region receives the combination results (new 8-bit feature
//    vectors) and is read by the controller to write them back into the
//    update space of the aggregation cores, or to return them to the host.
// Both regions use valid/ready on each side, and each reports its
// occupancy. Default depths (128 aggregation results of 2 Kbit, 256 feature
// vectors of 512 bit) keep the buffer near 50 KB, inside the 64 KB the
// accelerator's buffers are evaluated with. The two-region organization is
// this design's own choice.
module inter_buffer
  import gcn_pkg::*;
#(
  parameter int unsigned AGG_DEPTH = 128,
  parameter int unsigned UPD_DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      agg_in_valid,
  output logic      agg_in_ready,
  input  agg_res_t  agg_in,
  output logic      agg_out_valid,
  input  logic      agg_out_ready,
  output agg_res_t  agg_out,
  input  logic      upd_in_valid,
  output logic      upd_in_ready,
  input  upd_t      upd_in,
  output logic      upd_out_valid,
  input  logic      upd_out_ready,
  output upd_t      upd_out,
  output logic [$clog2(AGG_DEPTH+1)-1:0] agg_count,
  output logic [$clog2(UPD_DEPTH+1)-1:0] upd_count
);
  sync_fifo #(.T(agg_res_t), .DEPTH(AGG_DEPTH)) u_agg_region (
    .clk, .rst_n,
    .in_valid(agg_in_valid), .in_ready(agg_in_ready), .in_data(agg_in),
    .out_valid(agg_out_valid), .out_ready(agg_out_ready), .out_data(agg_out),
    .count(agg_count)
  );
  sync_fifo #(.T(upd_t), .DEPTH(UPD_DEPTH)) u_upd_region (
    .clk, .rst_n,
    .in_valid(upd_in_valid), .in_ready(upd_in_ready), .in_data(upd_in),
    .out_valid(upd_out_valid), .out_ready(upd_out_ready), .out_data(upd_out),
    .count(upd_count)
  );
endmodule
