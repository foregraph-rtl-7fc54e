// merge_unit: combines the K private copies of the destination sub-interval at write-back.
//
// All PEs update the same destination sub-interval, each in its own destination buffer, so
// no two PEs ever write the same BRAM. When the step ends the scheduler reads the same row
// from every copy and this unit takes the element-wise minimum, the combine operation of
// the minimum-based algorithms (BFS, WCC). Every copy starts from the value in memory, so
// the minimum is the correct updated value. Combinational: one block per lane, each a chain of K-1
// comparators (a synthesis tool may rebalance it).
// The document gives each PE its own source and destination buffer (Formula (3) counts
// 2*K sub-intervals of BRAM) but not how the copies are combined; the element-wise minimum
// is this design's choice.
module merge_unit #(
  parameter int unsigned K   = fg_pkg::K_PE,
  parameter int unsigned VW  = fg_pkg::VAL_W,
  parameter int unsigned VPW = fg_pkg::MEM_W / fg_pkg::VAL_W
) (
  input  logic [K-1:0][VPW-1:0][VW-1:0] rows_in,
  output logic [VPW-1:0][VW-1:0]        row_out
);
  for (genvar l = 0; l < VPW; l++) begin : g_lane
    always_comb begin
      row_out[l] = rows_in[0][l];
      for (int k = 1; k < K; k++)
        if (rows_in[k][l] < row_out[l]) row_out[l] = rows_in[k][l];
    end
  end
endmodule
