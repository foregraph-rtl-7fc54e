// update_unit: the algorithm-specific processing logic of a PE.
//
// Given the value of an edge's source vertex and the current value of its destination, it
// returns the candidate value and whether it improves the destination. BFS follows the
// relaxation of the document's Algorithm 1: depth(dst) = depth(src) + 1 when that is
// smaller; the all-ones value means "unreached" and is never incremented. WCC propagates
// the smaller component label. Both combine by minimum, so the copies of a destination
// sub-interval held by several PEs can be merged by a minimum at write-back. Purely
// combinational; the PE registers around it.
module update_unit #(
  parameter int unsigned  VW   = fg_pkg::VAL_W,
  parameter fg_pkg::algo_e ALGO = fg_pkg::ALGO_BFS
) (
  input  logic [VW-1:0] src_val,
  input  logic [VW-1:0] dst_val,
  output logic [VW-1:0] new_val,
  output logic          improve
);
  logic [VW-1:0] cand;

  always_comb begin
    if (ALGO == fg_pkg::ALGO_BFS)
      cand = (src_val == '1) ? '1 : src_val + 1'b1;
    else
      cand = src_val;
    improve = (cand < dst_val);
    new_val = improve ? cand : dst_val;
  end
endmodule
