// update_bitmap: one bit per sub-interval of the whole graph, recording which sub-intervals
// changed. It drives the skipping of useless blocks: a group of K source sub-intervals
// whose bits were all clear in the previous iteration cannot update anything, so its
// edges are not read.
//
// Two bit vectors: `prev` (read during an iteration) and `cur` (collected during it).
// `set_local` marks a sub-interval this board wrote back with changes; `set_remote` marks a
// sub-interval received from another board. `advance` starts an iteration (prev <= cur,
// cur <= 0); `init` marks every sub-interval changed so that the first iteration reads all
// blocks. `grp_active` tells whether any of the K bits of group (interval x, group g) is set
// in prev; `q_cur` reads one bit of cur.
// The bitmap with one bit per sub-interval is the document's; the two-vector form and the
// group query are this design's choices.
module update_bitmap #(
  parameter int unsigned P    = fg_pkg::N_BOARDS,
  parameter int unsigned QMAX = fg_pkg::Q_MAX,
  parameter int unsigned K    = fg_pkg::K_PE,
  localparam int unsigned N   = P * QMAX,
  localparam int unsigned NW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          advance,
  input  logic          set_local,
  input  logic [NW-1:0] local_idx,
  input  logic          set_remote,
  input  logic [NW-1:0] remote_idx,
  input  logic [NW-1:0] grp_base,
  output logic          grp_active,
  input  logic [NW-1:0] q_idx,
  output logic          q_cur
);
  logic [N-1:0] prev, cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      cur  <= '0;
    end else if (init) begin
      cur <= '1;
    end else if (advance) begin
      prev <= cur;
      cur  <= '0;
    end else begin
      if (set_local)  cur[local_idx]  <= 1'b1;
      if (set_remote) cur[remote_idx] <= 1'b1;
    end
  end

  always_comb begin
    grp_active = 1'b0;
    for (int i = 0; i < K; i++)
      if (int'(grp_base) + i < N && prev[int'(grp_base) + i]) grp_active = 1'b1;
  end

  assign q_cur = cur[q_idx];
endmodule
