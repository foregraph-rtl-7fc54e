// pe: one processing element. It holds a source sub-interval, a private copy of the
// destination sub-interval shared by all PEs, and an edge buffer, and updates the
// destination copy from a stream of edges at one edge per cycle.
//
// Pipeline: cycle 0 pops an edge and reads both vertex buffers; cycle 1 computes the update
// (update_unit) and writes the destination buffer when the value improves. An edge that
// follows immediately and hits the same destination would read the value before that
// write, so the last write is kept in a register and forwarded. `changed` records that some
// write happened since `clear_changed`, which tells the scheduler whether the destination
// sub-interval was updated. `idle` is high when no edge is buffered or in flight.
// Loads (src_ld_*, dst_ld_*) and write-back reads (wb_*) are row-wide; they come from the
// dispatcher and scheduler and never overlap edge processing.
// The buffer set and the one-edge-per-cycle pipelined PE follow the document; the two-stage
// pipeline, the forwarding and the change flag are this design's choices.
module pe #(
  parameter int unsigned   VW        = fg_pkg::VAL_W,
  parameter int unsigned   DEPTH     = fg_pkg::SI_DEPTH,
  parameter int unsigned   VPW       = fg_pkg::MEM_W / fg_pkg::VAL_W,
  parameter int unsigned   EF_DEPTH  = 16,
  parameter fg_pkg::algo_e ALGO      = fg_pkg::ALGO_BFS,
  localparam int unsigned  ROWS      = DEPTH / VPW,
  localparam int unsigned  RW        = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned  AW        = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // source sub-interval load
  input  logic                   src_ld_en,
  input  logic [RW-1:0]          ld_row,
  input  logic [VPW-1:0][VW-1:0] ld_data,
  // destination sub-interval load (same row/data bus)
  input  logic                   dst_ld_en,
  input  logic                   clear_changed,
  // edges
  input  logic                   e_valid,
  input  fg_pkg::edge_t          e_data,
  output logic                   e_ready,
  // write-back of the destination copy
  input  logic                   wb_en,
  input  logic [RW-1:0]          wb_row,
  output logic [VPW-1:0][VW-1:0] wb_data,
  // status
  output logic                   idle,
  output logic                   changed
);
  import fg_pkg::*;

  edge_t          head;
  logic           ef_empty, ef_full;
  logic [$clog2(EF_DEPTH):0] ef_count;
  logic           pop;

  edge_fifo #(.W(EDGE_W), .DEPTH(EF_DEPTH)) u_ebuf (
    .clk, .rst_n, .push(e_valid), .din(e_data), .pop,
    .dout(head), .full(ef_full), .empty(ef_empty), .count(ef_count)
  );
  assign e_ready = !ef_full;
  assign pop     = !ef_empty;

  // stage 1 registers
  logic          s1_valid;
  logic [AW-1:0] s1_dst;
  logic [VW-1:0] src_val, dst_rd;

  // forwarding of the previous cycle's write
  logic          fw_valid;
  logic [AW-1:0] fw_addr;
  logic [VW-1:0] fw_data;

  logic [VW-1:0] dst_cur, new_val;
  logic          improve;
  logic [VPW-1:0][VW-1:0] src_unused;

  vertex_buffer #(.VW(VW), .DEPTH(DEPTH), .VPW(VPW)) u_src (
    .clk,
    .ww_en(src_ld_en), .ww_row(ld_row), .ww_data(ld_data),
    .wr_en(1'b0), .wr_row('0), .wr_data(src_unused),
    .nr_en(pop), .nr_addr(AW'(head.src)), .nr_data(src_val),
    .nw_en(1'b0), .nw_addr('0), .nw_data('0)
  );

  vertex_buffer #(.VW(VW), .DEPTH(DEPTH), .VPW(VPW)) u_dst (
    .clk,
    .ww_en(dst_ld_en), .ww_row(ld_row), .ww_data(ld_data),
    .wr_en(wb_en), .wr_row(wb_row), .wr_data(wb_data),
    .nr_en(pop), .nr_addr(AW'(head.dst)), .nr_data(dst_rd),
    .nw_en(s1_valid && improve), .nw_addr(s1_dst), .nw_data(new_val)
  );

  assign dst_cur = (fw_valid && fw_addr == s1_dst) ? fw_data : dst_rd;

  update_unit #(.VW(VW), .ALGO(ALGO)) u_upd (
    .src_val, .dst_val(dst_cur), .new_val, .improve
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_dst   <= '0;
      fw_valid <= 1'b0;
      fw_addr  <= '0;
      fw_data  <= '0;
      changed  <= 1'b0;
    end else begin
      s1_valid <= pop;
      if (pop) s1_dst <= AW'(head.dst);
      fw_valid <= s1_valid && improve;
      fw_addr  <= s1_dst;
      fw_data  <= new_val;
      if (clear_changed)            changed <= 1'b0;
      else if (s1_valid && improve) changed <= 1'b1;
    end
  end

  assign idle = ef_empty && !s1_valid;

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (src_ld_en || dst_ld_en) |-> idle);
endmodule
