// foregraph_top: a multi-board graph processing system. The vertices of a graph are split
// into P intervals, one per board, and each board updates its own interval from all
// intervals with edges held in its own off-chip memory; boards exchange only the vertex
// values that changed.
//
// P fg_board instances are joined in a unidirectional ring (board b sends to board b+1 mod
// P); with four boards this is the 2 x 2 torus of the reference setup. The top also forms
// the iteration barrier (all_comp_done, the AND of the boards' comp_done). Each board has
// its own off-chip memory port, brought out as arrays indexed by board: the memory
// controllers and DRAM are outside this design. Host control (start, run-time
// configuration) is shared by all boards; done is the AND of the boards' done flags.
// The board-per-interval organisation and the torus/ring interconnect follow the document
// (Sections 3.1, 3.2, 3.4); the barrier and port-level protocol are this design's choices.
module foregraph_top #(
  parameter int unsigned   P        = fg_pkg::N_BOARDS,
  parameter int unsigned   QMAX     = fg_pkg::Q_MAX,
  parameter int unsigned   K        = fg_pkg::K_PE,
  parameter int unsigned   VW       = fg_pkg::VAL_W,
  parameter int unsigned   DEPTH    = fg_pkg::SI_DEPTH,
  parameter int unsigned   MEM_W    = fg_pkg::MEM_W,
  parameter fg_pkg::algo_e ALGO     = fg_pkg::ALGO_BFS,
  localparam int unsigned  AW       = fg_pkg::ADDR_W,
  localparam int unsigned  CW       = fg_pkg::CNT_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [CW-1:0]                 cfg_groups,
  input  logic [CW-1:0]                 cfg_si_words,
  input  logic [AW-1:0]                 cfg_edge_base,
  input  logic [CW-1:0]                 cfg_max_iter,
  output logic                          done,
  output logic [CW-1:0]                 iterations,
  output logic [P-1:0]                  hdr_err,
  output fg_pkg::board_stats_t [P-1:0]  stats,
  // off-chip memory of each board
  output logic [P-1:0]                  mem_rd_valid,
  input  logic [P-1:0]                  mem_rd_ready,
  output logic [P-1:0][AW-1:0]          mem_rd_addr,
  input  logic [P-1:0]                  mem_rsp_valid,
  output logic [P-1:0]                  mem_rsp_ready,
  input  logic [P-1:0][MEM_W-1:0]       mem_rsp_data,
  output logic [P-1:0]                  mem_wr_valid,
  input  logic [P-1:0]                  mem_wr_ready,
  output logic [P-1:0][AW-1:0]          mem_wr_addr,
  output logic [P-1:0][MEM_W-1:0]       mem_wr_data
);
  import fg_pkg::*;

  logic [P-1:0]              l_valid;                       // link b: from board b to b+1
  pkt_meta_t [P-1:0]         l_meta;
  logic [P-1:0][MEM_W-1:0]   l_data;
  logic [P-1:0]              in_space1, in_space2;          // of board b's input
  logic [P-1:0]              comp_done, b_done;
  logic [P-1:0][CW-1:0]      b_iter;

  for (genvar b = 0; b < P; b++) begin : g_board
    localparam int unsigned PREV = (b + P - 1) % P;
    localparam int unsigned NEXT = (b + 1) % P;

    fg_board #(.P(P), .QMAX(QMAX), .K(K), .VW(VW), .DEPTH(DEPTH), .MEM_W(MEM_W),
               .ALGO(ALGO)) u_board (
      .clk, .rst_n, .board_id(8'(b)),
      .start, .cfg_groups, .cfg_si_words, .cfg_edge_base, .cfg_max_iter,
      .done(b_done[b]), .iterations(b_iter[b]), .hdr_err(hdr_err[b]), .stats(stats[b]),
      .mem_rd_valid(mem_rd_valid[b]), .mem_rd_ready(mem_rd_ready[b]),
      .mem_rd_addr(mem_rd_addr[b]),
      .mem_rsp_valid(mem_rsp_valid[b]), .mem_rsp_ready(mem_rsp_ready[b]),
      .mem_rsp_data(mem_rsp_data[b]),
      .mem_wr_valid(mem_wr_valid[b]), .mem_wr_ready(mem_wr_ready[b]),
      .mem_wr_addr(mem_wr_addr[b]), .mem_wr_data(mem_wr_data[b]),
      .link_in_valid(l_valid[PREV]), .link_in_meta(l_meta[PREV]),
      .link_in_data(l_data[PREV]),
      .link_in_space1(in_space1[b]), .link_in_space2(in_space2[b]),
      .link_out_valid(l_valid[b]), .link_out_meta(l_meta[b]), .link_out_data(l_data[b]),
      .link_out_space1(in_space1[NEXT]), .link_out_space2(in_space2[NEXT]),
      .comp_done(comp_done[b]), .all_comp_done(&comp_done)
    );
  end

  assign done       = &b_done;
  assign iterations = b_iter[0];
endmodule
