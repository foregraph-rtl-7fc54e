// fg_pkg: types and constants shared by the graph-processing boards.
//
// Sizes follow the BFS configuration: 96 processing elements (PEs) per chip, 8-bit vertex
// values (BFS depth), 16-bit compressed vertex indexes, so a sub-interval holds at most
// 65535 vertices plus the reserved NULL index. The 1024-bit memory word is this design's
// choice: at 200 MHz it is the smallest power of two that carries the 19.2 GB/s of one DDR4
// channel. An edge is 32 bits, {source index, destination index}, both relative to their
// sub-interval. A NULL edge (source index all ones) pads shuffled rows and is dropped.
package fg_pkg;

  localparam int unsigned K_PE      = 96;     // PEs per chip (BFS)
  localparam int unsigned VAL_W     = 8;      // vertex value width (BFS depth)
  localparam int unsigned IDX_W     = 16;     // compressed vertex index width
  localparam int unsigned SI_DEPTH  = 65536;  // vertex slots per sub-interval buffer
  localparam int unsigned MEM_W     = 1024;   // off-chip memory word
  localparam int unsigned ADDR_W    = 32;     // word address width
  localparam int unsigned N_BOARDS  = 4;      // boards (twitter-2010 setup)
  localparam int unsigned Q_MAX     = 192;    // sub-intervals per interval supported
  localparam int unsigned CNT_W     = 16;     // width of the small run-time counters

  localparam logic [IDX_W-1:0] NULL_IDX = '1;

  typedef enum logic [0:0] {ALGO_BFS = 1'b0, ALGO_WCC = 1'b1} algo_e;

  typedef struct packed {
    logic [IDX_W-1:0] src;
    logic [IDX_W-1:0] dst;
  } edge_t;

  localparam int unsigned EDGE_W = $bits(edge_t);

  // Header word that opens every shuffled segment (K sub-blocks sharing a destination
  // sub-interval). Only the low 80 bits of the memory word are used.
  typedef struct packed {
    logic [7:0]  x;       // source interval (board that owns it)
    logic [15:0] j;       // destination sub-interval inside the local interval
    logic [15:0] g;       // source group: sub-intervals g*K .. g*K+K-1
    logic [31:0] nwords;  // edge words that follow the header
    logic [7:0]  magic;   // HDR_MAGIC
  } seg_hdr_t;

  localparam logic [7:0] HDR_MAGIC = 8'h5B;

  // What the dispatcher does with words returned by the memory.
  typedef enum logic [2:0] {
    D_IDLE = 3'd0, D_SRC = 3'd1, D_DST = 3'd2, D_EDGE = 3'd3, D_HDR = 3'd4
  } disp_mode_e;

  // Packet header on the inter-board ring. The data word travels beside it.
  typedef enum logic [0:0] {PKT_DATA = 1'b0, PKT_END = 1'b1} pkt_kind_e;

  typedef struct packed {
    pkt_kind_e   kind;
    logic [7:0]  origin;  // board whose interval this is
    logic [7:0]  last;    // last board on the ring that must receive it
    logic [15:0] si;      // sub-interval index inside the origin's interval
    logic [15:0] off;     // word offset inside the sub-interval
    logic        upd;     // END only: origin updated something this iteration
  } pkt_meta_t;

  // Event counters of one board, for monitoring and tests.
  typedef struct packed {
    logic [31:0] src_loads;     // source sub-intervals loaded into a PE
    logic [31:0] dst_steps;     // destination sub-interval replacements (DFR steps)
    logic [31:0] skipped_grps;  // source groups skipped (no update in previous iteration)
    logic [31:0] empty_segs;    // segments with no edge words
    logic [31:0] edge_words;    // edge words streamed to the PEs
    logic [31:0] null_edges;    // NULL padding edges dropped
    logic [31:0] pkts_tx;       // data packets sent to other boards
    logic [31:0] pkts_rx;       // data packets received from other boards
  } board_stats_t;

endpackage
