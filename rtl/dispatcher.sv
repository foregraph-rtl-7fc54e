// dispatcher: routes words read from off-chip memory to the PEs.
//
// The scheduler sets `mode` before it requests a run of words and pulses `restart` at the
// start of each run. In D_SRC mode each word is one row of the source sub-interval of PE
// `src_pe`; in D_DST mode it is one row of the destination sub-interval, written into every
// PE's destination buffer; the row counter advances per word. In D_EDGE mode a word holds
// EPW edges of a shuffled segment: K consecutive edges belong to K different sub-blocks, so
// edge e of the segment goes to PE (e mod K). A lane pointer keeps the PE of the word's first
// edge across words. NULL edges (source index all ones) fill short sub-blocks and are
// dropped. In D_HDR mode the word is handed to the scheduler as a segment header.
// Handshake: a word is taken when mem_valid and mem_ready are both high; in D_EDGE mode
// mem_ready waits until every PE can take an edge. Everything is combinational except the
// row counter and the lane pointer.
// The mapping of shuffled edges to PEs follows the document (Section 4.2, Figure 7); the
// word widths and the mode interface are this design's choices.
module dispatcher #(
  parameter int unsigned K     = fg_pkg::K_PE,
  parameter int unsigned VW    = fg_pkg::VAL_W,
  parameter int unsigned MEM_W = fg_pkg::MEM_W,
  parameter int unsigned DEPTH = fg_pkg::SI_DEPTH,
  localparam int unsigned VPW  = MEM_W / VW,
  localparam int unsigned EPW  = MEM_W / fg_pkg::EDGE_W,
  localparam int unsigned ROWS = DEPTH / VPW,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fg_pkg::disp_mode_e     mode,
  input  logic                   restart,
  input  logic [KW-1:0]          src_pe,
  // memory read data
  input  logic                   mem_valid,
  input  logic [MEM_W-1:0]       mem_data,
  output logic                   mem_ready,
  // vertex loads
  output logic [K-1:0]           src_ld_en,
  output logic                   dst_ld_en,
  output logic [RW-1:0]          ld_row,
  output logic [VPW-1:0][VW-1:0] ld_data,
  // edges
  output logic [K-1:0]           e_valid,
  output fg_pkg::edge_t [K-1:0]  e_data,
  input  logic [K-1:0]           e_ready,
  // headers
  output logic                   hdr_valid,
  output fg_pkg::seg_hdr_t       hdr
);
  import fg_pkg::*;

  logic [KW-1:0] base;   // PE that receives lane 0 of the current edge word
  logic          take;
  edge_t [EPW-1:0] edges;

  assign edges   = mem_data[EPW*EDGE_W-1:0];
  assign ld_data = mem_data[VPW*VW-1:0];
  assign hdr     = mem_data[$bits(seg_hdr_t)-1:0];

  always_comb begin
    mem_ready = (mode == D_EDGE) ? &e_ready : (mode != D_IDLE);
    take      = mem_valid && mem_ready;
    src_ld_en = '0;
    dst_ld_en = take && mode == D_DST;
    if (take && mode == D_SRC) src_ld_en[src_pe] = 1'b1;
    hdr_valid = take && mode == D_HDR;
    e_valid   = '0;
    e_data    = '0;
    for (int l = 0; l < EPW; l++) begin
      int unsigned p;
      p = (int'(base) + l) % K;
      e_data[p] = edges[l];
      if (take && mode == D_EDGE && edges[l].src != NULL_IDX) e_valid[p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base   <= '0;
      ld_row <= '0;
    end else if (restart) begin
      base   <= '0;
      ld_row <= '0;
    end else if (take) begin
      if (mode == D_EDGE) base <= KW'((int'(base) + EPW) % K);
      if (mode == D_SRC || mode == D_DST) ld_row <= ld_row + 1'b1;
    end
  end

  // Each word carries at most one edge per PE.
  initial assert (EPW <= K) else $error("dispatcher: more edges per word than PEs");
endmodule
