// scheduler: runs one iteration of edge processing on a board with destination-first
// replacement (DFR) of sub-intervals.
//
// Off-chip memory holds every interval of the graph as sub-intervals of SI_WORDS words
// (the board's own interval and copies of the others), followed by the edge stream. The
// edge stream is a sequence of segments in the order (source interval x, source group g,
// destination sub-interval j). A segment starts with a seg_hdr_t word and holds the K
// sub-blocks SB(g*K+k -> j), k = 0..K-1, shuffled so that the k-th edge of each row of K
// edges belongs to PE k (NULL edges pad shorter sub-blocks).
// For every source group the scheduler loads the K source sub-intervals, one per PE, then
// for every destination sub-interval j: reads the segment header, loads sub-interval j into
// all PEs, streams the segment's edge words through the dispatcher, waits for the PEs to
// drain, and writes the merged destination rows back to memory. When a PE changed its copy
// the sub-interval is marked in the update bitmap. A source group none of whose
// sub-intervals changed in the previous iteration is skipped: only its headers are read to
// step over its edges. A segment with no edge words costs only its header.
// Run-time configuration: cfg_groups source groups per interval (Q = cfg_groups*K),
// cfg_si_words words per sub-interval, cfg_edge_base the first word of the edge stream.
// start is a one-cycle pulse; done is a one-cycle pulse; updated holds until the next start.
// DFR, the processing order and the skipping follow the document (Sections 3.3, 4.2, 4.3,
// Figure 8); the memory layout, the headers and the handshakes are this design's choices.
module scheduler #(
  parameter int unsigned P     = fg_pkg::N_BOARDS,
  parameter int unsigned QMAX  = fg_pkg::Q_MAX,
  parameter int unsigned K     = fg_pkg::K_PE,
  parameter int unsigned VW    = fg_pkg::VAL_W,
  parameter int unsigned DEPTH = fg_pkg::SI_DEPTH,
  parameter int unsigned MEM_W = fg_pkg::MEM_W,
  localparam int unsigned VPW      = MEM_W / VW,
  localparam int unsigned SI_WORDS = DEPTH / VPW,
  localparam int unsigned RW       = (SI_WORDS > 1) ? $clog2(SI_WORDS) : 1,
  localparam int unsigned KW       = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned NW       = $clog2(P * QMAX),
  localparam int unsigned AW       = fg_pkg::ADDR_W,
  localparam int unsigned CW       = fg_pkg::CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  done,
  output logic                  updated,
  input  logic [7:0]            board_id,
  input  logic [CW-1:0]         cfg_groups,
  input  logic [CW-1:0]         cfg_si_words,
  input  logic [AW-1:0]         cfg_edge_base,
  // memory read requests
  output logic                  rd_valid,
  input  logic                  rd_ready,
  output logic [AW-1:0]         rd_addr,
  input  logic                  rsp_taken,
  // dispatcher
  output fg_pkg::disp_mode_e    mode,
  output logic                  restart,
  output logic [KW-1:0]         src_pe,
  input  logic                  hdr_valid,
  input  fg_pkg::seg_hdr_t      hdr,
  // PEs
  output logic                  clear_changed,
  output logic                  wb_en,
  output logic [RW-1:0]         wb_row,
  input  logic                  pe_idle_all,
  input  logic                  pe_changed_any,
  input  logic [MEM_W-1:0]      wb_merged,
  // memory writes
  output logic                  wr_valid,
  input  logic                  wr_ready,
  output logic [AW-1:0]         wr_addr,
  output logic [MEM_W-1:0]      wr_data,
  // update bitmap
  output logic [NW-1:0]         grp_base,
  input  logic                  grp_active,
  output logic                  set_local,
  output logic [NW-1:0]         local_idx,
  // monitoring
  output logic                  hdr_err,
  output logic [31:0]           st_src_loads,
  output logic [31:0]           st_dst_steps,
  output logic [31:0]           st_skipped_grps,
  output logic [31:0]           st_empty_segs,
  output logic [31:0]           st_edge_words
);
  import fg_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_GRP, S_SRC_REQ, S_SRC_WAIT, S_HDR_REQ, S_HDR_WAIT, S_DST_REQ, S_DST_WAIT,
    S_EDGE_REQ, S_EDGE_WAIT, S_WB_RD, S_WB_WR, S_STEP_END, S_NEXT_J, S_NEXT_G
  } state_e;

  state_e        state;
  logic [7:0]    x;          // source interval
  logic [CW-1:0] g;          // source group
  logic [CW-1:0] j;          // destination sub-interval
  logic [KW-1:0] k;          // PE being loaded
  logic          skip;       // current group is skipped
  logic [AW-1:0] eptr;       // next header in the edge stream
  logic [31:0]   nwords;     // edge words of the current segment
  logic [AW-1:0] req_addr;
  logic [31:0]   req_left;
  logic [31:0]   outstanding;
  logic [CW-1:0] row;

  function automatic logic [AW-1:0] vaddr(logic [7:0] ix, logic [CW-1:0] si);
    return AW'((int'(ix) * QMAX + int'(si)) * SI_WORDS);
  endfunction

  wire issue = rd_valid && rd_ready;
  wire [CW-1:0] q_total = CW'(int'(cfg_groups) * K);

  assign rd_valid = (state == S_SRC_REQ || state == S_HDR_REQ || state == S_DST_REQ ||
                     state == S_EDGE_REQ) && req_left != 0;
  assign rd_addr  = req_addr;
  assign src_pe   = k;
  assign grp_base = NW'(int'(x) * QMAX + int'(g) * K);
  assign wb_en    = (state == S_WB_RD);
  assign wb_row   = RW'(row);
  assign wr_valid = (state == S_WB_WR);
  assign wr_addr  = vaddr(board_id, j) + AW'(row);
  assign wr_data  = wb_merged;
  assign set_local = (state == S_STEP_END) && pe_changed_any;
  assign local_idx = NW'(int'(board_id) * QMAX + int'(j));

  always_comb begin
    unique case (state)
      S_SRC_REQ,  S_SRC_WAIT:  mode = D_SRC;
      S_HDR_REQ,  S_HDR_WAIT:  mode = D_HDR;
      S_DST_REQ,  S_DST_WAIT:  mode = D_DST;
      S_EDGE_REQ, S_EDGE_WAIT: mode = D_EDGE;
      default:                 mode = D_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x <= '0; g <= '0; j <= '0; k <= '0; skip <= 1'b0;
      eptr <= '0; nwords <= '0; req_addr <= '0; req_left <= '0; outstanding <= '0;
      row <= '0; done <= 1'b0; updated <= 1'b0; restart <= 1'b0; clear_changed <= 1'b0;
      hdr_err <= 1'b0;
      st_src_loads <= '0; st_dst_steps <= '0; st_skipped_grps <= '0; st_empty_segs <= '0;
      st_edge_words <= '0;
    end else begin
      done          <= 1'b0;
      restart       <= 1'b0;
      clear_changed <= 1'b0;
      outstanding   <= outstanding + 32'(issue) - 32'(rsp_taken);
      if (issue) begin
        req_addr <= req_addr + 1'b1;
        req_left <= req_left - 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          x <= '0; g <= '0; eptr <= cfg_edge_base; updated <= 1'b0;
          state <= S_GRP;
        end
        S_GRP: begin
          skip <= !grp_active;
          j    <= '0;
          k    <= '0;
          if (!grp_active) begin
            st_skipped_grps <= st_skipped_grps + 1'b1;
            state <= S_HDR_REQ;
            req_addr <= eptr; req_left <= 1; restart <= 1'b1;
          end else begin
            state <= S_SRC_REQ;
            req_addr <= vaddr(x, CW'(int'(g) * K)); req_left <= 32'(cfg_si_words);
            restart <= 1'b1;
          end
        end
        S_SRC_REQ: if (req_left == 1 && issue) state <= S_SRC_WAIT;
        S_SRC_WAIT: if (outstanding == 0) begin
          st_src_loads <= st_src_loads + 1'b1;
          if (int'(k) == K - 1) begin
            state <= S_HDR_REQ;
            req_addr <= eptr; req_left <= 1; restart <= 1'b1;
          end else begin
            k <= k + 1'b1;
            state <= S_SRC_REQ;
            req_addr <= vaddr(x, CW'(int'(g) * K + int'(k) + 1)); req_left <= 32'(cfg_si_words);
            restart <= 1'b1;
          end
        end
        S_HDR_REQ: if (req_left == 1 && issue) state <= S_HDR_WAIT;
        S_HDR_WAIT: if (hdr_valid) begin
          nwords <= hdr.nwords;
          if (hdr.magic != HDR_MAGIC || hdr.x != x || hdr.g != g || hdr.j != j) hdr_err <= 1'b1;
          if (skip || hdr.nwords == 0) begin
            if (!skip) st_empty_segs <= st_empty_segs + 1'b1;
            eptr  <= eptr + 1'b1 + AW'(hdr.nwords);
            state <= S_NEXT_J;
          end else begin
            state <= S_DST_REQ;
            req_addr <= vaddr(board_id, j); req_left <= 32'(cfg_si_words);
            restart <= 1'b1; clear_changed <= 1'b1;
          end
        end
        S_DST_REQ: if (req_left == 1 && issue) state <= S_DST_WAIT;
        S_DST_WAIT: if (outstanding == 0) begin
          state <= S_EDGE_REQ;
          req_addr <= eptr + 1'b1; req_left <= nwords;
          restart <= 1'b1;
        end
        S_EDGE_REQ: if (req_left == 1 && issue) state <= S_EDGE_WAIT;
        S_EDGE_WAIT: if (outstanding == 0 && pe_idle_all) begin
          st_edge_words <= st_edge_words + nwords;
          eptr  <= eptr + 1'b1 + AW'(nwords);
          row   <= '0;
          state <= S_WB_RD;
        end
        S_WB_RD: state <= S_WB_WR;
        S_WB_WR: if (wr_ready) begin
          if (row == cfg_si_words - 1'b1) state <= S_STEP_END;
          else begin
            row   <= row + 1'b1;
            state <= S_WB_RD;
          end
        end
        S_STEP_END: begin
          st_dst_steps <= st_dst_steps + 1'b1;
          if (pe_changed_any) updated <= 1'b1;
          state <= S_NEXT_J;
        end
        S_NEXT_J: begin
          if (j == q_total - 1'b1) state <= S_NEXT_G;
          else begin
            j <= j + 1'b1;
            state <= S_HDR_REQ;
            req_addr <= eptr; req_left <= 1; restart <= 1'b1;
          end
        end
        S_NEXT_G: begin
          if (g == cfg_groups - 1'b1) begin
            g <= '0;
            if (int'(x) == P - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              x <= x + 1'b1;
              state <= S_GRP;
            end
          end else begin
            g <= g + 1'b1;
            state <= S_GRP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cfg_fits: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (cfg_si_words != 0 && int'(cfg_si_words) <= SI_WORDS &&
               cfg_groups != 0 && int'(cfg_groups) * K <= QMAX));
endmodule
