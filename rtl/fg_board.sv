// fg_board: the processing logic of one FPGA board. It updates the board's own interval of
// the graph from every interval in turn, then exchanges updated sub-intervals with the
// other boards, and repeats until no board updates anything or cfg_max_iter iterations ran.
//
// Inside: K processing elements (pe), the dispatcher that feeds them from off-chip memory,
// the merge unit that combines their destination copies at write-back, the scheduler
// (destination-first replacement, edge streaming, block skipping), the update bitmap, the
// data controller (packing and unpacking of exchanged sub-intervals) and the ring node
// (interconnect_ctrl). The off-chip memory controller is outside: mem_* is a plain
// request port (address/valid/ready for reads and writes, in-order read data with
// valid/ready), one memory word per transfer.
// Iteration control: COMPUTE (scheduler), then comp_done is raised and the board waits for
// all_comp_done (AND of all boards, formed outside), so that no packet reaches a board
// still computing; then EXCHANGE (data controller) until every other board's END packet
// has arrived. Each board sees every board's "updated" flag, so all boards take the same
// decision to go on or stop. start is a one-cycle pulse; done holds until the next start.
// The block structure follows the document's on-chip processing logic (Section 3.1); the
// iteration barrier and the control handshakes are this design's choices.
module fg_board #(
  parameter int unsigned   P        = fg_pkg::N_BOARDS,
  parameter int unsigned   QMAX     = fg_pkg::Q_MAX,
  parameter int unsigned   K        = fg_pkg::K_PE,
  parameter int unsigned   VW       = fg_pkg::VAL_W,
  parameter int unsigned   DEPTH    = fg_pkg::SI_DEPTH,
  parameter int unsigned   MEM_W    = fg_pkg::MEM_W,
  parameter int unsigned   EF_DEPTH = 16,
  parameter fg_pkg::algo_e ALGO     = fg_pkg::ALGO_BFS,
  localparam int unsigned  AW       = fg_pkg::ADDR_W,
  localparam int unsigned  CW       = fg_pkg::CNT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           board_id,
  // host control
  input  logic                 start,
  input  logic [CW-1:0]        cfg_groups,
  input  logic [CW-1:0]        cfg_si_words,
  input  logic [AW-1:0]        cfg_edge_base,
  input  logic [CW-1:0]        cfg_max_iter,
  output logic                 done,
  output logic [CW-1:0]        iterations,
  output logic                 hdr_err,
  output fg_pkg::board_stats_t stats,
  // off-chip memory
  output logic                 mem_rd_valid,
  input  logic                 mem_rd_ready,
  output logic [AW-1:0]        mem_rd_addr,
  input  logic                 mem_rsp_valid,
  output logic                 mem_rsp_ready,
  input  logic [MEM_W-1:0]     mem_rsp_data,
  output logic                 mem_wr_valid,
  input  logic                 mem_wr_ready,
  output logic [AW-1:0]        mem_wr_addr,
  output logic [MEM_W-1:0]     mem_wr_data,
  // ring
  input  logic                 link_in_valid,
  input  fg_pkg::pkt_meta_t    link_in_meta,
  input  logic [MEM_W-1:0]     link_in_data,
  output logic                 link_in_space1,
  output logic                 link_in_space2,
  output logic                 link_out_valid,
  output fg_pkg::pkt_meta_t    link_out_meta,
  output logic [MEM_W-1:0]     link_out_data,
  input  logic                 link_out_space1,
  input  logic                 link_out_space2,
  // iteration barrier
  output logic                 comp_done,
  input  logic                 all_comp_done
);
  import fg_pkg::*;

  localparam int unsigned VPW  = MEM_W / VW;
  localparam int unsigned ROWS = DEPTH / VPW;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned NW   = $clog2(P * QMAX);

  typedef enum logic [2:0] {B_IDLE, B_INIT, B_ITER, B_COMP, B_SYNC, B_EXCH, B_DECIDE} bstate_e;
  bstate_e bstate;

  logic [31:0] st_src_loads, st_dst_steps, st_skipped_grps, st_empty_segs, st_edge_words;
  logic [31:0] st_pkts_tx, st_pkts_rx, st_null_edges;

  assign stats = '{src_loads: st_src_loads, dst_steps: st_dst_steps,
                   skipped_grps: st_skipped_grps, empty_segs: st_empty_segs,
                   edge_words: st_edge_words, null_edges: st_null_edges,
                   pkts_tx: st_pkts_tx, pkts_rx: st_pkts_rx};

  // ---------------- scheduler ----------------
  logic               sch_start, sch_done, sch_updated;
  logic               sch_rd_valid, sch_rd_ready;
  logic [AW-1:0]      sch_rd_addr;
  disp_mode_e         d_mode;
  logic               d_restart;
  logic [KW-1:0]      d_src_pe;
  logic               d_mem_valid, d_mem_ready;
  logic               hdr_valid;
  seg_hdr_t           hdr;
  logic               clear_changed, wb_en;
  logic [RW-1:0]      wb_row;
  logic               sch_wr_valid, sch_wr_ready;
  logic [AW-1:0]      sch_wr_addr;
  logic [MEM_W-1:0]   sch_wr_data;
  logic [NW-1:0]      grp_base, local_idx, q_idx, remote_idx;
  logic               grp_active, set_local, set_remote, q_cur;

  // ---------------- PEs ----------------
  logic [K-1:0]                   src_ld_en;
  logic                           dst_ld_en;
  logic [RW-1:0]                  ld_row;
  logic [VPW-1:0][VW-1:0]         ld_data;
  logic [K-1:0]                   e_valid, e_ready, pe_idle, pe_changed;
  edge_t [K-1:0]                  e_data;
  logic [K-1:0][VPW-1:0][VW-1:0]  pe_wb;
  logic [VPW-1:0][VW-1:0]         merged;

  for (genvar p = 0; p < K; p++) begin : g_pe
    pe #(.VW(VW), .DEPTH(DEPTH), .VPW(VPW), .EF_DEPTH(EF_DEPTH), .ALGO(ALGO)) u_pe (
      .clk, .rst_n,
      .src_ld_en(src_ld_en[p]), .ld_row, .ld_data,
      .dst_ld_en, .clear_changed,
      .e_valid(e_valid[p]), .e_data(e_data[p]), .e_ready(e_ready[p]),
      .wb_en, .wb_row, .wb_data(pe_wb[p]),
      .idle(pe_idle[p]), .changed(pe_changed[p])
    );
  end

  merge_unit #(.K(K), .VW(VW), .VPW(VPW)) u_merge (.rows_in(pe_wb), .row_out(merged));

  dispatcher #(.K(K), .VW(VW), .MEM_W(MEM_W), .DEPTH(DEPTH)) u_disp (
    .clk, .rst_n, .mode(d_mode), .restart(d_restart), .src_pe(d_src_pe),
    .mem_valid(d_mem_valid), .mem_data(mem_rsp_data), .mem_ready(d_mem_ready),
    .src_ld_en, .dst_ld_en, .ld_row, .ld_data,
    .e_valid, .e_data, .e_ready,
    .hdr_valid, .hdr
  );

  scheduler #(.P(P), .QMAX(QMAX), .K(K), .VW(VW), .DEPTH(DEPTH), .MEM_W(MEM_W)) u_sched (
    .clk, .rst_n, .start(sch_start), .done(sch_done), .updated(sch_updated),
    .board_id, .cfg_groups, .cfg_si_words, .cfg_edge_base,
    .rd_valid(sch_rd_valid), .rd_ready(sch_rd_ready), .rd_addr(sch_rd_addr),
    .rsp_taken(d_mem_valid && d_mem_ready),
    .mode(d_mode), .restart(d_restart), .src_pe(d_src_pe), .hdr_valid, .hdr,
    .clear_changed, .wb_en, .wb_row,
    .pe_idle_all(&pe_idle), .pe_changed_any(|pe_changed), .wb_merged(merged),
    .wr_valid(sch_wr_valid), .wr_ready(sch_wr_ready), .wr_addr(sch_wr_addr),
    .wr_data(sch_wr_data),
    .grp_base, .grp_active, .set_local, .local_idx,
    .hdr_err,
    .st_src_loads(st_src_loads), .st_dst_steps(st_dst_steps),
    .st_skipped_grps(st_skipped_grps), .st_empty_segs(st_empty_segs),
    .st_edge_words(st_edge_words)
  );

  // ---------------- data controller and ring node ----------------
  logic             dc_start, dc_done, dc_remote_upd;
  logic             dc_rd_valid, dc_rd_ready, dc_rsp_valid, dc_rsp_ready;
  logic [AW-1:0]    dc_rd_addr;
  logic             dc_wr_valid, dc_wr_ready;
  logic [AW-1:0]    dc_wr_addr;
  logic [MEM_W-1:0] dc_wr_data;
  logic             tx_valid, tx_ready, rx_valid, rx_ready;
  pkt_meta_t        tx_meta, rx_meta;
  logic [MEM_W-1:0] tx_data, rx_data;
  logic             upd_flag;

  data_controller #(.P(P), .QMAX(QMAX), .K(K), .VW(VW), .DEPTH(DEPTH), .MEM_W(MEM_W)) u_dc (
    .clk, .rst_n, .start(dc_start), .done(dc_done), .board_id, .cfg_groups, .cfg_si_words,
    .local_upd(upd_flag), .remote_upd(dc_remote_upd),
    .rd_valid(dc_rd_valid), .rd_ready(dc_rd_ready), .rd_addr(dc_rd_addr),
    .rsp_valid(dc_rsp_valid), .rsp_ready(dc_rsp_ready), .rsp_data(mem_rsp_data),
    .wr_valid(dc_wr_valid), .wr_ready(dc_wr_ready), .wr_addr(dc_wr_addr), .wr_data(dc_wr_data),
    .q_idx, .q_cur, .set_remote, .remote_idx,
    .tx_valid, .tx_ready, .tx_meta, .tx_data,
    .rx_valid, .rx_ready, .rx_meta, .rx_data,
    .st_pkts_tx(st_pkts_tx), .st_pkts_rx(st_pkts_rx)
  );

  interconnect_ctrl #(.DW(MEM_W)) u_net (
    .clk, .rst_n, .board_id,
    .tx_valid, .tx_ready, .tx_meta, .tx_data,
    .rx_valid, .rx_ready, .rx_meta, .rx_data,
    .in_valid(link_in_valid), .in_meta(link_in_meta), .in_data(link_in_data),
    .in_space1(link_in_space1), .in_space2(link_in_space2),
    .out_valid(link_out_valid), .out_meta(link_out_meta), .out_data(link_out_data),
    .out_space1(link_out_space1), .out_space2(link_out_space2)
  );

  // ---------------- update bitmap ----------------
  logic bm_init, bm_advance;

  update_bitmap #(.P(P), .QMAX(QMAX), .K(K)) u_bitmap (
    .clk, .rst_n, .init(bm_init), .advance(bm_advance),
    .set_local, .local_idx, .set_remote, .remote_idx,
    .grp_base, .grp_active, .q_idx, .q_cur
  );

  // ---------------- memory port sharing ----------------
  // The scheduler owns the memory in COMPUTE, the data controller in EXCHANGE. Received
  // packets are written only in EXCHANGE because of the barrier.
  wire exch = (bstate == B_EXCH);

  assign mem_rd_valid  = exch ? dc_rd_valid : sch_rd_valid;
  assign mem_rd_addr   = exch ? dc_rd_addr  : sch_rd_addr;
  assign sch_rd_ready  = !exch && mem_rd_ready;
  assign dc_rd_ready   = exch && mem_rd_ready;
  assign d_mem_valid   = !exch && mem_rsp_valid;
  assign dc_rsp_valid  = exch && mem_rsp_valid;
  assign mem_rsp_ready = exch ? dc_rsp_ready : d_mem_ready;
  assign mem_wr_valid  = exch ? dc_wr_valid : sch_wr_valid;
  assign mem_wr_addr   = exch ? dc_wr_addr  : sch_wr_addr;
  assign mem_wr_data   = exch ? dc_wr_data  : sch_wr_data;
  assign sch_wr_ready  = !exch && mem_wr_ready;
  assign dc_wr_ready   = exch && mem_wr_ready;

  // null edges dropped by the dispatcher, for monitoring
  logic [31:0] null_cnt;
  always_comb begin
    int unsigned n;
    n = 0;
    if (d_mem_valid && d_mem_ready && d_mode == D_EDGE)
      for (int l = 0; l < MEM_W / EDGE_W; l++)
        if (mem_rsp_data[l*EDGE_W + IDX_W +: IDX_W] == NULL_IDX) n++;
    null_cnt = n;
  end

  // ---------------- iteration control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate <= B_IDLE; done <= 1'b0; iterations <= '0; upd_flag <= 1'b0;
      sch_start <= 1'b0; dc_start <= 1'b0; bm_init <= 1'b0; bm_advance <= 1'b0;
      st_null_edges <= '0;
    end else begin
      sch_start  <= 1'b0;
      dc_start   <= 1'b0;
      bm_init    <= 1'b0;
      bm_advance <= 1'b0;
      st_null_edges <= st_null_edges + null_cnt;
      unique case (bstate)
        B_IDLE: if (start) begin
          done <= 1'b0; iterations <= '0; bm_init <= 1'b1;
          bstate <= B_INIT;
        end
        B_INIT: begin
          bm_advance <= 1'b1;
          bstate <= B_ITER;
        end
        B_ITER: begin
          sch_start <= 1'b1;
          bstate <= B_COMP;
        end
        B_COMP: if (sch_done) begin
          upd_flag <= sch_updated;
          bstate <= B_SYNC;
        end
        B_SYNC: if (all_comp_done) begin
          dc_start <= 1'b1;
          bstate <= B_EXCH;
        end
        B_EXCH: if (dc_done && !dc_start) bstate <= B_DECIDE;
        B_DECIDE: begin
          iterations <= iterations + 1'b1;
          if ((upd_flag || dc_remote_upd) && iterations + 1'b1 < cfg_max_iter) begin
            bm_advance <= 1'b1;
            bstate <= B_ITER;
          end else begin
            done <= 1'b1;
            bstate <= B_IDLE;
          end
        end
        default: bstate <= B_IDLE;
      endcase
    end
  end

  assign comp_done = (bstate == B_SYNC);
endmodule
