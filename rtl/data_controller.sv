// data_controller: moves vertex data between this board's off-chip memory and the other
// boards during the exchange phase that closes every iteration.
//
// Send side: for each sub-interval of the board's own interval whose bit is set in the
// update bitmap (it changed in this iteration), it reads the sub-interval's words and packs
// each into a packet whose header carries the origin board, the sub-interval, the word
// offset and the last board on the ring that must receive it. After the data it sends one
// END packet carrying whether this board updated anything. Unchanged sub-intervals are not
// sent, because the receivers' copies are still valid.
// Receive side (always on): a DATA packet is written to the memory address of the origin's
// copy, computed from (origin, sub-interval, offset), and marks that sub-interval in the
// bitmap so that its blocks are processed in the next iteration. END packets are counted;
// done rises when this board's END is sent and END packets from all P-1 other boards have
// arrived, which on the in-order ring means all their data has arrived too. remote_upd
// tells whether any other board updated anything.
// start is a one-cycle pulse; done holds until the next start. With P = 1 there is nothing
// to exchange and done follows start at once.
// The document gives this block's role (packing data with memory address and target board
// ID, transmitting only updated vertex values); the packet format and the protocol are this
// design's choices.
module data_controller #(
  parameter int unsigned P     = fg_pkg::N_BOARDS,
  parameter int unsigned QMAX  = fg_pkg::Q_MAX,
  parameter int unsigned K     = fg_pkg::K_PE,
  parameter int unsigned VW    = fg_pkg::VAL_W,
  parameter int unsigned DEPTH = fg_pkg::SI_DEPTH,
  parameter int unsigned MEM_W = fg_pkg::MEM_W,
  localparam int unsigned VPW      = MEM_W / VW,
  localparam int unsigned SI_WORDS = DEPTH / VPW,
  localparam int unsigned NW       = $clog2(P * QMAX),
  localparam int unsigned AW       = fg_pkg::ADDR_W,
  localparam int unsigned CW       = fg_pkg::CNT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               done,
  input  logic [7:0]         board_id,
  input  logic [CW-1:0]      cfg_groups,
  input  logic [CW-1:0]      cfg_si_words,
  input  logic               local_upd,
  output logic               remote_upd,
  // memory reads (send side)
  output logic               rd_valid,
  input  logic               rd_ready,
  output logic [AW-1:0]      rd_addr,
  input  logic               rsp_valid,
  output logic               rsp_ready,
  input  logic [MEM_W-1:0]   rsp_data,
  // memory writes (receive side)
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [AW-1:0]      wr_addr,
  output logic [MEM_W-1:0]   wr_data,
  // update bitmap
  output logic [NW-1:0]      q_idx,
  input  logic               q_cur,
  output logic               set_remote,
  output logic [NW-1:0]      remote_idx,
  // to / from the interconnection controller
  output logic               tx_valid,
  input  logic               tx_ready,
  output fg_pkg::pkt_meta_t  tx_meta,
  output logic [MEM_W-1:0]   tx_data,
  input  logic               rx_valid,
  output logic               rx_ready,
  input  fg_pkg::pkt_meta_t  rx_meta,
  input  logic [MEM_W-1:0]   rx_data,
  // monitoring
  output logic [31:0]        st_pkts_tx,
  output logic [31:0]        st_pkts_rx
);
  import fg_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_CHK, T_SEND, T_END, T_DONE} tstate_e;

  tstate_e       tstate;
  logic [CW-1:0] j;
  logic [CW-1:0] req_cnt, rsp_cnt;
  logic [7:0]    ends;
  logic          sent_any_end;

  function automatic logic [AW-1:0] vaddr(logic [7:0] ix, logic [15:0] si);
    return AW'((int'(ix) * QMAX + int'(si)) * SI_WORDS);
  endfunction

  wire [CW-1:0] q_total = CW'(int'(cfg_groups) * K);
  wire [7:0]    last_hop = 8'((int'(board_id) + P - 1) % P);

  // ---------------- send side ----------------
  assign q_idx     = NW'(int'(board_id) * QMAX + int'(j));
  assign rd_valid  = (tstate == T_SEND) && req_cnt != cfg_si_words;
  assign rd_addr   = vaddr(board_id, 16'(j)) + AW'(req_cnt);

  always_comb begin
    tx_meta      = '0;
    tx_meta.origin = board_id;
    tx_meta.last   = last_hop;
    tx_data      = rsp_data;
    tx_valid     = 1'b0;
    rsp_ready    = 1'b0;
    if (tstate == T_SEND) begin
      tx_meta.kind = PKT_DATA;
      tx_meta.si   = 16'(j);
      tx_meta.off  = 16'(rsp_cnt);
      tx_valid     = rsp_valid;
      rsp_ready    = tx_ready;
    end else if (tstate == T_END) begin
      tx_meta.kind = PKT_END;
      tx_meta.upd  = local_upd;
      tx_valid     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE; j <= '0; req_cnt <= '0; rsp_cnt <= '0; st_pkts_tx <= '0;
    end else begin
      unique case (tstate)
        T_IDLE: if (start) begin
          j <= '0;
          tstate <= (P == 1) ? T_DONE : T_CHK;
        end
        T_CHK: begin
          req_cnt <= '0;
          rsp_cnt <= '0;
          if (q_cur)                 tstate <= T_SEND;
          else if (j == q_total - 1'b1) tstate <= T_END;
          else                       j <= j + 1'b1;
        end
        T_SEND: begin
          if (rd_valid && rd_ready) req_cnt <= req_cnt + 1'b1;
          if (rsp_valid && rsp_ready) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            st_pkts_tx <= st_pkts_tx + 1'b1;
            if (rsp_cnt == cfg_si_words - 1'b1) begin
              if (j == q_total - 1'b1) tstate <= T_END;
              else begin
                j <= j + 1'b1;
                tstate <= T_CHK;
              end
            end
          end
        end
        T_END:  if (tx_ready) tstate <= T_DONE;
        T_DONE: if (start) begin
          j <= '0;
          tstate <= (P == 1) ? T_DONE : T_CHK;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // ---------------- receive side ----------------
  wire rx_is_data = (rx_meta.kind == PKT_DATA);

  assign rx_ready   = rx_is_data ? wr_ready : 1'b1;
  assign wr_valid   = rx_valid && rx_is_data;
  assign wr_addr    = vaddr(rx_meta.origin, rx_meta.si) + AW'(rx_meta.off);
  assign wr_data    = rx_data;
  assign set_remote = rx_valid && rx_ready && rx_is_data;
  assign remote_idx = NW'(int'(rx_meta.origin) * QMAX + int'(rx_meta.si));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ends <= '0; remote_upd <= 1'b0; st_pkts_rx <= '0; sent_any_end <= 1'b0;
    end else begin
      if (start) begin
        ends <= '0;
        remote_upd <= 1'b0;
        sent_any_end <= 1'b0;
      end else begin
        if (rx_valid && rx_ready) begin
          if (rx_is_data) st_pkts_rx <= st_pkts_rx + 1'b1;
          else begin
            ends <= ends + 1'b1;
            if (rx_meta.upd) remote_upd <= 1'b1;
          end
        end
        if (tstate == T_END && tx_ready) sent_any_end <= 1'b1;
      end
    end
  end

  assign done = (tstate == T_DONE) && (P == 1 || (sent_any_end && int'(ends) == P - 1));

  a_end_count: assert property (@(posedge clk) disable iff (!rst_n) int'(ends) <= P - 1);
endmodule
