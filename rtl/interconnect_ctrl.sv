// interconnect_ctrl: one node of the unidirectional ring that joins the boards (a 2 x 2
// torus, as in the four-board setup, is a ring of four).
//
// Every packet is a broadcast: it enters the ring at its origin, is delivered to every
// other board and is dropped by the board named in its `last` field. Each node keeps a
// small input FIFO. The packet at the FIFO head is delivered to the local data controller
// and, unless this board is its last hop, forwarded to the next node in the same cycle;
// it leaves the FIFO only when both can take it. Local packets are injected only when the
// input FIFO is empty (through traffic has priority) and the next node has two free FIFO
// slots (bubble flow control), which keeps one slot free somewhere on the ring so that it
// cannot deadlock. The link signals are a valid with header and data one way and two
// registered space flags (>=1 and >=2 free slots) the other way, so no combinational path
// runs around the ring. The physical link (a serial transceiver) is not part of this block.
// The ring/torus topology and broadcast of updated intervals follow the document
// (Section 3.4); the flow control and packet handling are this design's choices.
module interconnect_ctrl #(
  parameter int unsigned DW     = fg_pkg::MEM_W,
  parameter int unsigned FDEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         board_id,
  // local injection
  input  logic               tx_valid,
  output logic               tx_ready,
  input  fg_pkg::pkt_meta_t  tx_meta,
  input  logic [DW-1:0]      tx_data,
  // local delivery
  output logic               rx_valid,
  input  logic               rx_ready,
  output fg_pkg::pkt_meta_t  rx_meta,
  output logic [DW-1:0]      rx_data,
  // ring input (from the previous node)
  input  logic               in_valid,
  input  fg_pkg::pkt_meta_t  in_meta,
  input  logic [DW-1:0]      in_data,
  output logic               in_space1,
  output logic               in_space2,
  // ring output (to the next node)
  output logic               out_valid,
  output fg_pkg::pkt_meta_t  out_meta,
  output logic [DW-1:0]      out_data,
  input  logic               out_space1,
  input  logic               out_space2
);
  import fg_pkg::*;
  localparam int unsigned PW = $clog2(FDEPTH);

  pkt_meta_t     f_meta [FDEPTH];
  logic [DW-1:0] f_data [FDEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;

  wire        empty    = (count == '0);
  wire        head_fwd = (f_meta[rp].last != board_id);
  logic       pop, inject;

  assign rx_meta   = f_meta[rp];
  assign rx_data   = f_data[rp];
  assign rx_valid  = !empty && (!head_fwd || out_space1);
  assign pop       = rx_valid && rx_ready;
  assign tx_ready  = empty && out_space2;
  assign inject    = tx_valid && tx_ready;
  assign out_valid = (pop && head_fwd) || inject;
  assign out_meta  = inject ? tx_meta : f_meta[rp];
  assign out_data  = inject ? tx_data : f_data[rp];
  assign in_space1 = (count < (PW+1)'(FDEPTH));
  assign in_space2 = (count < (PW+1)'(FDEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (in_valid) wp <= (wp == PW'(FDEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)      rp <= (rp == PW'(FDEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(in_valid) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      f_meta[wp] <= in_meta;
      f_data[wp] <= in_data;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_space1);
  a_no_self: assert property (@(posedge clk) disable iff (!rst_n)
    !empty |-> f_meta[rp].origin != board_id);
endmodule
