// edge_fifo: the edge buffer of a PE, a first-word-fall-through FIFO.
//
// The dispatcher pushes at most one edge per memory word into each PE; the PE pops one
// edge per cycle, so the buffer only absorbs short bursts. dout shows the oldest entry
// while empty is low. push while full and pop while empty are ignored (and flagged by
// assertions). Depth and the FIFO form are this design's choice; the document only says
// each PE has an edge buffer that is filled sequentially from off-chip memory.
module edge_fifo #(
  parameter int unsigned W     = fg_pkg::EDGE_W,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [PW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  assign dout  = mem[rp];
  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
