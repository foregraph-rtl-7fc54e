// vertex_buffer: on-chip store for one sub-interval of vertex values (source or destination
// buffer of a PE).
//
// It is a dual-port BRAM organised as rows of VPW values. Loading from and writing back to
// off-chip memory use whole rows (wide ports); edge processing uses single values (narrow
// ports): one read and one write per cycle. Wide and narrow accesses belong to different
// phases, so at any time at most two ports are busy, as in a true dual-port BRAM. Reads are
// synchronous: data appears the cycle after the enable and holds until the next enable. A
// read and a write of the same location in one cycle return the old value.
// The document specifies dual-port BRAM buffers; the row organisation is this design's choice.
module vertex_buffer #(
  parameter int unsigned VW    = fg_pkg::VAL_W,
  parameter int unsigned DEPTH = fg_pkg::SI_DEPTH,
  parameter int unsigned VPW   = fg_pkg::MEM_W / fg_pkg::VAL_W,
  localparam int unsigned ROWS = DEPTH / VPW,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  // wide write (load from memory)
  input  logic                  ww_en,
  input  logic [RW-1:0]         ww_row,
  input  logic [VPW-1:0][VW-1:0] ww_data,
  // wide read (write-back)
  input  logic                  wr_en,
  input  logic [RW-1:0]         wr_row,
  output logic [VPW-1:0][VW-1:0] wr_data,
  // narrow read
  input  logic                  nr_en,
  input  logic [AW-1:0]         nr_addr,
  output logic [VW-1:0]         nr_data,
  // narrow write
  input  logic                  nw_en,
  input  logic [AW-1:0]         nw_addr,
  input  logic [VW-1:0]         nw_data
);
  localparam int unsigned LW = (VPW > 1) ? $clog2(VPW) : 1;

  logic [VPW-1:0][VW-1:0] mem [ROWS];

  function automatic logic [RW-1:0] row_of(logic [AW-1:0] a);
    return RW'(a / VPW);
  endfunction
  function automatic logic [LW-1:0] lane_of(logic [AW-1:0] a);
    return LW'(a % VPW);
  endfunction

  always_ff @(posedge clk) begin
    if (ww_en)      mem[ww_row] <= ww_data;
    else if (nw_en) mem[row_of(nw_addr)][lane_of(nw_addr)] <= nw_data;
  end

  always_ff @(posedge clk) begin
    if (wr_en) wr_data <= mem[wr_row];
    if (nr_en) nr_data <= mem[row_of(nr_addr)][lane_of(nr_addr)];
  end

  // A wide load and an edge update never overlap.
  a_no_port_clash: assert property (@(posedge clk) !(ww_en && nw_en));
endmodule
