// dram_model: behavioural model of one board's off-chip memory and its controller, for
// simulation only (not synthesizable).
//
// Word-addressed, MEM_W bits per word, stored sparsely; a word never written reads as
// FILL. Reads are accepted while fewer than QDEPTH are in flight and return in order LAT
// cycles later (data is read when the word is presented, so earlier writes are seen);
// rsp_valid holds until rsp_ready. Writes complete on acceptance. When STALL_PCT > 0 the
// model refuses writes and read requests at random in that share of cycles, to exercise
// back-pressure. poke/peek give the testbench direct access to the contents.
module dram_model #(
  parameter int unsigned MEM_W     = 1024,
  parameter int unsigned AW        = 32,
  parameter int unsigned LAT       = 8,
  parameter int unsigned QDEPTH    = 16,
  parameter int unsigned STALL_PCT = 0,
  parameter logic [MEM_W-1:0] FILL = '1
) (
  input  logic             clk,
  input  logic             rd_valid,
  output logic             rd_ready,
  input  logic [AW-1:0]    rd_addr,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output logic [MEM_W-1:0] rsp_data,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [AW-1:0]    wr_addr,
  input  logic [MEM_W-1:0] wr_data
);
  logic [MEM_W-1:0] mem [logic [AW-1:0]];
  logic [AW-1:0]    q_addr [$];
  longint           q_time [$];
  longint           cyc = 0;
  int unsigned      reads = 0, writes = 0;

  function automatic void poke(logic [AW-1:0] a, logic [MEM_W-1:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [MEM_W-1:0] peek(logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : FILL;
  endfunction

  // All outputs are registered, so the board sees the state before each clock edge.
  initial begin
    rd_ready  = 1'b0;
    wr_ready  = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    automatic bit take_rsp = rsp_valid && rsp_ready;
    automatic bit take_rd  = rd_valid && rd_ready;
    automatic bit take_wr  = wr_valid && wr_ready;
    automatic bit stall_r  = (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
    automatic bit stall_w  = (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
    cyc++;
    if (take_rsp) begin
      void'(q_addr.pop_front());
      void'(q_time.pop_front());
    end
    if (take_rd) begin
      q_addr.push_back(rd_addr);
      q_time.push_back(cyc + longint'(LAT));
      reads++;
    end
    if (take_wr) begin
      mem[wr_addr] = wr_data;
      writes++;
    end
    rd_ready  <= !stall_r && (q_addr.size() < QDEPTH);
    wr_ready  <= !stall_w;
    rsp_valid <= (q_time.size() != 0) && (q_time[0] <= cyc);
    rsp_data  <= (q_addr.size() != 0) ? peek(q_addr[0]) : '0;
  end
endmodule
