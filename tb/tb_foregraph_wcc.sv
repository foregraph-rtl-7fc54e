// tb_foregraph_wcc: end-to-end connected-components (WCC) run on the multi-board system.
//
// The top is built for WCC: 32-bit vertex values and the minimum-label update rule. Four
// boards of 4 PEs (128-bit memory words, 64-vertex sub-interval buffers, 2 source groups)
// label a sparse random graph of 500 vertices and 350 undirected edges, each stored as two
// directed edges. Every vertex starts with its own number as label. When the system reports
// done, every interval copy in every board's memory must hold the smallest vertex number of
// the vertex's component, computed by the reference in graph_image. The test also checks
// that the graph has several components, that no segment header mismatched, and that every
// packet sent reached the three other boards.
// The 32-bit values follow the reference WCC configuration; the board and PE counts are
// reduced so the run takes seconds.
module tb_foregraph_wcc;
  import fg_pkg::*;
  import fg_tb_pkg::*;

  localparam int unsigned P = 4, K = 4, QMAX = 8, DEPTH = 64, MEM_W = 128, VW = 32;
  localparam int unsigned AW = ADDR_W, CW = CNT_W;
  localparam int unsigned GROUPS = 2, SIW = 4, NV = 500, NE = 350;
  localparam int unsigned SI_WORDS = DEPTH / (MEM_W / VW);
  localparam int unsigned WATCHDOG = 600000;

  typedef graph_image #(.P(P), .K(K), .QMAX(QMAX), .DEPTH(DEPTH), .MEM_W(MEM_W), .VW(VW)) img_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done;
  logic [CW-1:0] iterations;
  logic [P-1:0] hdr_err;
  board_stats_t [P-1:0] stats;
  logic [P-1:0] mem_rd_valid, mem_rd_ready, mem_rsp_valid, mem_rsp_ready;
  logic [P-1:0] mem_wr_valid, mem_wr_ready;
  logic [P-1:0][AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [P-1:0][MEM_W-1:0] mem_rsp_data, mem_wr_data;

  int checks = 0, failures = 0;
  img_t gi;
  bit img_ready = 0, check_now = 0;
  int board_checked = 0;

  always #5 clk = ~clk;

  foregraph_top #(.P(P), .QMAX(QMAX), .K(K), .VW(VW), .DEPTH(DEPTH), .MEM_W(MEM_W),
                  .ALGO(ALGO_WCC)) dut (
    .clk, .rst_n, .start,
    .cfg_groups(CW'(GROUPS)), .cfg_si_words(CW'(SIW)), .cfg_edge_base(AW'(P * QMAX * SI_WORDS)),
    .cfg_max_iter(CW'(200)),
    .done, .iterations, .hdr_err, .stats,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data
  );

  for (genvar b = 0; b < P; b++) begin : g_mem
    dram_model #(.MEM_W(MEM_W), .AW(AW), .LAT(5), .STALL_PCT(5)) u_dram (
      .clk,
      .rd_valid(mem_rd_valid[b]), .rd_ready(mem_rd_ready[b]), .rd_addr(mem_rd_addr[b]),
      .rsp_valid(mem_rsp_valid[b]), .rsp_ready(mem_rsp_ready[b]), .rsp_data(mem_rsp_data[b]),
      .wr_valid(mem_wr_valid[b]), .wr_ready(mem_wr_ready[b]), .wr_addr(mem_wr_addr[b]),
      .wr_data(mem_wr_data[b])
    );
    initial begin
      wait (img_ready);
      foreach (gi.img_addr[b][i]) u_dram.poke(gi.img_addr[b][i], gi.img_data[b][i]);
    end
    initial begin
      wait (check_now);
      for (int unsigned x = 0; x < P; x++)
        for (int unsigned si = 0; si < GROUPS * K; si++)
          for (int unsigned r = 0; r < SIW; r++) begin
            logic [MEM_W-1:0] got, exp;
            got = u_dram.peek(gi.vaddr(x, si, r));
            exp = gi.vword(x, si, r, gi.expect_val);
            checks++;
            if (got !== exp) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH board %0d interval %0d si %0d word %0d", b, x, si, r);
            end
          end
      board_checked++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ptx = 0, prx = 0;
    int unsigned comps = 0, changed_lbl = 0;
    gi = new(NV, NE, GROUPS, SIW, 0);
    gi.use_wcc();
    gi.reference();
    gi.build();
    foreach (gi.expect_val[v]) begin
      if (gi.expect_val[v] == VW'(v)) comps++;
      else changed_lbl++;
    end
    $display("%0d components, %0d vertices relabelled", comps, changed_lbl);
    img_ready = 1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    wait (done);
    @(posedge clk);
    $display("done after %0d iterations", iterations);
    check_now = 1;
    wait (board_checked == P);
    for (int b = 0; b < P; b++) begin
      checks++;
      if (hdr_err[b]) begin failures++; $display("header error on board %0d", b); end
      ptx += stats[b].pkts_tx; prx += stats[b].pkts_rx;
    end
    checks++;
    if (prx != ptx * (P - 1) || ptx == 0) begin
      failures++; $display("packets sent %0d received %0d", ptx, prx);
    end
    // the run must be non-trivial: several components, many labels changed
    checks++;
    if (comps < 2 || changed_lbl == 0) begin
      failures++; $display("graph too simple for the test");
    end
    checks++;
    if (iterations < 2 || iterations >= 200) begin
      failures++; $display("unexpected iteration count %0d", iterations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
