// tb_foregraph_full: end-to-end test of the system with every parameter at its default:
// four boards of 96 PEs, 65536-vertex sub-interval buffers, 1024-bit memory words and room
// for 192 sub-intervals per interval. The run-time configuration uses one source group
// (96 sub-intervals per interval) and one memory word (128 vertices) per sub-interval, and
// BFS runs on a random graph of 3000 vertices and 6000 edges laid out by graph_image. No
// edge ends in the last interval, so its source group is skipped after the first iteration. When the system reports done, every interval copy in every board's memory
// must hold the reference BFS depths. The test also counts the mechanisms the design is
// built from and fails if one never happened: destination-first replacement steps, source
// loads, skipped source groups, empty segments, NULL padding edges, packets exchanged,
// ring injections held back by flow control, and memory back-pressure.
module tb_foregraph_full;
  import fg_pkg::*;
  import fg_tb_pkg::*;

  localparam int unsigned P = N_BOARDS, K = K_PE, QMAX = Q_MAX, DEPTH = SI_DEPTH, VW = VAL_W;
  localparam int unsigned MEM_W = fg_pkg::MEM_W;
  localparam int unsigned AW = ADDR_W, CW = CNT_W;
  localparam int unsigned GROUPS = 1, SIW = 1, NV = 3000, NE = 6000;
  localparam int unsigned SI_WORDS = DEPTH / (MEM_W / VW);
  localparam int unsigned WATCHDOG = 3000000;

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
  int rsp_stalls = 0, inj_blocked = 0, wr_stalls = 0;
  img_t gi;
  bit img_ready = 0, check_now = 0;
  int board_checked = 0;

  always #5 clk = ~clk;

  foregraph_top dut (
    .clk, .rst_n, .start,
    .cfg_groups(CW'(GROUPS)), .cfg_si_words(CW'(SIW)), .cfg_edge_base(AW'(P * QMAX * SI_WORDS)),
    .cfg_max_iter(CW'(100)),
    .done, .iterations, .hdr_err, .stats,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data
  );

  for (genvar b = 0; b < P; b++) begin : g_mem
    dram_model #(.MEM_W(MEM_W), .AW(AW), .LAT(6 + b), .STALL_PCT(10)) u_dram (
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

  always @(posedge clk) begin
    for (int b = 0; b < P; b++) begin
      if (mem_rsp_valid[b] && !mem_rsp_ready[b]) rsp_stalls++;
      if (mem_wr_valid[b] && !mem_wr_ready[b]) wr_stalls++;
    end
  end
  // ring injections held back by flow control on board 0
  always @(posedge clk)
    if (dut.g_board[0].u_board.tx_valid && !dut.g_board[0].u_board.tx_ready) inj_blocked++;

  task automatic expect_seen(string what, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("MECHANISM NEVER SEEN: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dfr = 0, srcl = 0, skip = 0, empt = 0, nul = 0, ptx = 0, prx = 0;
    gi = new(NV, NE, GROUPS, SIW, 3);
    foreach (gi.ev[e])
      if ((gi.ev[e] % (P * GROUPS * K)) / (GROUPS * K) == P - 1) gi.ev[e] -= GROUPS * K;
    gi.reference();
    gi.build();
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
      dfr += stats[b].dst_steps;  srcl += stats[b].src_loads;
      skip += stats[b].skipped_grps; empt += stats[b].empty_segs;
      nul += stats[b].null_edges; ptx += stats[b].pkts_tx; prx += stats[b].pkts_rx;
    end
    // every packet sent reaches the P-1 other boards
    checks++;
    if (prx != ptx * (P - 1)) begin
      failures++; $display("packets sent %0d received %0d", ptx, prx);
    end
    checks++;
    if (iterations < 2 || iterations >= 100) begin
      failures++; $display("unexpected iteration count %0d", iterations);
    end
    expect_seen("DFR destination steps", dfr);
    expect_seen("source sub-interval loads", srcl);
    expect_seen("skipped source groups", skip);
    expect_seen("empty segments", empt);
    expect_seen("NULL edges dropped", nul);
    expect_seen("packets exchanged", ptx);
    expect_seen("ring injections held back", inj_blocked);
    expect_seen("memory back-pressure", rsp_stalls + wr_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
