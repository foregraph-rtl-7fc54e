// tb_fg_board: one board on its own (P = 1, its ring output looped back to its input)
// running BFS to convergence on a random graph. The board's single interval has three
// source groups of 8 sub-intervals, so the scheduler loads many source groups, replaces
// the destination sub-interval many times, skips groups that did not change and steps over
// empty segments. The final vertex values in memory must equal the reference BFS depths,
// the statistics must agree with what the memory layout contains, and each of those
// mechanisms must have happened. No edge ends in the last source group, so that group is
// skipped from the second iteration on.
module tb_fg_board;
  import fg_pkg::*;
  import fg_tb_pkg::*;

  localparam int unsigned P = 1, K = 8, QMAX = 32, DEPTH = 128, MEM_W = 256, VW = 8;
  localparam int unsigned AW = ADDR_W, CW = CNT_W;
  localparam int unsigned GROUPS = 3, SIW = 2, NV = 700, NE = 1400;
  localparam int unsigned SI_WORDS = DEPTH / (MEM_W / VW);

  typedef graph_image #(.P(P), .K(K), .QMAX(QMAX), .DEPTH(DEPTH), .MEM_W(MEM_W), .VW(VW)) img_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic done, hdr_err, comp_done;
  logic [CW-1:0] iterations;
  board_stats_t stats;
  logic rd_valid, rd_ready, rsp_valid, rsp_ready, wr_valid, wr_ready;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [MEM_W-1:0] rsp_data, wr_data;
  logic lv, s1, s2;
  pkt_meta_t lm;
  logic [MEM_W-1:0] ld;
  int checks = 0, failures = 0;
  int iter_skips [int];
  img_t gi;

  always #5 clk = ~clk;

  fg_board #(.P(P), .QMAX(QMAX), .K(K), .VW(VW), .DEPTH(DEPTH), .MEM_W(MEM_W)) dut (
    .clk, .rst_n, .board_id(8'd0), .start,
    .cfg_groups(CW'(GROUPS)), .cfg_si_words(CW'(SIW)),
    .cfg_edge_base(AW'(P * QMAX * SI_WORDS)), .cfg_max_iter(CW'(60)),
    .done, .iterations, .hdr_err, .stats,
    .mem_rd_valid(rd_valid), .mem_rd_ready(rd_ready), .mem_rd_addr(rd_addr),
    .mem_rsp_valid(rsp_valid), .mem_rsp_ready(rsp_ready), .mem_rsp_data(rsp_data),
    .mem_wr_valid(wr_valid), .mem_wr_ready(wr_ready), .mem_wr_addr(wr_addr),
    .mem_wr_data(wr_data),
    .link_in_valid(lv), .link_in_meta(lm), .link_in_data(ld),
    .link_in_space1(s1), .link_in_space2(s2),
    .link_out_valid(lv), .link_out_meta(lm), .link_out_data(ld),
    .link_out_space1(s1), .link_out_space2(s2),
    .comp_done, .all_comp_done(comp_done)
  );

  dram_model #(.MEM_W(MEM_W), .AW(AW), .LAT(5), .STALL_PCT(15)) u_dram (
    .clk, .rd_valid, .rd_ready, .rd_addr, .rsp_valid, .rsp_ready, .rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired: board %0d scheduler %0d", dut.bstate, dut.u_sched.state, " out=%0d idle=%b left=%0d nw=%0d", dut.u_sched.outstanding, dut.pe_idle, dut.u_sched.req_left, dut.u_sched.nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned active_grps_first;
    gi = new(NV, NE, GROUPS, SIW, 0);
    // no edge ends in the last source group, so its vertices never change and the group is
    // skipped from the second iteration on
    foreach (gi.ev[e])
      if ((gi.ev[e] % (GROUPS * K)) / K == GROUPS - 1) gi.ev[e] -= K;
    gi.reference();
    gi.build();
    foreach (gi.img_addr[0][i]) u_dram.poke(gi.img_addr[0][i], gi.img_data[0][i]);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // first iteration: nothing is skipped, every group is loaded
    wait (comp_done);
    chk(stats.skipped_grps == 0, "no group skipped in the first iteration");
    chk(stats.src_loads == GROUPS * K * P, $sformatf("source loads %0d", stats.src_loads));
    chk(stats.empty_segs == gi.n_empty_segs, $sformatf("empty segments %0d vs %0d",
        stats.empty_segs, gi.n_empty_segs));
    chk(stats.dst_steps == gi.n_segments - gi.n_empty_segs, "one DFR step per non-empty segment");
    chk(stats.edge_words == gi.n_edge_words, "every edge word streamed once");
    chk(stats.null_edges == gi.n_null_edges, $sformatf("NULL edges %0d vs %0d",
        stats.null_edges, gi.n_null_edges));
    wait (done);
    @(posedge clk);
    $display("done after %0d iterations, %0d groups skipped", iterations, stats.skipped_grps);
    for (int unsigned si = 0; si < GROUPS * K; si++)
      for (int unsigned r = 0; r < SIW; r++)
        chk(u_dram.peek(gi.vaddr(0, si, r)) === gi.vword(0, si, r, gi.expect_val),
            $sformatf("sub-interval %0d word %0d", si, r));
    chk(!hdr_err, "headers consistent");
    chk(stats.skipped_grps > 0, "some source groups skipped");
    chk(stats.pkts_tx == 0 && stats.pkts_rx == 0, "no packets with one board");
    chk(iterations >= 2 && iterations < 60, "converged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
