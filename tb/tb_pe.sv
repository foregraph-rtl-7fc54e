// tb_pe: loads a source and a destination sub-interval into one PE, streams random edges
// (many back-to-back edges to the same destination, to exercise forwarding) and compares
// the written-back destination copy with a sequential BFS relaxation of the same edges. It
// also checks the change flag and the rate: one edge per cycle, so N edges pushed on
// consecutive cycles leave the PE idle within N+3 cycles.
module tb_pe;
  import fg_pkg::*;
  localparam int unsigned VW = 8, DEPTH = 64, VPW = 8, ROWS = DEPTH / VPW;
  localparam int unsigned RW = $clog2(ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic src_ld_en = 0, dst_ld_en = 0, clear_changed = 0, e_valid = 0, wb_en = 0;
  logic [RW-1:0] ld_row = '0, wb_row = '0;
  logic [VPW-1:0][VW-1:0] ld_data = '0, wb_data;
  edge_t e_data = '0;
  logic e_ready, idle, changed;
  logic [VW-1:0] src_ref [DEPTH], dst_ref [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe #(.VW(VW), .DEPTH(DEPTH), .VPW(VPW), .EF_DEPTH(64), .ALGO(ALGO_BFS)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(bit is_src);
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      src_ld_en = is_src; dst_ld_en = !is_src; ld_row = RW'(r);
      for (int l = 0; l < VPW; l++) begin
        ld_data[l] = is_src ? VW'($urandom % 12) : VW'(($urandom % 3 == 0) ? 255 : $urandom % 20);
        if (is_src) src_ref[r*VPW+l] = ld_data[l]; else dst_ref[r*VPW+l] = ld_data[l];
      end
    end
    @(negedge clk); src_ld_en = 0; dst_ld_en = 0;
  endtask

  task automatic run_edges(int n, output bit any_change);
    int t0, t1;
    any_change = 0;
    @(negedge clk); clear_changed = 1;
    @(negedge clk); clear_changed = 0;
    t0 = $time;
    for (int i = 0; i < n; i++) begin
      edge_t ed;
      logic [VW-1:0] c;
      ed.src = IDX_W'($urandom % DEPTH);
      ed.dst = (i % 4 != 0) ? IDX_W'($urandom % 4) : IDX_W'($urandom % DEPTH);
      e_valid = 1; e_data = ed;
      c = (src_ref[ed.src] == '1) ? '1 : src_ref[ed.src] + 1'b1;
      if (c < dst_ref[ed.dst]) begin dst_ref[ed.dst] = c; any_change = 1; end
      @(negedge clk);
      chk(e_ready, "edge buffer accepted");
    end
    e_valid = 0;
    while (!idle) @(negedge clk);
    t1 = $time;
    chk((t1 - t0) / 10 <= n + 3, $sformatf("rate: %0d edges took %0d cycles", n, (t1 - t0) / 10));
  endtask

  task automatic check_wb();
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wb_en = 1; wb_row = RW'(r);
      @(negedge clk); wb_en = 0;
      for (int l = 0; l < VPW; l++)
        chk(wb_data[l] == dst_ref[r*VPW+l],
            $sformatf("vertex %0d got %0d expected %0d", r*VPW+l, wb_data[l], dst_ref[r*VPW+l]));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ch;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      load(1);
      load(0);
      run_edges(40 + 30 * round, ch);
      chk(changed == ch, "change flag");
      check_wb();
    end
    // read-after-write: fresh destinations, then for each one a good edge followed at once by
    // a worse one; only forwarding of the first write keeps the better value
    begin
      int lo, hi;
      lo = 0; hi = 0;
      for (int i = 0; i < DEPTH; i++) begin
        if (src_ref[i] < src_ref[lo]) lo = i;
        if (src_ref[i] > src_ref[hi]) hi = i;
      end
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk); dst_ld_en = 1; ld_row = RW'(r);
        for (int l = 0; l < VPW; l++) begin ld_data[l] = '1; dst_ref[r*VPW+l] = '1; end
      end
      @(negedge clk); dst_ld_en = 0;
      for (int d = 0; d < DEPTH; d++)
        for (int h = 0; h < 2; h++) begin
          edge_t ed;
          logic [VW-1:0] c;
          ed.src = IDX_W'(h == 0 ? lo : hi); ed.dst = IDX_W'(d);
          e_valid = 1; e_data = ed;
          c = src_ref[ed.src] + 1'b1;
          if (c < dst_ref[d]) dst_ref[d] = c;
          @(negedge clk);
        end
      e_valid = 0;
      while (!idle) @(negedge clk);
      check_wb();
    end
    // edges that cannot improve anything leave the flag clear
    load(0);
    for (int i = 0; i < DEPTH; i++) dst_ref[i] = dst_ref[i];
    @(negedge clk); clear_changed = 1;
    @(negedge clk); clear_changed = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); dst_ld_en = 1; ld_row = RW'(r);
      for (int l = 0; l < VPW; l++) begin ld_data[l] = '0; dst_ref[r*VPW+l] = '0; end
    end
    @(negedge clk); dst_ld_en = 0;
    run_edges(20, ch);
    chk(!ch && !changed, "no change when nothing improves");
    check_wb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
