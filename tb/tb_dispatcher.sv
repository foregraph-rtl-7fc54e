// tb_dispatcher: checks the routing of memory words. Source rows go to the selected PE
// only, destination rows to all PEs, with the row counter restarting on `restart`. Edge
// words of a shuffled segment (K = 12 PEs, 8 edges per word, so the lane-to-PE mapping
// rotates) must reach PE (position mod K) in order, NULL edges dropped; a PE that cannot
// take an edge must stall the memory stream. Header words go to the scheduler.
module tb_dispatcher;
  import fg_pkg::*;
  localparam int unsigned K = 12, VW = 8, MEM_W = 256, DEPTH = 128;
  localparam int unsigned VPW = MEM_W / VW, EPW = MEM_W / EDGE_W, ROWS = DEPTH / VPW;
  localparam int unsigned RW = $clog2(ROWS), KW = $clog2(K);

  logic clk = 1'b0, rst_n = 1'b0;
  disp_mode_e mode = D_IDLE;
  logic restart = 0;
  logic [KW-1:0] src_pe = '0;
  logic mem_valid = 0, mem_ready;
  logic [MEM_W-1:0] mem_data = '0;
  logic [K-1:0] src_ld_en, e_valid, e_ready;
  logic dst_ld_en, hdr_valid;
  logic [RW-1:0] ld_row;
  logic [VPW-1:0][VW-1:0] ld_data;
  edge_t [K-1:0] e_data;
  seg_hdr_t hdr;
  edge_t exp_q [K][$];
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  dispatcher #(.K(K), .VW(VW), .MEM_W(MEM_W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_restart(disp_mode_e m);
    @(negedge clk); mode = m; restart = 1;
    @(negedge clk); restart = 0;
  endtask

  // watch the PE side during edge streaming
  always @(posedge clk) begin
    for (int p = 0; p < K; p++)
      if (e_valid[p]) begin
        checks++;
        if (exp_q[p].size() == 0 || e_data[p] !== exp_q[p][0]) begin
          failures++;
          $display("FAIL PE %0d got edge %h", p, e_data[p]);
        end else void'(exp_q[p].pop_front());
      end
    if (mode == D_EDGE && mem_valid && !mem_ready) stalls++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // source rows to PE 5
    src_pe = 5;
    pulse_restart(D_SRC);
    for (int r = 0; r < ROWS; r++) begin
      mem_valid = 1; mem_data = {MEM_W/32{$urandom}};
      #1;
      chk(mem_ready && src_ld_en == (K'(1) << 5) && !dst_ld_en && ld_row == RW'(r) &&
          ld_data == mem_data[VPW*VW-1:0], $sformatf("source row %0d", r));
      @(negedge clk);
    end
    mem_valid = 0;
    // destination rows to all
    pulse_restart(D_DST);
    for (int r = 0; r < ROWS; r++) begin
      mem_valid = 1; mem_data = {MEM_W/32{$urandom}};
      #1;
      chk(dst_ld_en && src_ld_en == '0 && ld_row == RW'(r), $sformatf("destination row %0d", r));
      @(negedge clk);
    end
    mem_valid = 0;
    // header
    pulse_restart(D_HDR);
    mem_valid = 1; mem_data = '0; mem_data[7:0] = HDR_MAGIC; mem_data[39:8] = 32'd77;
    #1;
    chk(hdr_valid && hdr.magic == HDR_MAGIC && hdr.nwords == 77, "header");
    @(negedge clk); mem_valid = 0;
    // two shuffled segments of edges
    for (int seg = 0; seg < 2; seg++) begin
      int pos;
      pulse_restart(D_EDGE);
      pos = 0;
      for (int w = 0; w < 9; w++) begin
        logic [MEM_W-1:0] wd;
        for (int l = 0; l < EPW; l++) begin
          edge_t ed;
          if ($urandom % 5 == 0) begin ed.src = NULL_IDX; ed.dst = NULL_IDX; end
          else begin ed.src = IDX_W'($urandom % 1000); ed.dst = IDX_W'($urandom % 1000); end
          wd[l*EDGE_W +: EDGE_W] = ed;
          if (ed.src != NULL_IDX) exp_q[(pos + l) % K].push_back(ed);
        end
        pos += EPW;
        mem_valid = 1; mem_data = wd;
        e_ready = ($urandom % 3 == 0) ? ~(K'(1) << ($urandom % K)) : '1;
        #1;
        while (!mem_ready) begin
          @(negedge clk);
          e_ready = '1;
          #1;
        end
        @(negedge clk);
      end
      mem_valid = 0;
      @(negedge clk);
      for (int p = 0; p < K; p++) chk(exp_q[p].size() == 0, $sformatf("PE %0d received all", p));
    end
    chk(stalls > 0, "a busy PE stalled the stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
