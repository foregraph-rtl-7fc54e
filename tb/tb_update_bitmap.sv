// tb_update_bitmap: sets local and remote bits, advances iterations and compares the
// group query and the current-bit query with a reference model.
module tb_update_bitmap;
  localparam int unsigned P = 2, QMAX = 16, K = 4, N = P * QMAX, NW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 0, advance = 0, set_local = 0, set_remote = 0;
  logic [NW-1:0] local_idx = '0, remote_idx = '0, grp_base = '0, q_idx = '0;
  logic grp_active, q_cur;
  bit prev_ref [N], cur_ref [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  update_bitmap #(.P(P), .QMAX(QMAX), .K(K)) dut (.*);

  task automatic compare();
    for (int gb = 0; gb < N; gb += K) begin
      bit e;
      grp_base = NW'(gb);
      e = 0;
      for (int i = 0; i < K; i++) e |= prev_ref[gb + i];
      #1;
      checks++;
      if (grp_active !== e) begin failures++; $display("FAIL group %0d", gb); end
    end
    for (int i = 0; i < N; i++) begin
      q_idx = NW'(i);
      #1;
      checks++;
      if (q_cur !== cur_ref[i]) begin failures++; $display("FAIL cur bit %0d", i); end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    foreach (cur_ref[i]) cur_ref[i] = 1;
    compare();
    for (int it = 0; it < 6; it++) begin
      @(negedge clk); advance = 1;
      @(negedge clk); advance = 0;
      prev_ref = cur_ref;
      foreach (cur_ref[i]) cur_ref[i] = 0;
      for (int s = 0; s < 3; s++) begin
        @(negedge clk);
        set_local = $urandom % 2; local_idx = NW'($urandom % N);
        set_remote = $urandom % 2; remote_idx = NW'($urandom % N);
        @(negedge clk);
        if (set_local) cur_ref[local_idx] = 1;
        if (set_remote) cur_ref[remote_idx] = 1;
        set_local = 0; set_remote = 0;
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
