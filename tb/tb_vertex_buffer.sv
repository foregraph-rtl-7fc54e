// tb_vertex_buffer: checks the row-organised dual-port vertex buffer against a reference
// array: wide row loads, single-value reads and writes at random addresses, wide row reads,
// one-cycle read latency, and that a read in the cycle of a write to the same location
// returns the old value.
module tb_vertex_buffer;
  localparam int unsigned VW = 8, DEPTH = 256, VPW = 16, ROWS = DEPTH / VPW;
  localparam int unsigned RW = $clog2(ROWS), AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic ww_en = 0, wr_en = 0, nr_en = 0, nw_en = 0;
  logic [RW-1:0] ww_row = '0, wr_row = '0;
  logic [VPW-1:0][VW-1:0] ww_data = '0, wr_data;
  logic [AW-1:0] nr_addr = '0, nw_addr = '0;
  logic [VW-1:0] nr_data, nw_data = '0;
  logic [VW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vertex_buffer #(.VW(VW), .DEPTH(DEPTH), .VPW(VPW)) dut (.*);

  task automatic check(logic [VW-1:0] got, logic [VW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      ww_en = 1; ww_row = RW'(r);
      for (int l = 0; l < VPW; l++) begin
        ww_data[l] = VW'($urandom);
        ref_mem[r*VPW + l] = ww_data[l];
      end
    end
    @(negedge clk); ww_en = 0;
    // random narrow reads and writes, one of each per cycle
    for (int i = 0; i < 2000; i++) begin
      logic [AW-1:0] ra, wa;
      logic [VW-1:0] wd, exp;
      bit same;
      same = ($urandom % 4) == 0;
      ra = AW'($urandom); wa = same ? ra : AW'($urandom); wd = VW'($urandom);
      @(negedge clk);
      nr_en = 1; nr_addr = ra; nw_en = 1; nw_addr = wa; nw_data = wd;
      exp = ref_mem[ra];                  // old value even when same address
      @(negedge clk);
      nr_en = 0; nw_en = 0;
      ref_mem[wa] = wd;
      check(nr_data, exp, "narrow read");
    end
    // wide reads
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wr_en = 1; wr_row = RW'(r);
      @(negedge clk); wr_en = 0;
      for (int l = 0; l < VPW; l++) check(wr_data[l], ref_mem[r*VPW + l], "wide read");
    end
    // read data holds while the enable is low
    @(negedge clk); nr_en = 1; nr_addr = 5;
    @(negedge clk); nr_en = 0; nr_addr = 9;
    @(negedge clk);
    check(nr_data, ref_mem[5], "read hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
