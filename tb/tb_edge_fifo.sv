// tb_edge_fifo: drives the edge buffer with random pushes and pops and compares the
// output order, the full/empty flags and the count with a queue model; fills it to the
// brim so that full is seen and a push while full is refused.
module tb_edge_fifo;
  localparam int unsigned W = 32, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, seen_full = 0;

  always #5 clk = ~clk;

  edge_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;   // alternate between filling and draining phases
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || count != q.size()) begin
        failures++;
        $display("FAIL flags: size %0d empty %b full %b count %0d", q.size(), empty, full, count);
      end
      if (q.size() != 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %h vs %h", dout, q[0]); end
      end
      if (full) seen_full++;
      push = ($urandom % 100) < bias && !full;
      pop  = ($urandom % 100) < (100 - bias) && !empty;
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (seen_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
