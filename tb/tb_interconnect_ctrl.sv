// tb_interconnect_ctrl: a ring of four nodes. Every node broadcasts a burst of packets
// (last hop = previous node) while its delivery port is randomly not ready. Each node must
// receive every packet of the other three boards exactly once and in each origin's order,
// never its own, and the ring must not lock up.
module tb_interconnect_ctrl;
  import fg_pkg::*;
  localparam int unsigned P = 4, DW = 32, NPKT = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  pkt_meta_t [P-1:0] tx_meta, rx_meta, l_meta;
  logic [P-1:0][DW-1:0] tx_data, rx_data, l_data;
  logic [P-1:0] l_valid, sp1, sp2;
  int sent [P];
  int next_exp [P][P];
  int checks = 0, failures = 0, blocked = 0;

  always #5 clk = ~clk;

  for (genvar b = 0; b < P; b++) begin : g_node
    interconnect_ctrl #(.DW(DW), .FDEPTH(4)) u (
      .clk, .rst_n, .board_id(8'(b)),
      .tx_valid(tx_valid[b]), .tx_ready(tx_ready[b]), .tx_meta(tx_meta[b]), .tx_data(tx_data[b]),
      .rx_valid(rx_valid[b]), .rx_ready(rx_ready[b]), .rx_meta(rx_meta[b]), .rx_data(rx_data[b]),
      .in_valid(l_valid[(b+P-1)%P]), .in_meta(l_meta[(b+P-1)%P]), .in_data(l_data[(b+P-1)%P]),
      .in_space1(sp1[b]), .in_space2(sp2[b]),
      .out_valid(l_valid[b]), .out_meta(l_meta[b]), .out_data(l_data[b]),
      .out_space1(sp1[(b+1)%P]), .out_space2(sp2[(b+1)%P])
    );
  end

  always_comb
    for (int b = 0; b < P; b++) begin
      tx_valid[b] = rst_n && sent[b] < NPKT;
      tx_meta[b] = '0;
      tx_meta[b].kind = PKT_DATA;
      tx_meta[b].origin = 8'(b);
      tx_meta[b].last = 8'((b + P - 1) % P);
      tx_meta[b].off = 16'(sent[b]);
      tx_data[b] = DW'(b * 1000 + sent[b]);
    end

  always @(posedge clk) begin
    for (int b = 0; b < P; b++) begin
      rx_ready[b] <= ($urandom % 4) != 0;
      if (tx_valid[b] && tx_ready[b]) sent[b] <= sent[b] + 1;
      if (tx_valid[b] && !tx_ready[b]) blocked++;
      if (rx_valid[b] && rx_ready[b]) begin
        int o;
        o = rx_meta[b].origin;
        checks++;
        if (o == b || int'(rx_meta[b].off) != next_exp[b][o] || rx_data[b] != DW'(o * 1000 + next_exp[b][o])) begin
          failures++;
          $display("FAIL node %0d got packet %0d from %0d", b, rx_meta[b].off, o);
        end
        next_exp[b][o] <= next_exp[b][o] + 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG: ring did not drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sent[b]) sent[b] = 0;
    foreach (next_exp[a, b]) next_exp[a][b] = 0;
    rx_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      bit all;
      @(posedge clk);
      all = 1;
      for (int b = 0; b < P; b++)
        for (int o = 0; o < P; o++)
          if (o != b && next_exp[b][o] != NPKT) all = 0;
      if (all) break;
    end
    checks++;
    if (blocked == 0) begin failures++; $display("FAIL injection never held back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
