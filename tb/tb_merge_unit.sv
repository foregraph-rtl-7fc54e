// tb_merge_unit: random rows from K destination copies; the merged row must be the
// element-wise minimum.
module tb_merge_unit;
  localparam int unsigned K = 6, VW = 8, VPW = 8;
  logic [K-1:0][VPW-1:0][VW-1:0] rows_in;
  logic [VPW-1:0][VW-1:0] row_out;
  int checks = 0, failures = 0;

  merge_unit #(.K(K), .VW(VW), .VPW(VPW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < K; k++)
        for (int l = 0; l < VPW; l++)
          rows_in[k][l] = (t % 3 == 0) ? VW'($urandom % 4) : VW'($urandom);
      #1;
      for (int l = 0; l < VPW; l++) begin
        logic [VW-1:0] m;
        m = '1;
        for (int k = 0; k < K; k++) if (rows_in[k][l] < m) m = rows_in[k][l];
        checks++;
        if (row_out[l] !== m) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d got %0d expected %0d", l, row_out[l], m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
