// tb_update_unit: exhaustive check of the BFS relaxation (8-bit values) and a random check
// of the WCC minimum-label rule.
module tb_update_unit;
  import fg_pkg::*;
  logic [7:0] s, d, nv_b, nv_w;
  logic imp_b, imp_w;
  int checks = 0, failures = 0;

  update_unit #(.VW(8), .ALGO(ALGO_BFS)) u_bfs (.src_val(s), .dst_val(d), .new_val(nv_b), .improve(imp_b));
  update_unit #(.VW(8), .ALGO(ALGO_WCC)) u_wcc (.src_val(s), .dst_val(d), .new_val(nv_w), .improve(imp_w));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int cand, expv;
        bit expi;
        s = 8'(a); d = 8'(b);
        #1;
        cand = (a == 255) ? 255 : a + 1;
        expi = cand < b;
        expv = expi ? cand : b;
        checks++;
        if (imp_b !== expi || nv_b !== 8'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL BFS src %0d dst %0d -> %0d %b", a, b, nv_b, imp_b);
        end
        checks++;
        if (imp_w !== (a < b) || nv_w !== 8'((a < b) ? a : b)) begin
          failures++;
          if (failures < 10) $display("FAIL WCC src %0d dst %0d -> %0d %b", a, b, nv_w, imp_w);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
