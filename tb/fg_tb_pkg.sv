// fg_tb_pkg: testbench support for the graph boards. graph_image builds a random directed
// graph, lays it out in the off-chip memory format the boards expect and computes the
// reference result: BFS depths from a root, or, after use_wcc(), connected-component labels
// (every vertex starts with its own number as label; the smallest label of a component wins;
// each edge is stored in both directions so the components are the weakly connected ones).
//
// Partitioning (index-based, with constant stride): with S = P*Q sub-intervals, vertex v
// belongs to global sub-interval v mod S, i.e. interval (v mod S) / Q and sub-interval
// (v mod S) mod Q of that interval, at local index v / S. Sub-interval si of interval x sits
// at word (x*QMAX + si) * SI_WORDS of every board's memory; board b's edge stream starts at
// P*QMAX*SI_WORDS and holds, for x = 0..P-1, g = 0..G-1, j = 0..Q-1, a header word and then
// the K sub-blocks SB(x, g*K+k -> b, j) interleaved row by row (edge r of sub-block k at
// position r*K + k), padded with NULL edges.
package fg_tb_pkg;
  import fg_pkg::*;

  class graph_image #(int unsigned P = 4, int unsigned K = 96, int unsigned QMAX = 192,
                      int unsigned DEPTH = 65536, int unsigned MEM_W = 1024,
                      int unsigned VW = 8);
    localparam int unsigned VPW      = MEM_W / VW;
    localparam int unsigned EPW      = MEM_W / EDGE_W;
    localparam int unsigned SI_WORDS = DEPTH / VPW;
    localparam int unsigned EDGE_BASE = P * QMAX * SI_WORDS;

    int unsigned n, m, g_cnt, q, siw, root;
    bit wcc;
    int unsigned eu[$], ev[$];
    logic [VW-1:0] init_val[], expect_val[];
    // memory image, per board
    logic [ADDR_W-1:0] img_addr[P][$];
    logic [MEM_W-1:0]  img_data[P][$];
    // what the layout contains
    int unsigned n_segments, n_empty_segs, n_null_edges, n_edge_words;

    function new(int unsigned n_, int unsigned m_, int unsigned groups, int unsigned siw_,
                 int unsigned root_);
      n = n_; m = m_; g_cnt = groups; q = groups * K; siw = siw_; root = root_;
      if (n > P * q * siw * VPW) $fatal(1, "graph too large for the configuration");
      for (int unsigned i = 0; i < m; i++) begin
        eu.push_back($urandom % n);
        ev.push_back($urandom % n);
      end
      init_val = new[n];
      foreach (init_val[i]) init_val[i] = '1;
      init_val[root] = '0;
    endfunction

    // Switch to connected components: labels and edges in both directions.
    function void use_wcc();
      int unsigned m0;
      wcc = 1;
      foreach (init_val[i]) init_val[i] = VW'(i);
      m0 = m;
      for (int unsigned e = 0; e < m0; e++) begin
        eu.push_back(ev[e]);
        ev.push_back(eu[e]);
      end
      m = 2 * m0;
    endfunction

    // Reference: relax every edge until nothing changes (Bellman-Ford for BFS, label
    // propagation for WCC).
    function void reference();
      bit changed;
      expect_val = new[n];
      foreach (expect_val[i]) expect_val[i] = init_val[i];
      do begin
        changed = 0;
        for (int unsigned e = 0; e < m; e++) begin
          logic [VW-1:0] c;
          if (wcc) c = expect_val[eu[e]];
          else     c = (expect_val[eu[e]] == '1) ? '1 : expect_val[eu[e]] + 1'b1;
          if (c < expect_val[ev[e]]) begin
            expect_val[ev[e]] = c;
            changed = 1;
          end
        end
      end while (changed);
    endfunction

    function int unsigned sig(int unsigned v);   return v % (P * q);  endfunction
    function int unsigned loc(int unsigned v);   return v / (P * q);  endfunction

    // Vertex word r of sub-interval si of interval x, from a value array.
    function logic [MEM_W-1:0] vword(int unsigned x, int unsigned si, int unsigned r,
                                     logic [VW-1:0] vals[]);
      logic [MEM_W-1:0] w;
      w = '1;
      for (int unsigned l = 0; l < VPW; l++) begin
        int unsigned v;
        v = (r * VPW + l) * (P * q) + x * q + si;
        if (v < n) w[l*VW +: VW] = vals[v];
      end
      return w;
    endfunction

    function logic [ADDR_W-1:0] vaddr(int unsigned x, int unsigned si, int unsigned r);
      return ADDR_W'((x * QMAX + si) * SI_WORDS + r);
    endfunction

    function void build();
      n_segments = 0; n_empty_segs = 0; n_null_edges = 0; n_edge_words = 0;
      for (int unsigned b = 0; b < P; b++) begin
        logic [ADDR_W-1:0] a;
        for (int unsigned x = 0; x < P; x++)
          for (int unsigned si = 0; si < q; si++)
            for (int unsigned r = 0; r < siw; r++) begin
              img_addr[b].push_back(vaddr(x, si, r));
              img_data[b].push_back(vword(x, si, r, init_val));
            end
        a = ADDR_W'(EDGE_BASE);
        for (int unsigned x = 0; x < P; x++)
          for (int unsigned g = 0; g < g_cnt; g++)
            for (int unsigned j = 0; j < q; j++) begin
              edge_t sb[K][$];
              int unsigned rows, slots, words;
              seg_hdr_t h;
              logic [MEM_W-1:0] w;
              rows = 0;
              for (int unsigned e = 0; e < m; e++) begin
                int unsigned su, dv;
                su = sig(eu[e]); dv = sig(ev[e]);
                if (su / q == x && (su % q) / K == g && dv / q == b && dv % q == j) begin
                  edge_t ed;
                  ed.src = IDX_W'(loc(eu[e]));
                  ed.dst = IDX_W'(loc(ev[e]));
                  sb[(su % q) % K].push_back(ed);
                end
              end
              for (int unsigned k = 0; k < K; k++)
                if (sb[k].size() > rows) rows = sb[k].size();
              slots = rows * K;
              words = (slots + EPW - 1) / EPW;
              h = '0;
              h.magic = HDR_MAGIC; h.x = 8'(x); h.g = 16'(g); h.j = 16'(j);
              h.nwords = 32'(words);
              w = '0;
              w[$bits(seg_hdr_t)-1:0] = h;
              img_addr[b].push_back(a); img_data[b].push_back(w); a++;
              n_segments++;
              if (words == 0) n_empty_segs++;
              n_edge_words += words;
              for (int unsigned wi = 0; wi < words; wi++) begin
                w = '0;
                for (int unsigned l = 0; l < EPW; l++) begin
                  int unsigned pos, r, k;
                  edge_t ed;
                  pos = wi * EPW + l; r = pos / K; k = pos % K;
                  if (pos < slots && r < sb[k].size()) ed = sb[k][r];
                  else begin
                    ed.src = NULL_IDX; ed.dst = NULL_IDX;
                    n_null_edges++;
                  end
                  w[l*EDGE_W +: EDGE_W] = ed;
                end
                img_addr[b].push_back(a); img_data[b].push_back(w); a++;
              end
            end
      end
    endfunction
  endclass
endpackage
