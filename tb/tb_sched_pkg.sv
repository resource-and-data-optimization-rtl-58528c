// tb_sched_pkg: testbench-side implementation of backward pipeline
// scheduling, written independently of the RTL List ROM. Given a chain of
// 2D-window layers (input height/width, window, stride, padding), it returns
// a layer's request list (row-major addresses m*W+n), its computation index
// list and its output order, starting from row-major order at the last layer.
package tb_sched_pkg;

  typedef struct {
    int h, w, f, s, z;
  } lay_t;

  function automatic int oh(lay_t l);
    return (l.h + 2 * l.z - l.f) / l.s + 1;
  endfunction
  function automatic int ow(lay_t l);
    return (l.w + 2 * l.z - l.f) / l.s + 1;
  endfunction

  // cur: request list of layer k, comp: computation index list,
  // outx/outy: output coordinates in production order
  function automatic void schedule(lay_t chain[$], int k, ref int cur[$], ref int comp[$],
                                   ref int outx[$], ref int outy[$]);
    int nx[$], ny[$];
    nx.delete(); ny.delete();
    for (int x = 0; x < oh(chain[chain.size() - 1]); x++)
      for (int y = 0; y < ow(chain[chain.size() - 1]); y++) begin
        nx.push_back(x); ny.push_back(y);
      end
    for (int l = chain.size() - 1; l >= k; l--) begin
      bit used [int];
      int cx[$], cy[$];
      lay_t g;
      g = chain[l];
      cur.delete(); comp.delete(); cx.delete(); cy.delete();
      foreach (nx[i]) begin
        for (int dm = 0; dm < g.f; dm++)
          for (int dn = 0; dn < g.f; dn++) begin
            int m, n;
            m = nx[i] * g.s - g.z + dm;
            n = ny[i] * g.s - g.z + dn;
            if (m >= 0 && m < g.h && n >= 0 && n < g.w && !used.exists(m * g.w + n)) begin
              used[m * g.w + n] = 1'b1;
              cur.push_back(m * g.w + n);
              cx.push_back(m); cy.push_back(n);
            end
          end
        comp.push_back(cur.size());
      end
      outx = nx; outy = ny;
      nx = cx; ny = cy;
    end
  endfunction

endpackage
