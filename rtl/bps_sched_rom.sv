// bps_sched_rom: the scheduling lists ("List ROM") of one layer in a chain of
// 2D-window layers, generated by backward pipeline scheduling.
//
// The last layer of the chain produces its outputs in row-major order. Going
// backwards, each layer's data request list (curList) is built from the
// request list of the layer after it (nextList): for every output coordinate
// <x,y> in nextList order, the coordinates of its dependency set
//   Dep(<x,y>) = {<m,n> | xS-Z <= m < xS+F-Z, 0 <= m < H,
//                         yS-Z <= n < yS+F-Z, 0 <= n < W}
// are appended in row-major window order, each coordinate only the first time
// it is needed. After each output the running length of curList is recorded
// in the computation index list (curCompList): output k can be computed once
// curCompList[k] input chunks have arrived.
//
// The lists are constants of the chain geometry. They are filled in an
// initial block at elaboration/time zero, as an FPGA ROM initialiser would be,
// and read combinationally:
//   cur_addr  = curList[cur_idx] as a row-major buffer address m*W+n
//   comp_cnt  = curCompList[out_idx]
//   out_x/y   = nextList[out_idx], the output coordinate to compute
//   cur_len   = length of curList, out_len = length of nextList
// The algorithm, the dependency set and the row-major initial order follow
// the scheduling method; the ROM storage format (linear address for inputs,
// x/y pair for outputs) is this design's choice.
module bps_sched_rom
  import bps_pkg::*;
#(
  parameter int NL = 4,                                  // layers in chain
  parameter geom_t [MAX_LAYERS-1:0] CHAIN = LENET_CHAIN, // chain geometry
  parameter int LAYER = 0,                               // this layer
  parameter int MAXLEN = 784,                            // >= any H*W in chain
  parameter int AW = $clog2(MAXLEN)
) (
  input  logic [AW-1:0] cur_idx,
  input  logic [AW-1:0] out_idx,
  output logic [AW-1:0] cur_addr,
  output logic [AW:0]   comp_cnt,
  output logic [15:0]   out_x,
  output logic [15:0]   out_y,
  output logic [AW:0]   cur_len,
  output logic [AW:0]   out_len
);

  // ROM contents
  logic [AW-1:0] rom_cur  [MAXLEN];
  logic [AW:0]   rom_comp [MAXLEN];
  logic [15:0]   rom_nx   [MAXLEN];
  logic [15:0]   rom_ny   [MAXLEN];
  logic [AW:0]   rom_cur_len, rom_out_len;

  initial begin : gen_lists
    int nx [MAXLEN];
    int ny [MAXLEN];
    int cm [MAXLEN];
    int cn [MAXLEN];
    int cc [MAXLEN];
    bit seen [MAXLEN];
    int nlen, clen;
    int hi, wi, f, s, z, ho, wo;
    nlen = 0;
    clen = 0;
    for (int k = NL - 1; k >= LAYER; k--) begin
      hi = int'(CHAIN[k].hi); wi = int'(CHAIN[k].wi);
      f  = int'(CHAIN[k].f);  s  = int'(CHAIN[k].s); z = int'(CHAIN[k].z);
      ho = out_h(CHAIN[k]);   wo = out_w(CHAIN[k]);
      if (k == NL - 1) begin
        // last layer: row-major output order
        nlen = 0;
        for (int x = 0; x < ho; x++)
          for (int y = 0; y < wo; y++) begin
            nx[nlen] = x; ny[nlen] = y; nlen++;
          end
      end else begin
        // this layer's output order is the next layer's request list
        for (int i = 0; i < clen; i++) begin
          nx[i] = cm[i]; ny[i] = cn[i];
        end
        nlen = clen;
      end
      // Algorithm: build curList / curCompList from nextList
      for (int i = 0; i < hi * wi; i++) seen[i] = 1'b0;
      clen = 0;
      for (int i = 0; i < nlen; i++) begin
        for (int m = nx[i] * s - z; m < nx[i] * s + f - z; m++)
          for (int n = ny[i] * s - z; n < ny[i] * s + f - z; n++)
            if (m >= 0 && m < hi && n >= 0 && n < wi && !seen[m * wi + n]) begin
              seen[m * wi + n] = 1'b1;
              cm[clen] = m; cn[clen] = n; clen++;
            end
        cc[i] = clen;
      end
      if (k == LAYER) begin
        for (int i = 0; i < MAXLEN; i++) begin
          rom_cur[i]  = (i < clen) ? AW'(cm[i] * wi + cn[i]) : '0;
          rom_comp[i] = (i < nlen) ? (AW+1)'(cc[i]) : '0;
          rom_nx[i]   = (i < nlen) ? 16'(nx[i]) : '0;
          rom_ny[i]   = (i < nlen) ? 16'(ny[i]) : '0;
        end
        rom_cur_len = (AW+1)'(clen);
        rom_out_len = (AW+1)'(nlen);
      end
    end
  end

  assign cur_addr = rom_cur[cur_idx];
  assign comp_cnt = rom_comp[out_idx];
  assign out_x    = rom_nx[out_idx];
  assign out_y    = rom_ny[out_idx];
  assign cur_len  = rom_cur_len;
  assign out_len  = rom_out_len;

endmodule
