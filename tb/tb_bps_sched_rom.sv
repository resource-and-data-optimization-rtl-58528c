// tb_bps_sched_rom: checks the List ROM contents.
//  1. Against the worked example of the scheduling method: a 3x3/1 conv on a
//     6x6 input followed by a 2x2/2 pool (4x4 -> 2x2). The pool must request
//     conv outputs 0,1,4,5 | 2,3,6,7 | 8,9,12,13 | 10,11,14,15 with
//     computation indices 4,8,12,16; the conv must request input positions in
//     the printed order 0..15 and its fourth output becomes computable after
//     the first 16 inputs.
//  2. For the LeNet chain (layers 0 and 2) against the independent
//     testbench implementation in tb_sched_pkg, entry by entry, plus the
//     invariants: every input coordinate requested exactly once.
module tb_bps_sched_rom;
  import bps_pkg::*;
  import tb_sched_pkg::*;

  localparam geom_t [MAX_LAYERS-1:0] FIG = {
    80'd0, 80'd0,
    16'd4, 16'd4, 16'd2, 16'd2, 16'd0,
    16'd6, 16'd6, 16'd3, 16'd1, 16'd0
  };

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // four ROM instances, read through their index ports
  logic [9:0] i0, i1, i2, i3, o0, o1, o2, o3;
  logic [9:0] a0, a1, a2, a3;
  logic [10:0] c0, c1, c2, c3, cl0, cl1, cl2, cl3, ol0, ol1, ol2, ol3;
  logic [15:0] x0, y0, x1, y1, x2, y2, x3, y3;

  bps_sched_rom #(.NL(2), .CHAIN(FIG), .LAYER(0), .MAXLEN(784), .AW(10)) u_fig0 (
    .cur_idx(i0), .out_idx(o0), .cur_addr(a0), .comp_cnt(c0), .out_x(x0), .out_y(y0), .cur_len(cl0), .out_len(ol0));
  bps_sched_rom #(.NL(2), .CHAIN(FIG), .LAYER(1), .MAXLEN(784), .AW(10)) u_fig1 (
    .cur_idx(i1), .out_idx(o1), .cur_addr(a1), .comp_cnt(c1), .out_x(x1), .out_y(y1), .cur_len(cl1), .out_len(ol1));
  bps_sched_rom #(.NL(4), .CHAIN(LENET_CHAIN), .LAYER(0), .MAXLEN(784), .AW(10)) u_len0 (
    .cur_idx(i2), .out_idx(o2), .cur_addr(a2), .comp_cnt(c2), .out_x(x2), .out_y(y2), .cur_len(cl2), .out_len(ol2));
  bps_sched_rom #(.NL(4), .CHAIN(LENET_CHAIN), .LAYER(2), .MAXLEN(784), .AW(10)) u_len2 (
    .cur_idx(i3), .out_idx(o3), .cur_addr(a3), .comp_cnt(c3), .out_x(x3), .out_y(y3), .cur_len(cl3), .out_len(ol3));

  initial begin
    int pool_cur [16] = '{0, 1, 4, 5, 2, 3, 6, 7, 8, 9, 12, 13, 10, 11, 14, 15};
    // printed request position of each 6x6 input cell (row-major), -1 = later
    int conv_pos [24] = '{0, 1, 2, 9, -1, -1,  3, 4, 5, 10, -1, -1,
                          6, 7, 8, 11, -1, -1, 12, 13, 14, 15, -1, -1};
    lay_t lenet[$];
    int cur[$], comp[$], ox[$], oy[$];
    #1;
    // --- worked example ---
    check(cl1 == 16 && ol1 == 4, "pool layer list lengths");
    for (int i = 0; i < 16; i++) begin
      i1 = 10'(i); #1;
      check(a1 == 10'(pool_cur[i]), $sformatf("pool curList[%0d] = %0d, exp %0d", i, a1, pool_cur[i]));
    end
    for (int k = 0; k < 4; k++) begin
      o1 = 10'(k); #1;
      check(c1 == 11'(4 * (k + 1)), $sformatf("pool curCompList[%0d] = %0d", k, c1));
    end
    check(cl0 == 36 && ol0 == 16, "conv layer list lengths");
    for (int p = 0; p < 24; p++)
      if (conv_pos[p] >= 0) begin
        i0 = 10'(conv_pos[p]); #1;
        check(a0 == 10'(p), $sformatf("conv curList[%0d] = %0d, exp %0d", conv_pos[p], a0, p));
      end
    o0 = 10'd3; #1;
    check(c0 == 11'd16, $sformatf("conv output 3 needs 16 inputs (got %0d)", c0));
    o0 = 10'd1; #1;
    check(x0 == 0 && y0 == 1, "conv second output is <0,1>");
    o0 = 10'd2; #1;
    check(x0 == 1 && y0 == 0, "conv third output is <1,0>");
    // --- LeNet chain vs independent implementation ---
    lenet = '{'{28, 28, 5, 1, 0}, '{24, 24, 2, 2, 0}, '{12, 12, 5, 1, 0}, '{8, 8, 2, 2, 0}};
    for (int which = 0; which < 2; which++) begin
      automatic bit seen [int];
      automatic int k, errs;
      k = (which == 0) ? 0 : 2;
      schedule(lenet, k, cur, comp, ox, oy);
      errs = 0;
      check((which == 0 ? cl2 : cl3) == 11'(cur.size()), $sformatf("layer %0d curList length", k));
      check((which == 0 ? ol2 : ol3) == 11'(comp.size()), $sformatf("layer %0d output count", k));
      foreach (cur[i]) begin
        if (which == 0) i2 = 10'(i); else i3 = 10'(i);
        #1;
        if ((which == 0 ? a2 : a3) != 10'(cur[i])) errs++;
        if (seen.exists(cur[i])) errs++;
        seen[cur[i]] = 1'b1;
      end
      check(errs == 0 && seen.num() == lenet[k].h * lenet[k].w, $sformatf("layer %0d curList (%0d mismatches)", k, errs));
      errs = 0;
      foreach (comp[i]) begin
        if (which == 0) o2 = 10'(i); else o3 = 10'(i);
        #1;
        if ((which == 0 ? c2 : c3) != 11'(comp[i])) errs++;
        if ((which == 0 ? x2 : x3) != 16'(ox[i]) || (which == 0 ? y2 : y3) != 16'(oy[i])) errs++;
      end
      check(errs == 0, $sformatf("layer %0d curCompList/nextList (%0d mismatches)", k, errs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
