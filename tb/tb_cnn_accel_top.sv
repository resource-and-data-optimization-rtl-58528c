// tb_cnn_accel_top: end-to-end test of the top with every parameter at its
// default. Both accelerators run at the same time: the LeNet side receives
// its weights and NL_IMG MNIST-sized random images, the CifarNet side its
// weights and NC_IMG 24x24x3 random images, with the two normalization layers
// played by a stand-in (halving each value, as in cifar_ref_pkg). Scores
// (at the last fully connected layer of each network) and labels are compared
// with the two reference models; the labels are held back at first so that
// both output ports stall. Mechanisms counted, each must occur on both
// networks: weight loading, early start of pool1, conv2 and pool2 (backward
// pipeline), normalization port traffic (CifarNet), back-pressure on the
// internal streams (input port, between layers, normalization ports) and
// output stalls.
module tb_cnn_accel_top;
  localparam int NL_IMG = 2, NC_IMG = 1;
  localparam int WATCHDOG = 1000000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]  ls_d, lm_d, cs_d, cm_d;
  logic         ls_v = 1'b0, ls_r, ls_l = 1'b0, lm_v, lm_r = 1'b0, lm_l;
  logic         cs_v = 1'b0, cs_r, cs_l = 1'b0, cm_v, cm_r = 1'b0, cm_l;
  logic         n1o_v, n1o_r = 1'b0, n1i_v = 1'b0, n1i_r;
  logic         n2o_v, n2o_r = 1'b0, n2i_v = 1'b0, n2i_r;
  logic [511:0] n1o_d, n1i_d = '0, n2o_d, n2i_d = '0;
  logic         l_wl, c_wl;
  logic [3:0]   l_done, c_done;

  cnn_accel_top u_dut (
    .clk, .rst_n,
    .lenet_s_axis_tdata(ls_d), .lenet_s_axis_tvalid(ls_v), .lenet_s_axis_tready(ls_r), .lenet_s_axis_tlast(ls_l),
    .lenet_m_axis_tdata(lm_d), .lenet_m_axis_tvalid(lm_v), .lenet_m_axis_tready(lm_r), .lenet_m_axis_tlast(lm_l),
    .lenet_weights_loaded(l_wl), .lenet_layer_img_done(l_done),
    .cifar_s_axis_tdata(cs_d), .cifar_s_axis_tvalid(cs_v), .cifar_s_axis_tready(cs_r), .cifar_s_axis_tlast(cs_l),
    .cifar_m_axis_tdata(cm_d), .cifar_m_axis_tvalid(cm_v), .cifar_m_axis_tready(cm_r), .cifar_m_axis_tlast(cm_l),
    .cifar_norm1_out_valid(n1o_v), .cifar_norm1_out_ready(n1o_r), .cifar_norm1_out_data(n1o_d),
    .cifar_norm1_in_valid(n1i_v), .cifar_norm1_in_ready(n1i_r), .cifar_norm1_in_data(n1i_d),
    .cifar_norm2_out_valid(n2o_v), .cifar_norm2_out_ready(n2o_r), .cifar_norm2_out_data(n2o_d),
    .cifar_norm2_in_valid(n2i_v), .cifar_norm2_in_ready(n2i_r), .cifar_norm2_in_data(n2i_d),
    .cifar_weights_loaded(c_wl), .cifar_layer_img_done(c_done)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  lenet_ref_pkg::d16 l_exp [NL_IMG][10];
  int l_lab [NL_IMG];
  cifar_ref_pkg::d16 c_exp [NC_IMG][10];
  int c_lab [NC_IMG];
  logic [15:0] lq [$], cq [$];
  logic [511:0] n1q [$], n2q [$];
  int l_sc = 0, l_got = 0, c_sc = 0, c_got = 0;
  int n_lwl = 0, n_cwl = 0, n_l_early = 0, n_c_early = 0, n_norm1 = 0, n_norm2 = 0;
  int n_l_stall = 0, n_c_stall = 0, n_lout_stall = 0, n_cout_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [511:0] norm_chunk(logic [511:0] v);
    logic [511:0] r;
    for (int c = 0; c < 32; c++) r[c * 16 +: 16] = cifar_ref_pkg::norm(cifar_ref_pkg::d16'(v[c * 16 +: 16]));
    return r;
  endfunction

  initial begin
    lenet_ref_pkg::d16 ls [10];
    cifar_ref_pkg::d16 cs [10];
    lenet_ref_pkg::gen_weights();
    lenet_ref_pkg::weight_stream(lq, 1, 1, 16, 10);
    for (int i = 0; i < NL_IMG; i++) begin
      lenet_ref_pkg::d16 im [28][28];
      lenet_ref_pkg::gen_image(im);
      l_lab[i] = lenet_ref_pkg::forward(im, ls);
      l_exp[i] = ls;
      for (int x = 0; x < lenet_ref_pkg::n24 + 4; x++)
        for (int y = 0; y < lenet_ref_pkg::n24 + 4; y++) lq.push_back(im[x][y]);
    end
    cifar_ref_pkg::gen_weights();
    cifar_ref_pkg::weight_stream(cq, 1, 2, 32, 24, 10);
    for (int i = 0; i < NC_IMG; i++) begin
      cifar_ref_pkg::d16 im [24][24][3];
      cifar_ref_pkg::gen_image(im);
      c_lab[i] = cifar_ref_pkg::forward(im, cs);
      c_exp[i] = cs;
      for (int x = 0; x < cifar_ref_pkg::n24; x++)
        for (int y = 0; y < cifar_ref_pkg::n24; y++)
          for (int c = 0; c < cifar_ref_pkg::n3; c++) cq.push_back(im[x][y][c]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    ls_v <= (lq.size() > 0) && ($urandom_range(7, 0) != 0);
    ls_d <= (lq.size() > 0) ? lq[0] : '0;
    ls_l <= (lq.size() == 1);
    cs_v <= (cq.size() > 0) && ($urandom_range(7, 0) != 0);
    cs_d <= (cq.size() > 0) ? cq[0] : '0;
    cs_l <= (cq.size() == 1);
    // hold each label back for a while before accepting it
    lm_r <= (n_lout_stall > 40) && ($urandom_range(1, 0) != 0);
    cm_r <= (n_cout_stall > 40) && ($urandom_range(1, 0) != 0);
    n1o_r <= (n1q.size() < 4) && ($urandom_range(3, 0) != 0);
    n1i_v <= (n1q.size() > 0) && ($urandom_range(3, 0) != 0);
    n1i_d <= (n1q.size() > 0) ? n1q[0] : '0;
    n2o_r <= (n2q.size() < 4) && ($urandom_range(3, 0) != 0);
    n2i_v <= (n2q.size() > 0) && ($urandom_range(3, 0) != 0);
    n2i_d <= (n2q.size() > 0) ? n2q[0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (ls_v && ls_r) void'(lq.pop_front());
    if (cs_v && cs_r) void'(cq.pop_front());
    if (n1i_v && n1i_r) begin void'(n1q.pop_front()); n_norm1++; end
    if (n1o_v && n1o_r) n1q.push_back(norm_chunk(n1o_d));
    if (n2i_v && n2i_r) begin void'(n2q.pop_front()); n_norm2++; end
    if (n2o_v && n2o_r) n2q.push_back(norm_chunk(n2o_d));
    if (u_dut.u_lenet.f2o_v && u_dut.u_lenet.f2o_r) begin
      if (l_sc < 10 * NL_IMG)
        check(lenet_ref_pkg::d16'(u_dut.u_lenet.f2o_d) == l_exp[l_sc / 10][l_sc % 10],
              $sformatf("LeNet score %0d: got %0d exp %0d", l_sc, lenet_ref_pkg::d16'(u_dut.u_lenet.f2o_d), l_exp[l_sc / 10][l_sc % 10]));
      l_sc++;
    end
    if (u_dut.u_cifar.f3o_v && u_dut.u_cifar.f3o_r) begin
      if (c_sc < 10 * NC_IMG)
        check(cifar_ref_pkg::d16'(u_dut.u_cifar.f3o_d) == c_exp[c_sc / 10][c_sc % 10],
              $sformatf("CifarNet score %0d: got %0d exp %0d", c_sc, cifar_ref_pkg::d16'(u_dut.u_cifar.f3o_d), c_exp[c_sc / 10][c_sc % 10]));
      c_sc++;
    end
    if (lm_v && lm_r) begin
      check(l_got < NL_IMG && int'(lm_d) == l_lab[l_got] && lm_l, $sformatf("LeNet label %0d: got %0d", l_got, lm_d));
      l_got++;
    end
    if (cm_v && cm_r) begin
      check(c_got < NC_IMG && int'(cm_d) == c_lab[c_got] && cm_l, $sformatf("CifarNet label %0d: got %0d", c_got, cm_d));
      c_got++;
    end
    if (l_wl && !$past(l_wl)) n_lwl++;
    if (c_wl && !$past(c_wl)) n_cwl++;
    if (u_dut.u_lenet.u_pool2.u_ctrl.op_start && u_dut.u_lenet.u_conv1.u_ctrl.out_idx < u_dut.u_lenet.u_conv1.u_ctrl.out_len) n_l_early++;
    if (u_dut.u_cifar.u_pool2.u_ctrl.op_start && u_dut.u_cifar.u_conv1.u_ctrl.out_idx < u_dut.u_cifar.u_conv1.u_ctrl.out_len) n_c_early++;
    if ((ls_v && !ls_r) || (u_dut.u_lenet.c1o_v && !u_dut.u_lenet.c1o_r) || (u_dut.u_lenet.p1o_v && !u_dut.u_lenet.p1o_r)
        || (u_dut.u_lenet.c2o_v && !u_dut.u_lenet.c2o_r) || (u_dut.u_lenet.f1o_v && !u_dut.u_lenet.f1o_r)) n_l_stall++;
    if ((cs_v && !cs_r) || (n1o_v && !n1o_r) || (n2o_v && !n2o_r) || (u_dut.u_cifar.c1o_v && !u_dut.u_cifar.c1o_r)
        || (u_dut.u_cifar.c2o_v && !u_dut.u_cifar.c2o_r) || (u_dut.u_cifar.f1o_v && !u_dut.u_cifar.f1o_r)) n_c_stall++;
    if (lm_v && !lm_r) n_lout_stall++;
    if (cm_v && !cm_r) n_cout_stall++;
  end

  task automatic finish();
    check(l_got == NL_IMG && l_sc == 10 * NL_IMG, $sformatf("all LeNet labels and scores (%0d, %0d)", l_got, l_sc));
    check(c_got == NC_IMG && c_sc == 10 * NC_IMG, $sformatf("all CifarNet labels and scores (%0d, %0d)", c_got, c_sc));
    $display("mechanisms: lenet_wload=%0d cifar_wload=%0d lenet_pool2_before_conv1_done=%0d cifar_pool2_before_conv1_done=%0d",
             n_lwl, n_cwl, n_l_early, n_c_early);
    $display("            norm1=%0d norm2=%0d lenet_stream_stall=%0d cifar_stream_stall=%0d lenet_out_stall=%0d cifar_out_stall=%0d",
             n_norm1, n_norm2, n_l_stall, n_c_stall, n_lout_stall, n_cout_stall);
    check(n_lwl == 1 && n_cwl == 1, "weights loaded once on each side");
    check(n_l_early > 0, "LeNet pool2 works while conv1 is still on the same image");
    check(n_c_early > 0, "CifarNet pool2 works while conv1 is still on the same image");
    check(n_norm1 == 144 * NC_IMG && n_norm2 == 36 * NC_IMG, "every chunk passed both normalization ports");
    check(n_l_stall > 0 && n_c_stall > 0, "stream back-pressure (input port, between layers or at a normalization port) on both sides");
    check(n_lout_stall > 0 && n_cout_stall > 0, "output back-pressure on both sides");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (l_got == NL_IMG && c_got == NC_IMG);
    repeat (20) @(posedge clk);
    finish();
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
