// tb_cifarnet_top: end-to-end test of the CifarNet accelerator at its
// default parameters. Streams random weights and then NIMG random 24x24x3
// images through the AXI4-stream input, plays the two normalization layers
// on the normalization ports with a stand-in function (halving each value)
// and random hand-shake delays, collects the fc3 scores and labels and
// compares them with the reference model in cifar_ref_pkg.
// The first image runs without input gaps and its latency (first pixel to
// label) is printed; the reported 653.4 us is given without a clock period,
// so it is converted with the 8.54 ns of the single-image LeNet design
// (76 510 cycles) and the measured latency must stay below it.
// Mechanisms counted, each must occur: weight loading, each layer starting
// before its producer finished the image (backward pipeline), traffic through
// both normalization ports, inter-layer FIFO back-pressure and output stalls.
module tb_cifarnet_top;
  import cifar_ref_pkg::*;

  localparam int NIMG = 3;
  localparam int C1P = 1, C2P = 2, F1P = 32, F2P = 24, F3P = 10;
  localparam int PAPER_LAT = 76510;        // 653.4 us / 8.54 ns
  localparam int WATCHDOG = 1500000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]  s_tdata, m_tdata;
  logic         s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic         m_tvalid, m_tready = 1'b0, m_tlast;
  logic         n1o_v, n1o_r = 1'b0, n1i_v = 1'b0, n1i_r;
  logic         n2o_v, n2o_r = 1'b0, n2i_v = 1'b0, n2i_r;
  logic [511:0] n1o_d, n1i_d = '0, n2o_d, n2i_d = '0;
  logic         weights_loaded;
  logic [3:0]   layer_img_done;

  cifarnet_top u_dut (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .norm1_out_valid(n1o_v), .norm1_out_ready(n1o_r), .norm1_out_data(n1o_d),
    .norm1_in_valid(n1i_v), .norm1_in_ready(n1i_r), .norm1_in_data(n1i_d),
    .norm2_out_valid(n2o_v), .norm2_out_ready(n2o_r), .norm2_out_data(n2o_d),
    .norm2_in_valid(n2i_v), .norm2_in_ready(n2i_r), .norm2_in_data(n2i_d),
    .weights_loaded, .layer_img_done
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  d16 exp_scores [NIMG][10];
  int exp_label [NIMG];
  logic [15:0] inq [$];
  logic [511:0] n1q [$], n2q [$];
  int n_weights;
  int got_scores = 0, got_labels = 0;
  bit gaps = 1'b0;
  int t_first_pix = -1, t_first_label = -1;
  int n_wload = 0, n_early_pool1 = 0, n_early_conv2 = 0, n_early_pool2 = 0, n_norm1 = 0, n_norm2 = 0;
  int n_fifo_stall = 0, n_out_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [511:0] norm_chunk(logic [511:0] v);
    logic [511:0] r;
    for (int c = 0; c < 32; c++) r[c * 16 +: 16] = norm(d16'(v[c * 16 +: 16]));
    return r;
  endfunction

  initial begin
    d16 sc [10];
    gen_weights();
    weight_stream(inq, C1P, C2P, F1P, F2P, F3P);
    n_weights = inq.size();
    for (int i = 0; i < NIMG; i++) begin
      d16 im [24][24][3];
      gen_image(im);
      exp_label[i] = forward(im, sc);
      exp_scores[i] = sc;
      for (int x = 0; x < n24; x++)
        for (int y = 0; y < n24; y++)
          for (int c = 0; c < n3; c++) inq.push_back(im[x][y][c]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // drivers at negedge; transfers are decided at posedge
  int sent = 0;
  always @(negedge clk) if (rst_n) begin
    s_tvalid <= (inq.size() > 0) && (!gaps || ($urandom_range(3, 0) != 0));
    s_tdata  <= (inq.size() > 0) ? inq[0] : '0;
    s_tlast  <= (inq.size() == 1);
    m_tready <= !gaps || ($urandom_range(3, 0) == 0);
    // normalization stand-ins: hold up to 4 chunks, random ready/valid
    n1o_r <= (n1q.size() < 4) && (!gaps || $urandom_range(3, 0) != 0);
    n1i_v <= (n1q.size() > 0) && (!gaps || $urandom_range(3, 0) != 0);
    n1i_d <= (n1q.size() > 0) ? n1q[0] : '0;
    n2o_r <= (n2q.size() < 4) && (!gaps || $urandom_range(3, 0) != 0);
    n2i_v <= (n2q.size() > 0) && (!gaps || $urandom_range(3, 0) != 0);
    n2i_d <= (n2q.size() > 0) ? n2q[0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && s_tready) begin
      void'(inq.pop_front());
      sent++;
      if (sent == n_weights + 1) t_first_pix = cycle;
      if (sent == n_weights + 24 * 24 * 3) gaps <= 1'b1;
    end
    if (n1i_v && n1i_r) begin void'(n1q.pop_front()); n_norm1++; end
    if (n1o_v && n1o_r) n1q.push_back(norm_chunk(n1o_d));
    if (n2i_v && n2i_r) begin void'(n2q.pop_front()); n_norm2++; end
    if (n2o_v && n2o_r) n2q.push_back(norm_chunk(n2o_d));
    if (u_dut.f3o_v && u_dut.f3o_r) begin
      int img, cls;
      img = got_scores / 10;
      cls = got_scores % 10;
      if (img < NIMG)
        check(d16'(u_dut.f3o_d) == exp_scores[img][cls],
              $sformatf("score img %0d class %0d: got %0d exp %0d", img, cls, d16'(u_dut.f3o_d), exp_scores[img][cls]));
      got_scores++;
    end
    if (m_tvalid && m_tready) begin
      check(got_labels < NIMG && int'(m_tdata) == exp_label[got_labels],
            $sformatf("label %0d: got %0d exp %0d", got_labels, m_tdata, exp_label[got_labels]));
      check(m_tlast, "tlast on every label (batch of one)");
      got_labels++;
    end
    if (u_dut.u_loader.done && !$past(u_dut.u_loader.done)) n_wload++;
    if (u_dut.u_pool1.u_ctrl.op_start && u_dut.u_conv1.u_ctrl.out_idx < u_dut.u_conv1.u_ctrl.out_len) n_early_pool1++;
    if (u_dut.u_conv2.u_ctrl.op_start && u_dut.u_pool1.u_ctrl.out_idx < u_dut.u_pool1.u_ctrl.out_len) n_early_conv2++;
    if (u_dut.u_pool2.u_ctrl.op_start && u_dut.u_conv2.u_ctrl.out_idx < u_dut.u_conv2.u_ctrl.out_len) n_early_pool2++;
    if ((u_dut.c1o_v && !u_dut.c1o_r) || (u_dut.c2o_v && !u_dut.c2o_r) || (u_dut.f1o_v && !u_dut.f1o_r)
        || (u_dut.f2o_v && !u_dut.f2o_r)) n_fifo_stall++;
    if (m_tvalid && !m_tready) n_out_stall++;
    if (t_first_label < 0 && u_dut.lb_v) t_first_label = cycle;
  end

  task automatic finish();
    int lat;
    check(got_labels == NIMG, $sformatf("all %0d labels received (got %0d)", NIMG, got_labels));
    check(got_scores == 10 * NIMG, "all fc3 scores seen");
    lat = t_first_label - t_first_pix;
    $display("single-image latency %0d cycles (reported 653.4 us = %0d cycles at 8.54 ns)", lat, PAPER_LAT);
    $display("mechanisms: weight_load=%0d early_pool1=%0d early_conv2=%0d early_pool2=%0d norm1=%0d norm2=%0d fifo_stall=%0d out_stall=%0d",
             n_wload, n_early_pool1, n_early_conv2, n_early_pool2, n_norm1, n_norm2, n_fifo_stall, n_out_stall);
    check(lat > 0 && lat < PAPER_LAT, "single-image latency below the reported one");
    check(n_wload == 1, "weights loaded once");
    check(n_early_pool1 > 0, "pool1 starts before conv1 finishes (backward pipeline)");
    check(n_early_conv2 > 0, "conv2 starts before pool1 finishes (backward pipeline)");
    check(n_early_pool2 > 0, "pool2 starts before conv2 finishes (backward pipeline)");
    check(n_norm1 == 144 * NIMG, "every pool1 chunk passed the first normalization port");
    check(n_norm2 == 36 * NIMG, "every pool2 chunk passed the second normalization port");
    check(n_fifo_stall > 0, "inter-layer FIFO back-pressure occurred");
    check(n_out_stall > 0, "output back-pressure occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (got_labels == NIMG);
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
