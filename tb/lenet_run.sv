// lenet_run: end-to-end test harness of the LeNet accelerator, shared by
// tb_lenet_top (default parameters) and tb_lenet_batch (batch mode). It
// instantiates lenet_top with the given parameters, streams random weights
// and then NIMG random images through the AXI4-stream input, collects the fc2
// scores and the labels and compares them with the reference model in
// lenet_ref_pkg. The first batch runs with no stalls, to measure the batch
// latency and the conv1 layer time against the reported 175.7 us (20 574
// cycles at 8.54 ns) and 16 034 cycles; a batch may take longer by the time
// to load its extra images (784 cycles each). Later images run with random
// gaps on the input, and the output is held off until the back-pressure
// reaches the layers, then released at random.
// It also counts how often the design's mechanisms occurred: weight loading,
// a layer starting before its producer finished the image (backward
// pipeline), back-pressure between stages (layers, label decision) and on
// the output port; each
// must occur. done rises when the checks are complete (or stop was raised);
// checks/failures then hold the totals.
module lenet_run #(
  parameter int NB = 1,
  parameter int C1P = 1, parameter int C2P = 1, parameter int F1P = 16, parameter int F2P = 10,
  parameter int FIFO_DEPTH = 16,
  parameter int NIMG = 24                  // images (NIMG/NB batches)
) (
  input  logic clk,
  input  logic stop,                       // watchdog: finish the checks now
  output logic done,
  output int   checks,
  output int   failures
);
  import lenet_ref_pkg::*;

  localparam int PAPER_LAT = 20574;        // 175.7 us / 8.54 ns
  localparam int PAPER_CONV1 = 16034;

  logic rst_n = 1'b0;

  logic [15:0] s_tdata, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast;
  logic        weights_loaded;
  logic [3:0]  layer_img_done;

  lenet_top #(.NB(NB), .CONV1_CI_PAR(C1P), .CONV2_CI_PAR(C2P), .FC1_PAR(F1P), .FC2_PAR(F2P),
              .FIFO_DEPTH(FIFO_DEPTH)) u_dut (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .weights_loaded, .layer_img_done
  );

  int cycle = 0;
  initial begin
    checks = 0; failures = 0; done = 1'b0;
  end
  always @(posedge clk) cycle <= cycle + 1;

  d16 imgs [NIMG][28][28];
  d16 exp_scores [NIMG][10];
  int exp_label [NIMG];
  logic [15:0] inq [$];
  int n_weights;
  int got_scores = 0, got_labels = 0;
  bit gaps = 1'b0;
  int t_first_pix = -1, t_first_label = -1, t_conv1_start = -1, t_conv1_done = -1;
  // mechanism counters
  int n_wload = 0, n_early_pool1 = 0, n_early_conv2 = 0, n_early_pool2 = 0, n_fifo_stall = 0, n_out_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    d16 sc [10];
    gen_weights();
    weight_stream(inq, C1P, C2P, F1P, F2P);
    n_weights = inq.size();
    for (int i = 0; i < NIMG; i++) begin
      d16 im [28][28];
      gen_image(im);
      imgs[i] = im;
      exp_label[i] = forward(im, sc);
      exp_scores[i] = sc;
      for (int x = 0; x < n24 + 4; x++)
        for (int y = 0; y < n24 + 4; y++) inq.push_back(im[x][y]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // input driver: drive at negedge, the transfer is decided just before posedge
  int sent = 0;
  always @(negedge clk) if (rst_n) begin
    s_tvalid <= (inq.size() > 0) && (!gaps || ($urandom_range(3, 0) != 0));
    s_tdata  <= (inq.size() > 0) ? inq[0] : '0;
    s_tlast  <= (inq.size() == 1);
    // after the timed image the output is blocked until the label FIFOs are
    // full and back-pressure has reached the fully connected layers
    m_tready <= !gaps || ((n_fifo_stall > 100 || n_out_stall > 400000) && $urandom_range(2, 0) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && s_tready) begin
      void'(inq.pop_front());
      sent++;
      if (sent == n_weights + 1) t_first_pix = cycle;
      if (sent == n_weights + 28 * 28 * NB) gaps <= 1'b1;
    end
    // scores leaving fc2
    if (u_dut.f2o_v && u_dut.f2o_r) begin
      for (int b = 0; b < NB; b++) begin
        int img, cls;
        img = (got_scores / 10) * NB + b;
        cls = got_scores % 10;
        if (img < NIMG)
          check(d16'(u_dut.f2o_d[b * 16 +: 16]) == exp_scores[img][cls],
                $sformatf("score img %0d class %0d: got %0d exp %0d", img, cls,
                          d16'(u_dut.f2o_d[b * 16 +: 16]), exp_scores[img][cls]));
      end
      got_scores++;
    end
    if (m_tvalid && m_tready) begin
      check(got_labels < NIMG && int'(m_tdata) == exp_label[got_labels],
            $sformatf("label %0d: got %0d exp %0d", got_labels, m_tdata, exp_label[got_labels]));
      check(m_tlast == ((got_labels % NB) == NB - 1), "tlast on the last label of a batch");
      got_labels++;
    end
    // mechanisms
    if (u_dut.u_loader.done && !$past(u_dut.u_loader.done)) n_wload++;
    if (u_dut.u_pool1.u_ctrl.op_start && u_dut.u_conv1.u_ctrl.out_idx < u_dut.u_conv1.u_ctrl.out_len) n_early_pool1++;
    if (u_dut.u_conv2.u_ctrl.op_start && u_dut.u_pool1.u_ctrl.out_idx < u_dut.u_pool1.u_ctrl.out_len) n_early_conv2++;
    if (u_dut.u_pool2.u_ctrl.op_start && u_dut.u_conv2.u_ctrl.out_idx < u_dut.u_conv2.u_ctrl.out_len) n_early_pool2++;
    if ((u_dut.c1o_v && !u_dut.c1o_r) || (u_dut.p1o_v && !u_dut.p1o_r) || (u_dut.c2o_v && !u_dut.c2o_r)
        || (u_dut.p2o_v && !u_dut.p2o_r) || (u_dut.f1o_v && !u_dut.f1o_r) || (u_dut.f2o_v && !u_dut.f2o_r)
        || (u_dut.lb_v && !u_dut.lb_r)) n_fifo_stall++;
    if (m_tvalid && !m_tready) n_out_stall++;
    if (t_first_label < 0 && u_dut.lb_v) t_first_label = cycle;  // label decided
    if (t_conv1_start < 0 && u_dut.ib_v && u_dut.ib_r) t_conv1_start = cycle;
    if (t_conv1_done < 0 && layer_img_done[0]) t_conv1_done = cycle;
  end

  task automatic finish();
    int lat, c1;
    check(got_labels == NIMG, $sformatf("all %0d labels received (got %0d)", NIMG, got_labels));
    check(got_scores == 10 * NIMG / NB, "all fc2 scores seen");
    lat = t_first_label - t_first_pix;
    c1  = t_conv1_done - t_conv1_start;
    $display("NB=%0d single-batch latency %0d cycles (reference %0d), conv1 layer %0d cycles (reference %0d)",
             NB, lat, PAPER_LAT, c1, PAPER_CONV1);
    $display("NB=%0d mechanisms: weight_load=%0d early_pool1=%0d early_conv2=%0d early_pool2=%0d fifo_stall=%0d out_stall=%0d",
             NB, n_wload, n_early_pool1, n_early_conv2, n_early_pool2, n_fifo_stall, n_out_stall);
    // a batch costs the loading of its extra images on top of one image
    check(lat > 0 && lat < PAPER_LAT * 115 / 100 + 784 * (NB - 1), "batch latency within 15% above the reported one");
    check(c1 > PAPER_CONV1 * 85 / 100 && c1 < PAPER_CONV1 * 115 / 100, "conv1 layer time within 15% of the reported one");
    check(n_wload == 1, "weights loaded once");
    check(n_early_pool1 > 0, "pool1 starts before conv1 finishes (backward pipeline)");
    check(n_early_conv2 > 0, "conv2 starts before pool1 finishes (backward pipeline)");
    check(n_early_pool2 > 0, "pool2 starts before conv2 finishes (backward pipeline)");
    check(n_fifo_stall > 0, "back-pressure between stages occurred");
    check(n_out_stall > 0, "output back-pressure occurred");
    done = 1'b1;
  endtask

  initial begin
    wait (got_labels == NIMG || stop);
    repeat (20) @(posedge clk);
    finish();
  end
endmodule
