// cifarnet_top: CifarNet inference accelerator built from the same
// backward-pipeline-scheduled blocks as lenet_top.
//
// Data flow. The AXI4-stream slave port carries, after reset, every weight
// and bias (written into ten on-chip weight banks by weight_loader) and then
// images of 24x24 pixels with 3 channels (row-major, the 3 channel values of
// a pixel next to each other). The image buffer feeds 3-channel chunks, in the
// first layer's request order, into four 2D-window layers:
//   conv1 5x5 pad 2, 3->32 ch | pool1 2x2/2 + ReLU | [norm1] |
//   conv2 5x5 pad 2, 32->32 ch | pool2 2x2/2 + ReLU | [norm2]
// then fc1 (1152->192, ReLU), fc2 (192->48, ReLU), fc3 (48->10) and the
// label decision. The label leaves on the master port with tlast.
//
// The two normalization layers are not part of this RTL: their function is
// not specified. Each one is a point-wise stage on 32-channel chunks, so it
// does not change the schedule. The pool outputs leave on norm*_out_* and the
// normalized chunks come back on norm*_in_* (valid/ready, one chunk per
// beat, in the same order); a pass-through from out to in gives the network
// without normalization.
//
// Weight stream order (16-bit Q8.8 words): conv1 W, conv1 bias, conv2 W,
// conv2 bias, fc1 W, fc1 bias, fc2 W, fc2 bias, fc3 W, fc3 bias, each bank
// laid out as in weight_bank / conv_window_op / fc_layer; 259 194 words.
//
// Layer sizes follow the CifarNet configuration; the pooling window (2x2,
// stride 2), zero padding of 2 (to keep 24x24 and 12x12), the flattening
// order of fc1's input ((x*6+y)*32+c) and the parallelism are this design's
// choices. The defaults use 32 + 64 + 32 + 24 + 10 = 162 multipliers, with
// conv2 (two input channels per cycle) as the slowest layer at about 58k
// cycles per image. Batch mode is not used for this network (NB = 1).
module cifarnet_top
  import bps_pkg::*;
#(
  parameter int CONV1_CI_PAR = 1,
  parameter int CONV2_CI_PAR = 2,
  parameter int FC1_PAR = 32,
  parameter int FC2_PAR = 24,
  parameter int FC3_PAR = 10,
  parameter int FIFO_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  s_axis_tdata,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  input  logic         s_axis_tlast,
  output logic [15:0]  m_axis_tdata,
  output logic         m_axis_tvalid,
  input  logic         m_axis_tready,
  output logic         m_axis_tlast,
  output logic         norm1_out_valid,
  input  logic         norm1_out_ready,
  output logic [511:0] norm1_out_data,
  input  logic         norm1_in_valid,
  output logic         norm1_in_ready,
  input  logic [511:0] norm1_in_data,
  output logic         norm2_out_valid,
  input  logic         norm2_out_ready,
  output logic [511:0] norm2_out_data,
  input  logic         norm2_in_valid,
  output logic         norm2_in_ready,
  input  logic [511:0] norm2_in_data,
  output logic         weights_loaded,
  output logic [3:0]   layer_img_done
);
  localparam int NB = 1;
  localparam int NL = 4;
  localparam int MAXLEN = 576;
  localparam geom_t [MAX_LAYERS-1:0] CH = CIFARNET_CHAIN;
  localparam int C0 = 3, C1 = 32, C2 = 32;
  localparam int FC1_IN = 1152, FC1_OUT = 192, FC2_OUT = 48, FC3_OUT = 10;

  // bank sizes in 16-bit words
  localparam int B0_L = C1 * CONV1_CI_PAR, B0_D = 25 * (C0 / CONV1_CI_PAR);
  localparam int B2_L = C2 * CONV2_CI_PAR, B2_D = 25 * (C1 / CONV2_CI_PAR);
  localparam int B4_L = FC1_PAR,           B4_D = (FC1_OUT / FC1_PAR) * FC1_IN;
  localparam int B6_L = FC2_PAR,           B6_D = (FC2_OUT / FC2_PAR) * FC1_OUT;
  localparam int B8_L = FC3_PAR,           B8_D = (FC3_OUT / FC3_PAR) * FC2_OUT;
  localparam logic [9:0][31:0] SIZES = {
    32'(FC3_OUT), 32'(B8_L * B8_D),
    32'(FC2_OUT), 32'(B6_L * B6_D), 32'(FC1_OUT), 32'(B4_L * B4_D),
    32'(C2),      32'(B2_L * B2_D), 32'(C1),      32'(B0_L * B0_D)
  };

  // ---------------- AXI4-stream input FIFO and weight loading ----------------
  logic        in_v, in_r;
  logic [15:0] in_d;
  logic        tlast_unused;
  logic [9:0]  bank_we;
  logic [15:0] bank_data;
  logic        img_v, img_r;
  logic [15:0] img_d;

  stream_fifo #(.WIDTH(17), .DEPTH(FIFO_DEPTH)) u_axis_in_fifo (
    .clk, .rst_n,
    .in_valid(s_axis_tvalid), .in_ready(s_axis_tready), .in_data({s_axis_tlast, s_axis_tdata}),
    .out_valid(in_v), .out_ready(in_r), .out_data({tlast_unused, in_d})
  );

  weight_loader #(.NBANK(10), .SIZES(SIZES)) u_loader (
    .clk, .rst_n,
    .s_valid(in_v), .s_ready(in_r), .s_data(in_d),
    .bank_we, .bank_data, .done(weights_loaded),
    .img_valid(img_v), .img_ready(img_r), .img_data(img_d)
  );

  // ---------------- on-chip weight memory ----------------
  logic                     c1_wen, c2_wen, f1_wen, f2_wen, f3_wen;
  logic [$clog2(B0_D)-1:0]  c1_wa;
  logic [$clog2(B2_D)-1:0]  c2_wa;
  logic [$clog2(B4_D)-1:0]  f1_wa;
  logic [$clog2(B6_D)-1:0]  f2_wa;
  logic [$clog2(B8_D)-1:0]  f3_wa;
  logic [B0_L*16-1:0]       c1_w;
  logic [B2_L*16-1:0]       c2_w;
  logic [B4_L*16-1:0]       f1_w;
  logic [B6_L*16-1:0]       f2_w;
  logic [B8_L*16-1:0]       f3_w;
  logic [C1*16-1:0]         c1_b;
  logic [C2*16-1:0]         c2_b;
  logic [FC1_OUT*16-1:0]    f1_b;
  logic [FC2_OUT*16-1:0]    f2_b;
  logic [FC3_OUT*16-1:0]    f3_b;
  logic [9:0]               bank_full;

  weight_bank #(.LANES(B0_L), .DEPTH(B0_D)) u_w_conv1 (.clk, .rst_n, .wr_valid(bank_we[0]), .wr_data(bank_data),
    .full(bank_full[0]), .rd_en(c1_wen), .rd_addr(c1_wa), .rd_data(c1_w));
  weight_bank #(.LANES(C1), .DEPTH(1)) u_b_conv1 (.clk, .rst_n, .wr_valid(bank_we[1]), .wr_data(bank_data),
    .full(bank_full[1]), .rd_en(1'b1), .rd_addr(1'b0), .rd_data(c1_b));
  weight_bank #(.LANES(B2_L), .DEPTH(B2_D)) u_w_conv2 (.clk, .rst_n, .wr_valid(bank_we[2]), .wr_data(bank_data),
    .full(bank_full[2]), .rd_en(c2_wen), .rd_addr(c2_wa), .rd_data(c2_w));
  weight_bank #(.LANES(C2), .DEPTH(1)) u_b_conv2 (.clk, .rst_n, .wr_valid(bank_we[3]), .wr_data(bank_data),
    .full(bank_full[3]), .rd_en(1'b1), .rd_addr(1'b0), .rd_data(c2_b));
  weight_bank #(.LANES(B4_L), .DEPTH(B4_D)) u_w_fc1 (.clk, .rst_n, .wr_valid(bank_we[4]), .wr_data(bank_data),
    .full(bank_full[4]), .rd_en(f1_wen), .rd_addr(f1_wa), .rd_data(f1_w));
  weight_bank #(.LANES(FC1_OUT), .DEPTH(1)) u_b_fc1 (.clk, .rst_n, .wr_valid(bank_we[5]), .wr_data(bank_data),
    .full(bank_full[5]), .rd_en(1'b1), .rd_addr(1'b0), .rd_data(f1_b));
  weight_bank #(.LANES(B6_L), .DEPTH(B6_D)) u_w_fc2 (.clk, .rst_n, .wr_valid(bank_we[6]), .wr_data(bank_data),
    .full(bank_full[6]), .rd_en(f2_wen), .rd_addr(f2_wa), .rd_data(f2_w));
  weight_bank #(.LANES(FC2_OUT), .DEPTH(1)) u_b_fc2 (.clk, .rst_n, .wr_valid(bank_we[7]), .wr_data(bank_data),
    .full(bank_full[7]), .rd_en(1'b1), .rd_addr(1'b0), .rd_data(f2_b));
  weight_bank #(.LANES(B8_L), .DEPTH(B8_D)) u_w_fc3 (.clk, .rst_n, .wr_valid(bank_we[8]), .wr_data(bank_data),
    .full(bank_full[8]), .rd_en(f3_wen), .rd_addr(f3_wa), .rd_data(f3_w));
  weight_bank #(.LANES(FC3_OUT), .DEPTH(1)) u_b_fc3 (.clk, .rst_n, .wr_valid(bank_we[9]), .wr_data(bank_data),
    .full(bank_full[9]), .rd_en(1'b1), .rd_addr(1'b0), .rd_data(f3_b));

  // ---------------- computation module ----------------
  logic                 ib_v, ib_r;
  logic [C0*16-1:0]     ib_d;
  logic                 c1o_v, c1o_r, p1i_v, p1i_r;
  logic [C1*16-1:0]     c1o_d, p1i_d;
  logic                 c2i_v, c2i_r;
  logic [C1*16-1:0]     c2i_d;
  logic                 c2o_v, c2o_r, p2i_v, p2i_r;
  logic [C2*16-1:0]     c2o_d, p2i_d;
  logic                 f1i_v, f1i_r;
  logic [C2*16-1:0]     f1i_d;
  logic                 f1o_v, f1o_r, f2i_v, f2i_r;
  logic [15:0]          f1o_d, f2i_d;
  logic                 f2o_v, f2o_r, f3i_v, f3i_r;
  logic [15:0]          f2o_d, f3i_d;
  logic                 f3o_v, f3o_r;
  logic [15:0]          f3o_d;
  logic                 lb_v, lb_r;
  logic [7:0]           lb_d;
  logic                 p1_wen_unused, p2_wen_unused;
  logic                 p1_wa_unused, p2_wa_unused;

  image_batch_buffer #(.NL(NL), .CHAIN(CH), .NB(NB), .C(C0), .MAXLEN(MAXLEN)) u_image_batch (
    .clk, .rst_n,
    .in_valid(img_v), .in_ready(img_r), .in_data(img_d),
    .out_valid(ib_v), .out_ready(ib_r), .out_data(ib_d)
  );

  // group 1: conv1, pool1 (+ReLU), normalization outside
  window2d #(.NL(NL), .CHAIN(CH), .LAYER(0), .OP(OP_CONV), .CI(C0), .CO(C1),
             .CI_PAR(CONV1_CI_PAR), .NB(NB), .MAXLEN(MAXLEN)) u_conv1 (
    .clk, .rst_n,
    .in_valid(ib_v), .in_ready(ib_r), .in_data(ib_d),
    .out_valid(c1o_v), .out_ready(c1o_r), .out_data(c1o_d),
    .w_en(c1_wen), .w_addr(c1_wa), .w_data(c1_w), .bias(c1_b),
    .img_done(layer_img_done[0])
  );
  stream_fifo #(.WIDTH(C1*16), .DEPTH(FIFO_DEPTH)) u_fifo_c1p1 (
    .clk, .rst_n, .in_valid(c1o_v), .in_ready(c1o_r), .in_data(c1o_d),
    .out_valid(p1i_v), .out_ready(p1i_r), .out_data(p1i_d));
  window2d #(.NL(NL), .CHAIN(CH), .LAYER(1), .OP(OP_POOL), .CI(C1), .CO(C1), .NB(NB),
             .MAXLEN(MAXLEN), .WAW(1)) u_pool1 (
    .clk, .rst_n,
    .in_valid(p1i_v), .in_ready(p1i_r), .in_data(p1i_d),
    .out_valid(norm1_out_valid), .out_ready(norm1_out_ready), .out_data(norm1_out_data),
    .w_en(p1_wen_unused), .w_addr(p1_wa_unused), .w_data('0), .bias('0),
    .img_done(layer_img_done[1])
  );
  stream_fifo #(.WIDTH(C1*16), .DEPTH(FIFO_DEPTH)) u_fifo_n1c2 (
    .clk, .rst_n, .in_valid(norm1_in_valid), .in_ready(norm1_in_ready), .in_data(norm1_in_data),
    .out_valid(c2i_v), .out_ready(c2i_r), .out_data(c2i_d));

  // group 2: conv2, pool2 (+ReLU), normalization outside
  window2d #(.NL(NL), .CHAIN(CH), .LAYER(2), .OP(OP_CONV), .CI(C1), .CO(C2),
             .CI_PAR(CONV2_CI_PAR), .NB(NB), .MAXLEN(MAXLEN)) u_conv2 (
    .clk, .rst_n,
    .in_valid(c2i_v), .in_ready(c2i_r), .in_data(c2i_d),
    .out_valid(c2o_v), .out_ready(c2o_r), .out_data(c2o_d),
    .w_en(c2_wen), .w_addr(c2_wa), .w_data(c2_w), .bias(c2_b),
    .img_done(layer_img_done[2])
  );
  stream_fifo #(.WIDTH(C2*16), .DEPTH(FIFO_DEPTH)) u_fifo_c2p2 (
    .clk, .rst_n, .in_valid(c2o_v), .in_ready(c2o_r), .in_data(c2o_d),
    .out_valid(p2i_v), .out_ready(p2i_r), .out_data(p2i_d));
  window2d #(.NL(NL), .CHAIN(CH), .LAYER(3), .OP(OP_POOL), .CI(C2), .CO(C2), .NB(NB),
             .MAXLEN(MAXLEN), .WAW(1)) u_pool2 (
    .clk, .rst_n,
    .in_valid(p2i_v), .in_ready(p2i_r), .in_data(p2i_d),
    .out_valid(norm2_out_valid), .out_ready(norm2_out_ready), .out_data(norm2_out_data),
    .w_en(p2_wen_unused), .w_addr(p2_wa_unused), .w_data('0), .bias('0),
    .img_done(layer_img_done[3])
  );
  stream_fifo #(.WIDTH(C2*16), .DEPTH(FIFO_DEPTH)) u_fifo_n2f1 (
    .clk, .rst_n, .in_valid(norm2_in_valid), .in_ready(norm2_in_ready), .in_data(norm2_in_data),
    .out_valid(f1i_v), .out_ready(f1i_r), .out_data(f1i_d));

  // fully connected layers
  fc_layer #(.IN_LEN(FC1_IN), .OUT_LEN(FC1_OUT), .OUT_PAR(FC1_PAR), .IN_BEAT(C2), .NB(NB), .RELU(1'b1)) u_fc1 (
    .clk, .rst_n,
    .in_valid(f1i_v), .in_ready(f1i_r), .in_data(f1i_d),
    .out_valid(f1o_v), .out_ready(f1o_r), .out_data(f1o_d),
    .w_en(f1_wen), .w_addr(f1_wa), .w_data(f1_w), .bias(f1_b)
  );
  stream_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_f1f2 (
    .clk, .rst_n, .in_valid(f1o_v), .in_ready(f1o_r), .in_data(f1o_d),
    .out_valid(f2i_v), .out_ready(f2i_r), .out_data(f2i_d));
  fc_layer #(.IN_LEN(FC1_OUT), .OUT_LEN(FC2_OUT), .OUT_PAR(FC2_PAR), .IN_BEAT(1), .NB(NB), .RELU(1'b1)) u_fc2 (
    .clk, .rst_n,
    .in_valid(f2i_v), .in_ready(f2i_r), .in_data(f2i_d),
    .out_valid(f2o_v), .out_ready(f2o_r), .out_data(f2o_d),
    .w_en(f2_wen), .w_addr(f2_wa), .w_data(f2_w), .bias(f2_b)
  );
  stream_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_f2f3 (
    .clk, .rst_n, .in_valid(f2o_v), .in_ready(f2o_r), .in_data(f2o_d),
    .out_valid(f3i_v), .out_ready(f3i_r), .out_data(f3i_d));
  fc_layer #(.IN_LEN(FC2_OUT), .OUT_LEN(FC3_OUT), .OUT_PAR(FC3_PAR), .IN_BEAT(1), .NB(NB), .RELU(1'b0)) u_fc3 (
    .clk, .rst_n,
    .in_valid(f3i_v), .in_ready(f3i_r), .in_data(f3i_d),
    .out_valid(f3o_v), .out_ready(f3o_r), .out_data(f3o_d),
    .w_en(f3_wen), .w_addr(f3_wa), .w_data(f3_w), .bias(f3_b)
  );

  // softmax -> label, AXI4-stream output FIFO
  argmax_label #(.NCLASS(FC3_OUT), .NB(NB)) u_label (
    .clk, .rst_n,
    .in_valid(f3o_v), .in_ready(f3o_r), .in_data(f3o_d),
    .out_valid(lb_v), .out_ready(lb_r), .out_labels(lb_d)
  );

  logic        lo_v, lo_r, lo_last;
  logic [15:0] lo_d;
  label_batch_buffer #(.NB(NB)) u_label_batch (
    .clk, .rst_n,
    .in_valid(lb_v), .in_ready(lb_r), .in_labels(lb_d),
    .m_tvalid(lo_v), .m_tready(lo_r), .m_tdata(lo_d), .m_tlast(lo_last)
  );
  stream_fifo #(.WIDTH(17), .DEPTH(FIFO_DEPTH)) u_axis_out_fifo (
    .clk, .rst_n,
    .in_valid(lo_v), .in_ready(lo_r), .in_data({lo_last, lo_d}),
    .out_valid(m_axis_tvalid), .out_ready(m_axis_tready), .out_data({m_axis_tlast, m_axis_tdata})
  );

  // images must not arrive before the weights are complete
  assert property (@(posedge clk) disable iff (!rst_n) img_v |-> &bank_full);
endmodule
