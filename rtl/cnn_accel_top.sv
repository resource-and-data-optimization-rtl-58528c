// cnn_accel_top: the two backward-pipeline-scheduled accelerators side by
// side, LeNet (MNIST, 28x28x1 images) and CifarNet (Cifar-10, 24x24x3
// images). They share nothing but the clock and reset; each has its own
// AXI4-stream input (weights first, then images) and label output, and the
// CifarNet normalization ports are brought out because the normalization
// function lies outside this RTL. All timing and formats are those of
// lenet_top and cifarnet_top, instantiated at their default parameters.
// Putting both networks into one top is this design's packaging choice; on a
// device one of them would normally be built.
module cnn_accel_top (
  input  logic         clk,
  input  logic         rst_n,
  // LeNet accelerator
  input  logic [15:0]  lenet_s_axis_tdata,
  input  logic         lenet_s_axis_tvalid,
  output logic         lenet_s_axis_tready,
  input  logic         lenet_s_axis_tlast,
  output logic [15:0]  lenet_m_axis_tdata,
  output logic         lenet_m_axis_tvalid,
  input  logic         lenet_m_axis_tready,
  output logic         lenet_m_axis_tlast,
  output logic         lenet_weights_loaded,
  output logic [3:0]   lenet_layer_img_done,
  // CifarNet accelerator
  input  logic [15:0]  cifar_s_axis_tdata,
  input  logic         cifar_s_axis_tvalid,
  output logic         cifar_s_axis_tready,
  input  logic         cifar_s_axis_tlast,
  output logic [15:0]  cifar_m_axis_tdata,
  output logic         cifar_m_axis_tvalid,
  input  logic         cifar_m_axis_tready,
  output logic         cifar_m_axis_tlast,
  output logic         cifar_norm1_out_valid,
  input  logic         cifar_norm1_out_ready,
  output logic [511:0] cifar_norm1_out_data,
  input  logic         cifar_norm1_in_valid,
  output logic         cifar_norm1_in_ready,
  input  logic [511:0] cifar_norm1_in_data,
  output logic         cifar_norm2_out_valid,
  input  logic         cifar_norm2_out_ready,
  output logic [511:0] cifar_norm2_out_data,
  input  logic         cifar_norm2_in_valid,
  output logic         cifar_norm2_in_ready,
  input  logic [511:0] cifar_norm2_in_data,
  output logic         cifar_weights_loaded,
  output logic [3:0]   cifar_layer_img_done
);
  lenet_top u_lenet (
    .clk, .rst_n,
    .s_axis_tdata(lenet_s_axis_tdata), .s_axis_tvalid(lenet_s_axis_tvalid),
    .s_axis_tready(lenet_s_axis_tready), .s_axis_tlast(lenet_s_axis_tlast),
    .m_axis_tdata(lenet_m_axis_tdata), .m_axis_tvalid(lenet_m_axis_tvalid),
    .m_axis_tready(lenet_m_axis_tready), .m_axis_tlast(lenet_m_axis_tlast),
    .weights_loaded(lenet_weights_loaded), .layer_img_done(lenet_layer_img_done)
  );

  cifarnet_top u_cifar (
    .clk, .rst_n,
    .s_axis_tdata(cifar_s_axis_tdata), .s_axis_tvalid(cifar_s_axis_tvalid),
    .s_axis_tready(cifar_s_axis_tready), .s_axis_tlast(cifar_s_axis_tlast),
    .m_axis_tdata(cifar_m_axis_tdata), .m_axis_tvalid(cifar_m_axis_tvalid),
    .m_axis_tready(cifar_m_axis_tready), .m_axis_tlast(cifar_m_axis_tlast),
    .norm1_out_valid(cifar_norm1_out_valid), .norm1_out_ready(cifar_norm1_out_ready),
    .norm1_out_data(cifar_norm1_out_data),
    .norm1_in_valid(cifar_norm1_in_valid), .norm1_in_ready(cifar_norm1_in_ready),
    .norm1_in_data(cifar_norm1_in_data),
    .norm2_out_valid(cifar_norm2_out_valid), .norm2_out_ready(cifar_norm2_out_ready),
    .norm2_out_data(cifar_norm2_out_data),
    .norm2_in_valid(cifar_norm2_in_valid), .norm2_in_ready(cifar_norm2_in_ready),
    .norm2_in_data(cifar_norm2_in_data),
    .weights_loaded(cifar_weights_loaded), .layer_img_done(cifar_layer_img_done)
  );
endmodule
