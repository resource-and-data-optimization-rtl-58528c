// bps_pkg: shared types and constants of the backward-pipeline-scheduled CNN
// accelerator.
//
// Data are 16-bit signed fixed-point numbers (the accelerator is a 16-bit
// fixed-point design); the split into 8 integer and 8 fraction bits is this
// design's choice. A layer of the 2D-window chain is described by a geom_t:
// input height/width, window size F, stride S and zero padding Z. The chain
// constants below are the LeNet convolution/pooling layers (28x28 input,
// 5x5 conv -> 24x24x8, 2x2/2 pool -> 12x12x8, 5x5 conv -> 8x8x16,
// 2x2/2 pool -> 4x4x16) and the CifarNet convolution/pooling layers (24x24x3
// input, 5x5 pad-2 conv -> 24x24x32, 2x2/2 pool -> 12x12x32, 5x5 pad-2 conv ->
// 12x12x32, 2x2/2 pool -> 6x6x32). The CifarNet pooling window is not given,
// only the sizes; 2x2 stride 2 is this design's choice.
package bps_pkg;

  localparam int DATA_W = 16;   // fixed(16)
  localparam int FRAC_W = 8;    // fraction bits (design choice)
  localparam int ACC_W  = 48;   // accumulator width for MAC sums

  typedef logic signed [DATA_W-1:0] data_t;

  // Geometry of one 2D-window layer. 16-bit fields keep the packed struct small.
  typedef struct packed {
    logic [15:0] hi;  // input feature-map height
    logic [15:0] wi;  // input feature-map width
    logic [15:0] f;   // window size
    logic [15:0] s;   // stride
    logic [15:0] z;   // zero padding
  } geom_t;

  typedef enum logic [0:0] {OP_CONV = 1'b0, OP_POOL = 1'b1} win_op_e;

  // Output size of a window layer: (H + 2Z - F) / S + 1
  function automatic int out_h(geom_t g);
    return (int'(g.hi) + 2 * int'(g.z) - int'(g.f)) / int'(g.s) + 1;
  endfunction
  function automatic int out_w(geom_t g);
    return (int'(g.wi) + 2 * int'(g.z) - int'(g.f)) / int'(g.s) + 1;
  endfunction

  localparam int MAX_LAYERS = 4;

  // LeNet chain, index 0 = first layer (conv1).
  localparam geom_t [MAX_LAYERS-1:0] LENET_CHAIN = {
    16'd8,  16'd8,  16'd2, 16'd2, 16'd0,   // [3] pool2 : 8x8  -> 4x4
    16'd12, 16'd12, 16'd5, 16'd1, 16'd0,   // [2] conv2 : 12x12 -> 8x8
    16'd24, 16'd24, 16'd2, 16'd2, 16'd0,   // [1] pool1 : 24x24 -> 12x12
    16'd28, 16'd28, 16'd5, 16'd1, 16'd0    // [0] conv1 : 28x28 -> 24x24
  };

  // CifarNet chain, index 0 = first layer (conv1).
  localparam geom_t [MAX_LAYERS-1:0] CIFARNET_CHAIN = {
    16'd12, 16'd12, 16'd2, 16'd2, 16'd0,   // [3] pool2 : 12x12 -> 6x6
    16'd12, 16'd12, 16'd5, 16'd1, 16'd2,   // [2] conv2 : 12x12 -> 12x12
    16'd24, 16'd24, 16'd2, 16'd2, 16'd0,   // [1] pool1 : 24x24 -> 12x12
    16'd24, 16'd24, 16'd5, 16'd1, 16'd2    // [0] conv1 : 24x24 -> 24x24
  };

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat(logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(32767)) return 16'sh7fff;
    if (v < -ACC_W'(32768)) return 16'sh8000;
    return data_t'(v);
  endfunction

  // Requantise an accumulator in Q(2*FRAC_W) to a data word in Q(FRAC_W).
  function automatic data_t requant(logic signed [ACC_W-1:0] acc);
    return sat(acc >>> FRAC_W);
  endfunction

endpackage
