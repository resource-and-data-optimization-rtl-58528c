// window2d: generic 2D-window layer module (convolution or max-pooling+ReLU).
//
// Structure: a control unit (window_ctrl, holding the List ROM of the layer's
// backward-pipeline schedule), a buffer matrix RAM (buffer_ram) with one
// chunk per input coordinate, an arbiter (buf_arbiter) giving the RAM port to
// the control unit while it stores input and to the window operation while it
// computes, and the window operation itself, selected by OP: conv_window_op or
// pool_window_op. The geometry (H, W, F, S, Z) is taken from CHAIN[LAYER].
//
// Data chunks are NB*C words of 16 bits (lane = b*C + c): in batch mode the
// FIFOs and buffer are widened N times and one control unit serves all
// images. Input chunks arrive over in_* in request-list order; output chunks
// leave over out_* in the next layer's request order. The weight port is used
// only by convolution layers; a pooling instance leaves w_en low and ignores
// w_data and bias.
module window2d
  import bps_pkg::*;
#(
  parameter int NL = 4,
  parameter geom_t [MAX_LAYERS-1:0] CHAIN = LENET_CHAIN,
  parameter int LAYER = 0,
  parameter win_op_e OP = OP_CONV,
  parameter int CI = 1,
  parameter int CO = 8,
  parameter int CI_PAR = 1,
  parameter int NB = 1,
  parameter int MAXLEN = 784,
  parameter int WAW = $clog2(int'(CHAIN[LAYER].f) * int'(CHAIN[LAYER].f) * (CI / CI_PAR))
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [NB*CI*DATA_W-1:0]     in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [NB*CO*DATA_W-1:0]     out_data,
  output logic                        w_en,
  output logic [WAW-1:0]              w_addr,
  input  logic [CO*CI_PAR*DATA_W-1:0] w_data,
  input  logic [CO*DATA_W-1:0]        bias,
  output logic                        img_done
);
  localparam int HI  = int'(CHAIN[LAYER].hi);
  localparam int WI  = int'(CHAIN[LAYER].wi);
  localparam int F   = int'(CHAIN[LAYER].f);
  localparam int S   = int'(CHAIN[LAYER].s);
  localparam int Z   = int'(CHAIN[LAYER].z);
  localparam int IW  = NB * CI * DATA_W;
  localparam int RAW = $clog2(HI * WI);

  logic           grant_op, cu_en, cu_we, op_en, ram_en, ram_we;
  logic [RAW-1:0] cu_addr, op_addr, ram_addr;
  logic [IW-1:0]  cu_wdata, ram_wdata, ram_rdata;
  logic           op_start, op_idle;
  logic [15:0]    op_x, op_y;

  window_ctrl #(.NL(NL), .CHAIN(CHAIN), .LAYER(LAYER), .MAXLEN(MAXLEN), .WIDTH(IW), .RAW(RAW)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .grant_op, .cu_en, .cu_we, .cu_addr, .cu_wdata,
    .op_start, .op_x, .op_y, .op_idle,
    .img_done
  );

  buf_arbiter #(.WIDTH(IW), .AW(RAW)) u_arb (
    .clk, .grant_op,
    .cu_en, .cu_we, .cu_addr, .cu_wdata,
    .op_en, .op_addr,
    .ram_en, .ram_we, .ram_addr, .ram_wdata
  );

  buffer_ram #(.WIDTH(IW), .DEPTH(HI * WI), .AW(RAW)) u_buf (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  if (OP == OP_CONV) begin : g_conv
    conv_window_op #(.HI(HI), .WI(WI), .F(F), .S(S), .Z(Z), .CI(CI), .CO(CO),
                     .CI_PAR(CI_PAR), .NB(NB), .AW(RAW), .WAW(WAW)) u_op (
      .clk, .rst_n,
      .start(op_start), .x(op_x), .y(op_y), .idle(op_idle),
      .ram_en(op_en), .ram_addr(op_addr), .ram_rdata,
      .w_en, .w_addr, .w_data, .bias,
      .out_valid, .out_ready, .out_data
    );
  end else begin : g_pool
    pool_window_op #(.HI(HI), .WI(WI), .F(F), .S(S), .Z(Z), .C(CI), .NB(NB), .AW(RAW)) u_op (
      .clk, .rst_n,
      .start(op_start), .x(op_x), .y(op_y), .idle(op_idle),
      .ram_en(op_en), .ram_addr(op_addr), .ram_rdata,
      .out_valid, .out_ready, .out_data
    );
    assign w_en   = 1'b0;
    assign w_addr = '0;
  end

  initial assert (OP != OP_POOL || CI == CO) else $error("pooling keeps the channel count");
endmodule
