// image_batch_buffer: the image batch. Stores NB images streamed in one
// after the other (16-bit values, pixels in row-major order, the C channels of
// a pixel next to each other, image 0 first) and then feeds them to the first
// 2D-window layer as widened chunks: word k holds all C channels of pixel
// curList[k] of all NB images (lane = image*C + channel), in the order of the
// first layer's data request list from backward pipeline scheduling.
//
// LOAD accepts H*W*C*NB values (in_valid/in_ready, one per cycle). FEED offers
// the cur_len chunks on out_* (valid/ready, one per cycle); the RAM is read
// combinationally from the request-list address. Then it returns to LOAD. The
// image memory has one word per pixel position, NB pixels wide. Storing the
// whole batch before computing follows the document; the request-order read
// out is this design's way of meeting the first layer's schedule.
module image_batch_buffer
  import bps_pkg::*;
#(
  parameter int NL = 4,
  parameter geom_t [MAX_LAYERS-1:0] CHAIN = LENET_CHAIN,
  parameter int NB = 1,
  parameter int C = 1,
  parameter int MAXLEN = 784
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DATA_W-1:0]    in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NB*C*DATA_W-1:0] out_data
);
  localparam int H  = int'(CHAIN[0].hi);
  localparam int W  = int'(CHAIN[0].wi);
  localparam int AW = $clog2(MAXLEN);
  localparam int PA = $clog2(H * W);
  localparam int BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int CW = (C > 1) ? $clog2(C) : 1;

  typedef enum logic [0:0] {S_LOAD, S_FEED} state_e;
  state_e state;

  logic [NB*C*DATA_W-1:0] mem [H*W];
  logic [PA-1:0]  wpix;
  logic [BW-1:0]  wimg;
  logic [CW-1:0]  wch;
  logic [AW:0]    ridx;
  logic [AW-1:0]  raddr;
  logic [AW:0]    cur_len, comp_unused, out_len_unused;
  logic [15:0]    ox_unused, oy_unused;

  bps_sched_rom #(.NL(NL), .CHAIN(CHAIN), .LAYER(0), .MAXLEN(MAXLEN), .AW(AW)) u_list_rom (
    .cur_idx (ridx[AW-1:0]),
    .out_idx ('0),
    .cur_addr(raddr),
    .comp_cnt(comp_unused),
    .out_x   (ox_unused),
    .out_y   (oy_unused),
    .cur_len (cur_len),
    .out_len (out_len_unused)
  );

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_FEED);
  assign out_data  = mem[PA'(raddr)];

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) mem[wpix][(int'(wimg) * C + int'(wch)) * DATA_W +: DATA_W] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      wpix <= '0; wimg <= '0; wch <= '0; ridx <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (wch != CW'(C - 1)) begin
            wch <= wch + 1'b1;
          end else if (wpix == PA'(H * W - 1)) begin
            wch <= '0;
            wpix <= '0;
            if (wimg == BW'(NB - 1)) begin
              wimg <= '0; ridx <= '0; state <= S_FEED;
            end else wimg <= wimg + 1'b1;
          end else begin
            wch <= '0; wpix <= wpix + 1'b1;
          end
        end
        S_FEED: if (out_ready) begin
          if (ridx == cur_len - 1'b1) begin
            ridx <= '0; state <= S_LOAD;
          end else ridx <= ridx + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
