// window_ctrl: control unit of a 2D-window layer. It carries out the layer
// schedule: receive input chunks in the order of the layer's data request
// list, and launch the window operation for output k as soon as the number of
// received chunks reaches curCompList[k].
//
// It holds the layer's List ROM (bps_sched_rom). In the CHECK state it either
//  - launches the window operation on the next output coordinate <x,y> of
//    nextList (when enough input has arrived) and hands the buffer RAM to it
//    through the arbiter (grant_op), then waits in WAIT until the operation is
//    idle again, i.e. its result has entered the output FIFO; or
//  - accepts one chunk from the input stream (in_valid/in_ready) and writes it
//    into the buffer matrix at the address curList[received]; or
//  - when every output of the image is done, restarts for the next image
//    (img_done pulses for one cycle).
// Computing has priority over receiving, so outputs leave as early as the
// schedule allows. One chunk can be written per cycle; a launch costs one
// cycle on top of the operation's own latency.
module window_ctrl
  import bps_pkg::*;
#(
  parameter int NL = 4,
  parameter geom_t [MAX_LAYERS-1:0] CHAIN = LENET_CHAIN,
  parameter int LAYER = 0,
  parameter int MAXLEN = 784,
  parameter int WIDTH = 16,
  parameter int AW = $clog2(MAXLEN),
  parameter int RAW = $clog2(int'(CHAIN[LAYER].hi) * int'(CHAIN[LAYER].wi))
) (
  input  logic             clk,
  input  logic             rst_n,
  // input stream of data chunks
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  // buffer RAM, control-unit side of the arbiter
  output logic             grant_op,
  output logic             cu_en,
  output logic             cu_we,
  output logic [RAW-1:0]   cu_addr,
  output logic [WIDTH-1:0] cu_wdata,
  // window operation control
  output logic             op_start,
  output logic [15:0]      op_x,
  output logic [15:0]      op_y,
  input  logic             op_idle,
  // status
  output logic             img_done
);
  typedef enum logic [0:0] {S_CHECK, S_WAIT} state_e;
  state_e state;

  logic [AW:0]   rcv_cnt, out_idx;
  logic [AW-1:0] cur_addr;
  logic [AW:0]   comp_cnt, cur_len, out_len;
  logic          can_compute, can_receive, all_done;

  bps_sched_rom #(.NL(NL), .CHAIN(CHAIN), .LAYER(LAYER), .MAXLEN(MAXLEN), .AW(AW)) u_list_rom (
    .cur_idx (rcv_cnt[AW-1:0]),
    .out_idx (out_idx[AW-1:0]),
    .cur_addr(cur_addr),
    .comp_cnt(comp_cnt),
    .out_x   (op_x),
    .out_y   (op_y),
    .cur_len (cur_len),
    .out_len (out_len)
  );

  always_comb begin
    can_compute = (state == S_CHECK) && (out_idx < out_len) && (rcv_cnt >= comp_cnt);
    can_receive = (state == S_CHECK) && !can_compute && (rcv_cnt < cur_len);
    all_done    = (state == S_CHECK) && (out_idx == out_len) && (rcv_cnt == cur_len);
    in_ready    = can_receive;
    cu_en       = in_valid && can_receive;
    cu_we       = cu_en;
    cu_addr     = RAW'(cur_addr);
    cu_wdata    = in_data;
    op_start    = can_compute;
    grant_op    = (state == S_WAIT);
    img_done    = all_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CHECK;
      rcv_cnt <= '0;
      out_idx <= '0;
    end else begin
      case (state)
        S_CHECK: begin
          if (can_compute) state <= S_WAIT;
          else if (cu_en) rcv_cnt <= rcv_cnt + 1'b1;
          else if (all_done) begin
            rcv_cnt <= '0;
            out_idx <= '0;
          end
        end
        S_WAIT: if (op_idle) begin
          out_idx <= out_idx + 1'b1;
          state   <= S_CHECK;
        end
        default: state <= S_CHECK;
      endcase
    end
  end

  // a launch must never precede its dependency set
  assert property (@(posedge clk) disable iff (!rst_n) op_start |-> rcv_cnt >= comp_cnt);
endmodule
