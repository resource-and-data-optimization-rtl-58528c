// conv_window_op: the window operation of a convolution layer. Computes one
// output data chunk O[.,x,y] = sum_{ci,h,w} K[co,ci,h,w] * I[ci,xS+h-Z,yS+w-Z]
// + bias[co] for all output channels of all NB images of a batch at once.
//
// On start it walks the F x F window taps (h outer, w inner) and, for each
// tap, the CI/CI_PAR groups of input channels. Every cycle it issues one read
// of the buffer matrix (the chunk at the tap) and one read of the weight bank
// (the CO x CI_PAR weights of that tap and group). One cycle later
// CO x CI_PAR x NB multiply-accumulates run in parallel; all NB images share
// the same weight word, as in the batched convolution. Taps that fall into the
// zero padding are read as zero. After the last tap the accumulators, plus
// the bias, are requantised to 16 bits, packed into one chunk and offered on
// the output (valid/ready) until the layer FIFO takes it.
//
// Timing: F*F*(CI/CI_PAR) + 2 cycles from start to out_valid, then one cycle
// per handshake. Unrolling of the output-channel and batch loops follows the
// document; CI_PAR (how many input channels per cycle) is the latency
// balancing knob. Weight word layout lane = co*CI_PAR + j at address
// (h*F + w)*(CI/CI_PAR) + g, and chunk layout lane = b*C + c, are this
// design's choices.
module conv_window_op
  import bps_pkg::*;
#(
  parameter int HI = 28, parameter int WI = 28,
  parameter int F  = 5,  parameter int S  = 1, parameter int Z = 0,
  parameter int CI = 1,  parameter int CO = 8,
  parameter int CI_PAR = 1,
  parameter int NB = 1,
  parameter int AW  = $clog2(HI * WI),
  parameter int WAW = $clog2(F * F * (CI / CI_PAR))
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [15:0]                x,
  input  logic [15:0]                y,
  output logic                       idle,
  // buffer matrix read port (through the arbiter)
  output logic                       ram_en,
  output logic [AW-1:0]              ram_addr,
  input  logic [NB*CI*DATA_W-1:0]    ram_rdata,
  // weight bank read port
  output logic                       w_en,
  output logic [WAW-1:0]             w_addr,
  input  logic [CO*CI_PAR*DATA_W-1:0] w_data,
  input  logic [CO*DATA_W-1:0]       bias,
  // output chunk
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [NB*CO*DATA_W-1:0]    out_data
);
  localparam int G     = CI / CI_PAR;
  localparam int STEPS = F * F * G;
  localparam int SW    = $clog2(STEPS + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [SW-1:0] step;
  logic [15:0]   th, tw, tg;          // current tap and channel group
  logic signed [16:0] bx, by;         // window origin xS-Z, yS-Z
  logic signed [17:0] m, n;
  logic          inrange;
  // stage-1 (data returned) bookkeeping
  logic          p_valid, p_inrange;
  logic [15:0]   p_g;

  logic signed [ACC_W-1:0] acc [NB][CO];

  // idle already in the cycle the result is handed over, so the control
  // unit can move on without losing a cycle
  assign idle = (state == S_IDLE) || (state == S_OUT && out_ready);

  always_comb begin
    m = 18'(bx) + 18'(signed'({2'b0, th}));
    n = 18'(by) + 18'(signed'({2'b0, tw}));
    inrange = (m >= 0) && (m < HI) && (n >= 0) && (n < WI);
    ram_en   = (state == S_RUN) && inrange;
    ram_addr = inrange ? AW'(m * WI + n) : '0;
    w_en     = (state == S_RUN);
    w_addr   = WAW'((th * F + tw) * G + tg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step <= '0; th <= '0; tw <= '0; tg <= '0;
      bx <= '0; by <= '0;
      p_valid <= 1'b0; p_inrange <= 1'b0; p_g <= '0;
    end else begin
      p_valid   <= (state == S_RUN);
      p_inrange <= inrange;
      p_g       <= tg;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          step <= '0; th <= '0; tw <= '0; tg <= '0;
          bx <= 17'(signed'({1'b0, x}) * S) - 17'(Z);
          by <= 17'(signed'({1'b0, y}) * S) - 17'(Z);
        end
        S_RUN: begin
          step <= step + 1'b1;
          if (tg == 16'(G - 1)) begin
            tg <= '0;
            if (tw == 16'(F - 1)) begin
              tw <= '0;
              th <= th + 1'b1;
            end else tw <= tw + 1'b1;
          end else tg <= tg + 1'b1;
          if (step == SW'(STEPS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_OUT;
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // parallel multiply-accumulate: CO x CI_PAR x NB lanes
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int b = 0; b < NB; b++)
        for (int co = 0; co < CO; co++) acc[b][co] <= '0;
    end else if (p_valid && p_inrange) begin
      for (int b = 0; b < NB; b++)
        for (int co = 0; co < CO; co++) begin
          logic signed [ACC_W-1:0] sum;
          sum = acc[b][co];
          for (int j = 0; j < CI_PAR; j++) begin
            data_t wv, iv;
            logic signed [2*DATA_W-1:0] prod;
            wv = data_t'(w_data[(co * CI_PAR + j) * DATA_W +: DATA_W]);
            iv = data_t'(ram_rdata[(b * CI + int'(p_g) * CI_PAR + j) * DATA_W +: DATA_W]);
            prod = wv * iv;
            sum = sum + ACC_W'(prod);
          end
          acc[b][co] <= sum;
        end
    end
  end

  // requantise with bias and pack
  always_comb begin
    for (int b = 0; b < NB; b++)
      for (int co = 0; co < CO; co++) begin
        logic signed [ACC_W-1:0] bsum;
        bsum = acc[b][co] + (ACC_W'(data_t'(bias[co * DATA_W +: DATA_W])) <<< FRAC_W);
        out_data[(b * CO + co) * DATA_W +: DATA_W] = requant(bsum);
      end
  end
  assign out_valid = (state == S_OUT);

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
