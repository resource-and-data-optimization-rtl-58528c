// pool_window_op: the window operation of a pooling layer. For the output
// coordinate <x,y> it takes, per channel and per image of the batch, the
// maximum over the F x F window at stride S (Z = padding, padded taps are
// skipped), then applies ReLU, max(v, 0), and packs the C x NB results into
// one output chunk.
//
// On start the window taps are read from the buffer matrix one per cycle
// (h outer, w inner); one cycle after each read the running maxima of all
// C*NB lanes are updated in parallel. Timing: F*F + 2 cycles from start to
// out_valid, held until out_ready. Pooling and ReLU in one module follow the
// document; the tap order and handshake are this design's choices.
module pool_window_op
  import bps_pkg::*;
#(
  parameter int HI = 24, parameter int WI = 24,
  parameter int F  = 2,  parameter int S  = 2, parameter int Z = 0,
  parameter int C  = 8,
  parameter int NB = 1,
  parameter int AW = $clog2(HI * WI)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [15:0]             x,
  input  logic [15:0]             y,
  output logic                    idle,
  output logic                    ram_en,
  output logic [AW-1:0]           ram_addr,
  input  logic [NB*C*DATA_W-1:0]  ram_rdata,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [NB*C*DATA_W-1:0]  out_data
);
  localparam int STEPS = F * F;
  localparam int SW    = $clog2(STEPS + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [SW-1:0] step;
  logic [15:0]   th, tw;
  logic signed [16:0] bx, by;
  logic signed [17:0] m, n;
  logic          inrange;
  logic          p_valid, p_inrange, have;
  data_t         mx [NB*C];

  // idle already in the cycle the result is handed over, so the control
  // unit can move on without losing a cycle
  assign idle = (state == S_IDLE) || (state == S_OUT && out_ready);

  always_comb begin
    m = 18'(bx) + 18'(signed'({2'b0, th}));
    n = 18'(by) + 18'(signed'({2'b0, tw}));
    inrange  = (m >= 0) && (m < HI) && (n >= 0) && (n < WI);
    ram_en   = (state == S_RUN) && inrange;
    ram_addr = inrange ? AW'(m * WI + n) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step <= '0; th <= '0; tw <= '0; bx <= '0; by <= '0;
      p_valid <= 1'b0; p_inrange <= 1'b0;
    end else begin
      p_valid   <= (state == S_RUN);
      p_inrange <= inrange;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          step <= '0; th <= '0; tw <= '0;
          bx <= 17'(signed'({1'b0, x}) * S) - 17'(Z);
          by <= 17'(signed'({1'b0, y}) * S) - 17'(Z);
        end
        S_RUN: begin
          step <= step + 1'b1;
          if (tw == 16'(F - 1)) begin
            tw <= '0;
            th <= th + 1'b1;
          end else tw <= tw + 1'b1;
          if (step == SW'(STEPS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_OUT;
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // running maximum per lane
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      have <= 1'b0;
    end else if (p_valid && p_inrange) begin
      have <= 1'b1;
      for (int l = 0; l < NB * C; l++) begin
        data_t v;
        v = data_t'(ram_rdata[l * DATA_W +: DATA_W]);
        if (!have || v > mx[l]) mx[l] <= v;
      end
    end
  end

  // ReLU and pack
  always_comb begin
    for (int l = 0; l < NB * C; l++)
      out_data[l * DATA_W +: DATA_W] = (have && mx[l] > 0) ? mx[l] : '0;
  end
  assign out_valid = (state == S_OUT);

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
