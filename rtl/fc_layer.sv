// fc_layer: fully connected layer, y = relu?(W x + b), computed as a
// paralleled matrix-vector multiplication for NB images at once.
//
// LOAD: input beats of IN_BEAT values per image arrive over in_* (valid/ready)
// and are stored into the input vector buffer; element index =
// beat*IN_BEAT + c, i.e. a feature map arrives coordinate by coordinate with
// its channels in each beat. COMPUTE: the OUT_LEN outputs are produced in
// OUT_LEN/OUT_PAR passes; in each pass OUT_PAR x NB multiply-accumulates run
// per cycle over the IN_LEN inputs, the weight word of address
// p*IN_LEN + i holding W[p*OUT_PAR + j][i] in lane j (all images share it).
// At the end of a pass the sums plus bias are requantised to 16 bits,
// optionally passed through ReLU, and stored. EMIT: the OUT_LEN results leave
// one neuron per beat (NB values per beat, lane = image).
//
// Timing: IN_LEN/IN_BEAT load beats, then (IN_LEN + 2) cycles per pass, then
// OUT_LEN output beats. The degree of parallelism per layer is this design's
// choice, sized from the layer latencies reported for the balanced design.
module fc_layer
  import bps_pkg::*;
#(
  parameter int IN_LEN  = 256,
  parameter int OUT_LEN = 128,
  parameter int OUT_PAR = 16,
  parameter int IN_BEAT = 16,
  parameter int NB      = 1,
  parameter bit RELU    = 1'b1,
  parameter int WAW     = $clog2((OUT_LEN / OUT_PAR) * IN_LEN)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [NB*IN_BEAT*DATA_W-1:0] in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [NB*DATA_W-1:0]        out_data,
  output logic                        w_en,
  output logic [WAW-1:0]              w_addr,
  input  logic [OUT_PAR*DATA_W-1:0]   w_data,
  input  logic [OUT_LEN*DATA_W-1:0]   bias
);
  localparam int NPASS = OUT_LEN / OUT_PAR;
  localparam int NBEAT = IN_LEN / IN_BEAT;
  localparam int IW    = $clog2(IN_LEN + 1);
  localparam int OW    = $clog2(OUT_LEN + 1);
  localparam int PW    = $clog2(NPASS + 1);

  typedef enum logic [2:0] {S_LOAD, S_COMP, S_DRAIN, S_WB, S_EMIT} state_e;
  state_e state;

  data_t xbuf [NB][IN_LEN];
  data_t ybuf [NB][OUT_LEN];
  logic signed [ACC_W-1:0] acc [NB][OUT_PAR];

  logic [IW-1:0] idx;      // input beat (LOAD) or input element (COMP)
  logic [PW-1:0] pass;
  logic [OW-1:0] oidx;
  logic          p_valid;
  logic [IW-1:0] p_idx;

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_EMIT);
  assign w_en      = (state == S_COMP);
  assign w_addr    = WAW'(int'(pass) * IN_LEN + int'(idx));

  always_comb begin
    for (int b = 0; b < NB; b++) out_data[b * DATA_W +: DATA_W] = ybuf[b][oidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      idx <= '0; pass <= '0; oidx <= '0;
      p_valid <= 1'b0; p_idx <= '0;
    end else begin
      p_valid <= (state == S_COMP);
      p_idx   <= idx;
      case (state)
        S_LOAD: if (in_valid) begin
          if (idx == IW'(NBEAT - 1)) begin
            idx <= '0; pass <= '0; state <= S_COMP;
          end else idx <= idx + 1'b1;
        end
        S_COMP: begin
          if (idx == IW'(IN_LEN - 1)) begin
            idx <= '0; state <= S_DRAIN;
          end else idx <= idx + 1'b1;
        end
        S_DRAIN: state <= S_WB;
        S_WB: begin
          if (pass == PW'(NPASS - 1)) begin
            oidx <= '0; state <= S_EMIT;
          end else begin
            pass <= pass + 1'b1; state <= S_COMP;
          end
        end
        S_EMIT: if (out_ready) begin
          if (oidx == OW'(OUT_LEN - 1)) begin
            oidx <= '0; state <= S_LOAD;
          end else oidx <= oidx + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // input vector buffer
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < IN_BEAT; c++)
          xbuf[b][int'(idx) * IN_BEAT + c] <= data_t'(in_data[(b * IN_BEAT + c) * DATA_W +: DATA_W]);
  end

  // MAC array and pass write-back
  always_ff @(posedge clk) begin
    if (p_valid) begin
      for (int b = 0; b < NB; b++)
        for (int j = 0; j < OUT_PAR; j++) begin
          logic signed [ACC_W-1:0] base;
          logic signed [2*DATA_W-1:0] prod;
          base = (p_idx == '0) ? '0 : acc[b][j];
          prod = data_t'(w_data[j * DATA_W +: DATA_W]) * xbuf[b][p_idx];
          acc[b][j] <= base + ACC_W'(prod);
        end
    end
    if (state == S_WB) begin
      for (int b = 0; b < NB; b++)
        for (int j = 0; j < OUT_PAR; j++) begin
          logic signed [ACC_W-1:0] s;
          data_t r;
          s = acc[b][j] + (ACC_W'(data_t'(bias[(int'(pass) * OUT_PAR + j) * DATA_W +: DATA_W])) <<< FRAC_W);
          r = requant(s);
          ybuf[b][int'(pass) * OUT_PAR + j] <= (RELU && r < 0) ? '0 : r;
        end
    end
  end

  initial assert (OUT_LEN % OUT_PAR == 0 && IN_LEN % IN_BEAT == 0)
    else $error("fc_layer: OUT_PAR must divide OUT_LEN and IN_BEAT must divide IN_LEN");
endmodule
