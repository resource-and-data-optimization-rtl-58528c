// argmax_label: final classification stage. The network ends in a softmax;
// since softmax is monotonic, the label (class of highest probability) is the
// index of the largest score, which is all the accelerator sends out. No
// exponentials are computed: this reduction is this design's choice.
//
// Scores arrive one class per beat (NB images per beat, lane = image) over
// in_* for NCLASS beats. The running maximum and its index are kept per image;
// on a tie the lower index wins. After the last beat the NB labels are
// offered on out_* (8 bits per image) until accepted; input is held off
// meanwhile.
module argmax_label
  import bps_pkg::*;
#(
  parameter int NCLASS = 10,
  parameter int NB     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [NB*DATA_W-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NB*8-1:0]      out_labels
);
  logic [7:0] cls;
  data_t      best [NB];
  logic [7:0] best_idx [NB];

  assign in_ready = !out_valid;

  always_comb begin
    for (int b = 0; b < NB; b++) out_labels[b * 8 +: 8] = best_idx[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls       <= '0;
      out_valid <= 1'b0;
      for (int b = 0; b < NB; b++) begin
        best[b]     <= '0;
        best_idx[b] <= '0;
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        for (int b = 0; b < NB; b++) begin
          data_t v;
          v = data_t'(in_data[b * DATA_W +: DATA_W]);
          if (cls == '0 || v > best[b]) begin
            best[b]     <= v;
            best_idx[b] <= cls;
          end
        end
        if (cls == 8'(NCLASS - 1)) begin
          cls       <= '0;
          out_valid <= 1'b1;
        end else cls <= cls + 1'b1;
      end
    end
  end
endmodule
