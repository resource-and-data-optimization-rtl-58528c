// label_batch_buffer: the label batch. Holds the NB labels of one batch and
// streams them out one per beat in image order on an AXI4-stream style
// master port (tvalid/tready, tlast on the batch's last label, label in the
// low byte of a 16-bit tdata).
//
// A batch of labels is accepted (in_valid/in_ready) only when the previous
// batch has been fully sent. Timing: one label per cycle while m_tready is
// high. The 16-bit word and tlast use are this design's choices.
module label_batch_buffer #(
  parameter int NB = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [NB*8-1:0] in_labels,
  output logic            m_tvalid,
  input  logic            m_tready,
  output logic [15:0]     m_tdata,
  output logic            m_tlast
);
  localparam int CW = (NB > 1) ? $clog2(NB) : 1;

  logic [NB*8-1:0] labels;
  logic [CW-1:0]   pos;
  logic            full;

  assign in_ready = !full;
  assign m_tvalid = full;
  assign m_tdata  = {8'd0, labels[int'(pos) * 8 +: 8]};
  assign m_tlast  = (pos == CW'(NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= 1'b0;
      pos    <= '0;
      labels <= '0;
    end else if (!full) begin
      if (in_valid) begin
        labels <= in_labels;
        full   <= 1'b1;
        pos    <= '0;
      end
    end else if (m_tready) begin
      if (m_tlast) full <= 1'b0;
      else pos <= pos + 1'b1;
    end
  end
endmodule
