// weight_loader: step 1 of the accelerator's operation. The input stream first
// carries all weights and biases, then the images. This unit counts the
// incoming 16-bit words and steers the first SIZES[0] words to weight bank 0,
// the next SIZES[1] to bank 1, and so on (bank_we is one-hot, bank_data is the
// word). After the last weight word it sets done and from then on passes the
// stream unchanged to img_* (the image path), with ready flowing back.
// Weight words are always accepted at once (one per cycle). The order of the
// banks in the stream is this design's choice; the weights-then-images order
// follows the document.
module weight_loader #(
  parameter int NBANK = 8,
  parameter logic [NBANK-1:0][31:0] SIZES = {NBANK{32'd1}}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [15:0]      s_data,
  output logic [NBANK-1:0] bank_we,
  output logic [15:0]      bank_data,
  output logic             done,
  output logic             img_valid,
  input  logic             img_ready,
  output logic [15:0]      img_data
);
  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;

  logic [BW-1:0] bank;
  logic [31:0]   cnt;

  always_comb begin
    s_ready   = done ? img_ready : 1'b1;
    img_valid = done && s_valid;
    img_data  = s_data;
    bank_data = s_data;
    bank_we   = '0;
    if (!done && s_valid) bank_we[bank] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= '0;
      cnt  <= '0;
      done <= (NBANK == 0);
    end else if (!done && s_valid) begin
      if (cnt == SIZES[bank] - 1) begin
        cnt <= '0;
        if (bank == BW'(NBANK - 1)) done <= 1'b1;
        else bank <= bank + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
