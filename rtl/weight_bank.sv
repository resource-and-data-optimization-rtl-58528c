// weight_bank: on-chip weight (or bias) memory of one layer.
//
// All weights stay on chip after they have been streamed in once, so every
// layer reads its own bank without sharing a port with other layers. A bank
// holds DEPTH words of LANES 16-bit values. It is filled serially, one 16-bit
// value per wr_valid, lane 0 first then lane 1 ... of address 0, then address
// 1, and so on; full rises after DEPTH*LANES values. The read port returns the
// whole LANES-wide word one cycle after rd_en (synchronous, block-RAM style).
// Writes after full are ignored. The serial fill order and the word shape
// (chosen to match the consumer's parallelism) are this design's choices.
module weight_bank #(
  parameter int LANES = 8,
  parameter int DEPTH = 25,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_valid,
  input  logic [15:0]           wr_data,
  output logic                  full,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [LANES*16-1:0]   rd_data
);
  localparam int LW = (LANES > 1) ? $clog2(LANES) : 1;

  logic [LANES*16-1:0] mem [DEPTH];
  logic [AW-1:0]       wa;
  logic [LW-1:0]       wl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa   <= '0;
      wl   <= '0;
      full <= 1'b0;
    end else if (wr_valid && !full) begin
      if (wl == LW'(LANES - 1)) begin
        wl <= '0;
        if (wa == AW'(DEPTH - 1)) full <= 1'b1;
        else wa <= wa + 1'b1;
      end else begin
        wl <= wl + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !full) mem[wa][int'(wl) * 16 +: 16] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
