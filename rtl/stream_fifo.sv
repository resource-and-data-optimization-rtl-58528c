// stream_fifo: synchronous first-in first-out buffer with a valid/ready
// handshake on both sides.
//
// Used for the FIFOs that connect consecutive layers (a layer enqueues each
// computed data chunk, the next layer dequeues it) and as the buffering FIFO
// of the AXI4-stream interfaces. Storage is a circular array of DEPTH words
// with read/write pointers and an occupancy counter. A word written in cycle t
// is visible at the output (out_valid) in cycle t+1; reading and writing in
// the same cycle is allowed when the FIFO is full. Depth, width and the
// handshake are this design's choices; the FIFO role follows the document.
module stream_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;
  logic             push, pop;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (PW+1)'(DEPTH)) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // handshake rules
  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid);
endmodule
