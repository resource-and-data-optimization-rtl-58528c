// buffer_ram: the buffer matrix of a 2D-window layer, one chunk per
// feature-map coordinate.
//
// A single-port RAM of DEPTH words (H*W of the layer's input feature map),
// each WIDTH bits wide: one data chunk, i.e. all channels at one coordinate,
// widened N times in batch mode so that the N images of a batch sit side by
// side in one word. Writes take effect at the clock edge; reads are
// synchronous with one cycle of latency (rdata valid the cycle after a read
// with en=1, we=0), as a block RAM behaves. The single port is shared between
// the control unit and the window operation through buf_arbiter.
module buffer_ram #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 784,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
