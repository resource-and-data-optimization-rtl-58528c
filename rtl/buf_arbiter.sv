// buf_arbiter: hands the single port of the buffer matrix RAM to either the
// control unit or the window operation module.
//
// The control unit owns the RAM while it stores incoming chunks and transfers
// the service to the window operation when it launches a computation
// (grant_op=1). The arbiter multiplexes the memory signals (enable, write
// enable, address, write data) of the selected requester onto the RAM port;
// the read data goes to both. The window operation only reads. The grant is
// driven by the control unit (arbiter control), so there is no contention to
// resolve; a request from the side without the grant is flagged by an
// assertion.
module buf_arbiter #(
  parameter int WIDTH = 16,
  parameter int AW    = 10
) (
  input  logic             clk,
  input  logic             grant_op,     // 1: window operation owns the port
  // control unit side (writes)
  input  logic             cu_en,
  input  logic             cu_we,
  input  logic [AW-1:0]    cu_addr,
  input  logic [WIDTH-1:0] cu_wdata,
  // window operation side (reads)
  input  logic             op_en,
  input  logic [AW-1:0]    op_addr,
  // RAM port
  output logic             ram_en,
  output logic             ram_we,
  output logic [AW-1:0]    ram_addr,
  output logic [WIDTH-1:0] ram_wdata
);
  always_comb begin
    if (grant_op) begin
      ram_en    = op_en;
      ram_we    = 1'b0;
      ram_addr  = op_addr;
      ram_wdata = '0;
    end else begin
      ram_en    = cu_en;
      ram_we    = cu_we;
      ram_addr  = cu_addr;
      ram_wdata = cu_wdata;
    end
  end

  assert property (@(posedge clk) grant_op |-> !cu_en);
  assert property (@(posedge clk) !grant_op |-> !op_en);
endmodule
