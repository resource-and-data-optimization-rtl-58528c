// tb_buffer_ram: writes random chunks to random addresses of the buffer
// matrix and reads them back, checking the data and the one-cycle read
// latency, and that a write does not disturb the read register.
module tb_buffer_ram;
  localparam int W = 48, D = 36, AW = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  buffer_ram #(.WIDTH(W), .DEPTH(D), .AW(AW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] model [D];
  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      int a;
      logic [W-1:0] held;
      a = $urandom_range(D - 1, 0);
      @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read addr %0d", a));
      held = rdata;
      // write somewhere, read register must hold
      a = $urandom_range(D - 1, 0);
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
      @(negedge clk); en = 1'b0; we = 1'b0;
      check(rdata == held, "write leaves the read data unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
