// tb_buf_arbiter: drives random requests from the control unit and the
// window operation and checks that the RAM port carries exactly the signals
// of the side that holds the grant, and that the window operation never
// writes.
module tb_buf_arbiter;
  localparam int W = 20, AW = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic grant_op = 1'b0, cu_en = 1'b0, op_en = 1'b0, cu_we, ram_en, ram_we;
  logic [AW-1:0] cu_addr, op_addr, ram_addr;
  logic [W-1:0] cu_wdata, ram_wdata;
  buf_arbiter #(.WIDTH(W), .AW(AW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      grant_op = $urandom_range(1, 0);
      cu_en    = !grant_op && $urandom_range(1, 0);
      cu_we    = $urandom_range(1, 0);
      cu_addr  = AW'($urandom);
      cu_wdata = W'($urandom);
      op_en    = grant_op && $urandom_range(1, 0);
      op_addr  = AW'($urandom);
      #1;
      if (grant_op) begin
        check(ram_en == op_en && ram_addr == op_addr && !ram_we, "operation side routed");
      end else begin
        check(ram_en == cu_en && ram_we == cu_we && ram_addr == cu_addr && ram_wdata == cu_wdata,
              "control side routed");
      end
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
