// tb_weight_bank: fills a bank serially (with idle cycles in between), checks
// that full rises after exactly DEPTH*LANES values, that further writes are
// ignored, and reads every word back with one cycle of latency, checking the
// lane order.
module tb_weight_bank;
  localparam int L = 3, D = 5, AW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_valid = 1'b0, full, rd_en = 1'b0;
  logic [15:0] wr_data = '0;
  logic [AW-1:0] rd_addr = '0;
  logic [L*16-1:0] rd_data;
  weight_bank #(.LANES(L), .DEPTH(D), .AW(AW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] vals [D*L];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D * L; i++) begin
      @(negedge clk);
      check(!full, "not full before the last value");
      if ($urandom_range(1, 0)) begin
        wr_valid = 1'b0;
        @(negedge clk);
      end
      vals[i] = 16'($urandom); wr_valid = 1'b1; wr_data = vals[i];
    end
    @(negedge clk); wr_valid = 1'b1; wr_data = 16'hdead;   // ignored
    check(full, "full after DEPTH*LANES values");
    @(negedge clk); wr_valid = 1'b0;
    for (int a = 0; a < D; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk); rd_en = 1'b0;
      for (int l = 0; l < L; l++)
        check(rd_data[l * 16 +: 16] == vals[a * L + l], $sformatf("word %0d lane %0d", a, l));
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
