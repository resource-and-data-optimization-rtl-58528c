// tb_stream_fifo: random push/pop traffic against a queue model. Checks data
// order, that nothing is lost or duplicated, that in_ready drops exactly when
// the FIFO holds DEPTH words and no pop happens, and the one-cycle latency
// from write to out_valid on an empty FIFO.
module tb_stream_fifo;
  localparam int W = 12, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  stream_fifo #(.WIDTH(W), .DEPTH(D)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] model [$];
  int n_full = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: write into the empty FIFO, visible the next cycle
    @(negedge clk); in_valid = 1'b1; in_data = 12'h5a5;
    #4 check(!out_valid, "empty FIFO shows nothing in the write cycle");
    @(negedge clk); in_valid = 1'b0;
    check(out_valid && out_data == 12'h5a5, "written word visible one cycle later");
    out_ready = 1'b1;
    @(negedge clk); out_ready = 1'b0;
    check(!out_valid, "FIFO empty again");
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3, 0) != 0);
      in_data   = W'($urandom);
      out_ready = (c < 1500) ? ($urandom_range(3, 0) == 0) : ($urandom_range(3, 0) != 0);
      #4;
      check(in_ready == (model.size() < D || out_ready), "in_ready rule");
      check(out_valid == (model.size() > 0), "out_valid iff not empty");
      if (out_valid && out_ready) begin
        check(out_data == model[0], $sformatf("data order: got %h exp %h", out_data, model[0]));
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
      if (model.size() == D) n_full++;
    end
    check(n_full > 0, "FIFO was full at least once");
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
