// tb_label_batch_buffer: hands batches of three labels to the buffer and
// checks that they leave one per beat in image order under random
// back-pressure, tlast on the third, and that a new batch is refused until
// the previous one is fully sent.
module tb_label_batch_buffer;
  localparam int NB = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, m_tvalid, m_tready = 1'b0, m_tlast;
  logic [NB*8-1:0] in_labels = '0;
  logic [15:0] m_tdata;
  label_batch_buffer #(.NB(NB)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      logic [NB*8-1:0] lab;
      int got;
      lab = NB*8'($urandom);
      @(negedge clk);
      check(in_ready, "ready for a new batch");
      in_valid = 1'b1; in_labels = lab;
      @(negedge clk);
      in_valid = 1'b1; in_labels = ~lab;   // must be refused
      got = 0;
      while (got < NB) begin
        m_tready = $urandom_range(1, 0);
        #4;
        check(!in_ready, "no new batch while sending");
        check(m_tvalid, "label offered");
        if (m_tready) begin
          check(m_tdata == {8'd0, lab[got * 8 +: 8]}, $sformatf("batch %0d label %0d", n, got));
          check(m_tlast == (got == NB - 1), "tlast on the last label");
          got++;
        end
        @(negedge clk);
      end
      in_valid = 1'b0; m_tready = 1'b0;
      #1 check(!m_tvalid, "buffer empty after the batch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
