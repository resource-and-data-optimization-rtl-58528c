// tb_weight_loader: streams 3 + 2 + 4 weight words and then image words
// through the loader with random input gaps and random image-side
// back-pressure. Checks that each weight word reaches exactly the right bank
// (one-hot write strobe), that done rises after the last weight word, and
// that image words pass through in order with ready flowing back.
module tb_weight_loader;
  localparam logic [2:0][31:0] SIZES = {32'd4, 32'd2, 32'd3};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic s_valid = 1'b0, s_ready, done, img_valid, img_ready = 1'b0;
  logic [15:0] s_data = '0, bank_data, img_data;
  logic [2:0] bank_we;
  weight_loader #(.NBANK(3), .SIZES(SIZES)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sent, nimg;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    sent = 0; nimg = 0;
    while (nimg < 30) begin
      @(negedge clk);
      s_valid = ($urandom_range(2, 0) != 0);
      s_data = 16'(1000 + sent);
      img_ready = ($urandom_range(1, 0) != 0);
      #4;
      if (sent < 9) begin
        int exp_bank;
        exp_bank = (sent < 3) ? 0 : (sent < 5) ? 1 : 2;
        check(!done, "not done during weights");
        check(s_ready, "weights always accepted");
        check(bank_we == (s_valid ? 3'(1 << exp_bank) : 3'b0), $sformatf("word %0d to bank %0d", sent, exp_bank));
        check(bank_data == s_data, "bank data");
        check(!img_valid, "no image output during weights");
      end else begin
        check(done, "done after the weights");
        check(bank_we == 3'b0, "no bank writes after the weights");
        check(img_valid == s_valid && s_ready == img_ready && img_data == s_data, "image pass-through");
        if (s_valid && s_ready) nimg++;
      end
      if (s_valid && s_ready) sent++;
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
