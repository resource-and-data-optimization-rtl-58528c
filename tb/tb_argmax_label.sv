// tb_argmax_label: feeds random score vectors (with deliberate ties and
// negative scores) for three images at once and checks the labels (index of
// the largest score, lowest index on a tie), that output is held until
// accepted and that input is refused meanwhile.
module tb_argmax_label;
  localparam int NC = 10, NB = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [NB*16-1:0] in_data = '0;
  logic [NB*8-1:0] out_labels;
  argmax_label #(.NCLASS(NC), .NB(NB)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 40; v++) begin
      logic signed [15:0] sc [NB][NC];
      int exp [NB];
      for (int b = 0; b < NB; b++) begin
        exp[b] = 0;
        for (int c = 0; c < NC; c++) begin
          sc[b][c] = (v % 3 == 0) ? 16'sd5 * 16'($urandom_range(3, 0)) - 16'sd8 : 16'($urandom);
          if (sc[b][c] > sc[b][exp[b]]) exp[b] = c;
        end
      end
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        check(in_ready, "ready while collecting");
        in_valid = 1'b1;
        for (int b = 0; b < NB; b++) in_data[b * 16 +: 16] = sc[b][c];
      end
      @(negedge clk); in_valid = 1'b1;   // next vector's first beat must wait
      #1 check(out_valid && !in_ready, "labels offered, input held off");
      repeat ($urandom_range(3, 0)) begin
        @(negedge clk);
        check(out_valid, "labels held until accepted");
      end
      for (int b = 0; b < NB; b++)
        check(out_labels[b * 8 +: 8] == 8'(exp[b]), $sformatf("vector %0d image %0d label %0d exp %0d",
              v, b, out_labels[b * 8 +: 8], exp[b]));
      in_valid = 1'b0; out_ready = 1'b1;
      @(negedge clk); out_ready = 1'b0;
      check(!out_valid, "labels taken");
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
