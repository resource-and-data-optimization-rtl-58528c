// tb_lenet_top: end-to-end test of the LeNet accelerator at its default
// parameters (single image per batch, 24 images). The test itself is the
// shared harness lenet_run; this module adds the clock and a watchdog and
// prints the result.
module tb_lenet_top;
  localparam int WATCHDOG = 2000000;

  logic clk = 1'b0, stop = 1'b0, done;
  int checks, failures;
  always #5 clk = ~clk;

  lenet_run #(.NB(1), .C1P(1), .C2P(1), .F1P(16), .F2P(10), .FIFO_DEPTH(16), .NIMG(24)) u_run (
    .clk, .stop, .done, .checks, .failures
  );

  initial begin
    fork
      wait (done);
      begin
        repeat (WATCHDOG) @(posedge clk);
        $display("FAIL: watchdog expired");
        stop = 1'b1;
        wait (done);
        failures++;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
