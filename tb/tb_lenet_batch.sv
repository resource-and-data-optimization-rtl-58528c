// tb_lenet_batch: end-to-end test of the LeNet accelerator in the two batch
// configurations that were evaluated, NB = 5 and NB = 25 (the images of a
// batch share one control unit per layer and one weight copy; FIFOs and
// buffers are widened). Both run at the same time through the shared harness
// lenet_run, with two batches each. The NB = 5 run also uses conv2 with two
// input channels per cycle and 4-deep inter-layer FIFOs, to cover those
// settings. The totals of both runs are printed.
module tb_lenet_batch;
  localparam int WATCHDOG = 2000000;

  logic clk = 1'b0, stop = 1'b0, done5, done25;
  int checks5, failures5, checks25, failures25;
  int extra = 0;
  always #5 clk = ~clk;

  lenet_run #(.NB(5), .C1P(1), .C2P(2), .F1P(16), .F2P(10), .FIFO_DEPTH(4), .NIMG(10)) u_run5 (
    .clk, .stop, .done(done5), .checks(checks5), .failures(failures5)
  );
  lenet_run #(.NB(25), .C1P(1), .C2P(1), .F1P(16), .F2P(10), .FIFO_DEPTH(16), .NIMG(50)) u_run25 (
    .clk, .stop, .done(done25), .checks(checks25), .failures(failures25)
  );

  initial begin
    fork
      wait (done5 && done25);
      begin
        repeat (WATCHDOG) @(posedge clk);
        $display("FAIL: watchdog expired");
        stop = 1'b1;
        wait (done5 && done25);
        extra = 1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks25, failures5 + failures25 + extra);
    $finish;
  end
endmodule
