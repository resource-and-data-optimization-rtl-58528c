// tb_image_batch_buffer: loads batches of two 6x6 images (chain of the
// worked scheduling example) pixel by pixel with random gaps, then reads the
// chunks out under random back-pressure and checks that chunk k holds pixel
// curList[k] of both images (request list from the independent schedule in
// tb_sched_pkg), that the batch is refused while feeding, and that loading
// resumes after the last chunk.
module tb_image_batch_buffer;
  import bps_pkg::*;
  import tb_sched_pkg::*;
  localparam geom_t [MAX_LAYERS-1:0] FIG = {
    80'd0, 80'd0,
    16'd4, 16'd4, 16'd2, 16'd2, 16'd0,
    16'd6, 16'd6, 16'd3, 16'd1, 16'd0
  };
  localparam int NB = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [15:0] in_data = '0;
  logic [NB*16-1:0] out_data;
  image_batch_buffer #(.NL(2), .CHAIN(FIG), .NB(NB), .MAXLEN(36)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cur[$], comp[$], ox[$], oy[$];
    lay_t ch[$];
    ch = '{'{6, 6, 3, 1, 0}, '{4, 4, 2, 2, 0}};
    schedule(ch, 0, cur, comp, ox, oy);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int batch = 0; batch < 3; batch++) begin
      logic [15:0] px [NB][36];
      foreach (px[b, i]) px[b][i] = 16'($urandom);
      for (int b = 0; b < NB; b++)
        for (int i = 0; i < 36; i++) begin
          @(negedge clk);
          while ($urandom_range(3, 0) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1; in_data = px[b][i];
          #4 check(in_ready && !out_valid, "loading");
        end
      @(negedge clk); in_valid = 1'b1; in_data = 16'hbeef;   // must be refused
      for (int k = 0; k < 36; k++) begin
        out_ready = ($urandom_range(2, 0) != 0);
        #4;
        check(!in_ready, "no loading while feeding");
        check(out_valid, "chunk offered");
        for (int b = 0; b < NB; b++)
          check(out_data[b * 16 +: 16] == px[b][cur[k]], $sformatf("batch %0d chunk %0d image %0d", batch, k, b));
        @(negedge clk);
        if (!out_ready) k--;
      end
      in_valid = 1'b0; out_ready = 1'b0;
      #1 check(in_ready && !out_valid, "back to loading");
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
