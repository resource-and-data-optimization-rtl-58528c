// tb_window_ctrl: the control unit of the conv layer in the worked example
// chain (3x3/1 conv on 6x6, then 2x2/2 pool). The testbench streams two
// images' chunks with random gaps, stands in for the window operation (busy
// for a random number of cycles after each launch) and checks against the
// independent schedule in tb_sched_pkg that
//  - every chunk is written to the buffer address of the request list, in order;
//  - output k is launched exactly when curCompList[k] chunks have arrived,
//    with the coordinate of the output order, and never while busy;
//  - the RAM port is granted to the operation only while it works;
//  - img_done pulses once per image.
module tb_window_ctrl;
  import bps_pkg::*;
  import tb_sched_pkg::*;
  localparam geom_t [MAX_LAYERS-1:0] FIG = {
    80'd0, 80'd0,
    16'd4, 16'd4, 16'd2, 16'd2, 16'd0,
    16'd6, 16'd6, 16'd3, 16'd1, 16'd0
  };
  localparam int RAW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, grant_op, cu_en, cu_we, op_start, op_idle = 1'b1, img_done;
  logic [15:0] in_data = '0, cu_wdata, op_x, op_y;
  logic [RAW-1:0] cu_addr;

  window_ctrl #(.NL(2), .CHAIN(FIG), .LAYER(0), .MAXLEN(36), .WIDTH(16), .AW(6), .RAW(RAW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cur[$], comp[$], ox[$], oy[$];
  int wr = 0, launched = 0, busy = 0, n_done = 0, fed = 0;
  logic start_d = 1'b0;

  initial begin
    lay_t ch[$];
    ch = '{'{6, 6, 3, 1, 0}, '{4, 4, 2, 2, 0}};
    schedule(ch, 0, cur, comp, ox, oy);
  end

  // source and stand-in window operation, driven at negedge
  always @(negedge clk) if (rst_n) begin
    in_valid <= (fed < 2 * 36) && ($urandom_range(3, 0) != 0);
    in_data  <= 16'(1000 + cur[fed % 36]);
    op_idle  <= (busy == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (busy > 0) busy <= busy - 1;
    check(!(grant_op && cu_en), "no write while the operation owns the RAM");
    check(!(grant_op && in_ready), "no input accepted while the operation owns the RAM");
    if (start_d) check(grant_op, "RAM granted to the operation after a launch");
    start_d <= op_start;
    if (cu_en) begin
      check(cu_we && cu_addr == RAW'(cur[wr % 36]) && cu_wdata == 16'(1000 + cur[wr % 36]),
            $sformatf("write %0d to address %0d (exp %0d)", wr, cu_addr, cur[wr % 36]));
      wr++;
    end
    if (in_valid && in_ready) fed++;
    if (op_start) begin
      int k;
      k = launched % 16;
      check(op_idle, "launch only when the operation is idle");
      check(wr - (launched / 16) * 36 == comp[k], $sformatf("launch %0d after %0d inputs, exp %0d",
            k, wr - (launched / 16) * 36, comp[k]));
      check(op_x == 16'(ox[k]) && op_y == 16'(oy[k]), $sformatf("launch %0d at <%0d,%0d> exp <%0d,%0d>",
            k, op_x, op_y, ox[k], oy[k]));
      launched++;
      busy <= $urandom_range(6, 2);
    end
    if (img_done) n_done++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (n_done == 2);
    repeat (5) @(posedge clk);
    check(launched == 32 && wr == 72, $sformatf("two images: %0d launches, %0d writes", launched, wr));
    check(n_done == 2, "img_done once per image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
