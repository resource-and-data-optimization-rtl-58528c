// tb_window2d: a two-layer pipeline of 2D-window modules joined by a FIFO: a
// 3x3/1 convolution (2 -> 3 channels, batch of 2, 6x6 input) followed by a
// 2x2/2 max-pool + ReLU (4x4 -> 2x2), as in the worked scheduling example.
// The convolution's weights come from a modelled weight bank. The testbench
// feeds three image pairs in the request order of the conv layer (from the
// independent schedule in tb_sched_pkg), with random gaps and random output
// back-pressure, and compares the pool outputs (row-major) with a plain
// conv -> pool -> ReLU model. It also checks that the pool layer produced
// its first output before the conv layer had finished the image.
module tb_window2d;
  import bps_pkg::*;
  import tb_sched_pkg::*;
  localparam geom_t [MAX_LAYERS-1:0] FIG = {
    80'd0, 80'd0,
    16'd4, 16'd4, 16'd2, 16'd2, 16'd0,
    16'd6, 16'd6, 16'd3, 16'd1, 16'd0
  };
  localparam int CI = 2, CO = 3, NB = 2, NIMG = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, c_v, c_r, p_v, p_r, o_v, o_r = 1'b0;
  logic [NB*CI*16-1:0] in_data = '0;
  logic [NB*CO*16-1:0] c_d, p_d, o_d;
  logic w_en, pw_en, cdone, pdone;
  logic [4:0] w_addr;
  logic pw_addr;
  logic [CO*16-1:0] w_data, bias;

  window2d #(.NL(2), .CHAIN(FIG), .LAYER(0), .OP(OP_CONV), .CI(CI), .CO(CO), .CI_PAR(1), .NB(NB), .MAXLEN(36)) u_conv (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid(c_v), .out_ready(c_r), .out_data(c_d),
    .w_en, .w_addr, .w_data, .bias, .img_done(cdone));
  stream_fifo #(.WIDTH(NB*CO*16), .DEPTH(2)) u_fifo (
    .clk, .rst_n, .in_valid(c_v), .in_ready(c_r), .in_data(c_d), .out_valid(p_v), .out_ready(p_r), .out_data(p_d));
  window2d #(.NL(2), .CHAIN(FIG), .LAYER(1), .OP(OP_POOL), .CI(CO), .CO(CO), .NB(NB), .MAXLEN(36), .WAW(1)) u_pool (
    .clk, .rst_n, .in_valid(p_v), .in_ready(p_r), .in_data(p_d), .out_valid(o_v), .out_ready(o_r), .out_data(o_d),
    .w_en(pw_en), .w_addr(pw_addr), .w_data('0), .bias('0), .img_done(pdone));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_t img [NIMG][NB][CI][6][6];
  data_t k [CO][CI][3][3];
  data_t bv [CO];
  int cur[$], comp[$], ox[$], oy[$];

  always @(posedge clk)
    if (w_en)
      for (int co = 0; co < CO; co++)
        w_data[co * 16 +: 16] <= k[co][int'(w_addr) % CI][int'(w_addr) / CI / 3][int'(w_addr) / CI % 3];
  always_comb for (int co = 0; co < CO; co++) bias[co * 16 +: 16] = bv[co];

  function automatic data_t ref_pool(int im, int b, int co, int px, int py);
    data_t m;
    m = 16'sh8000;
    for (int dx = 0; dx < 2; dx++)
      for (int dy = 0; dy < 2; dy++) begin
        logic signed [47:0] acc;
        data_t cv;
        acc = 48'(bv[co]) <<< 8;
        for (int ci = 0; ci < CI; ci++)
          for (int h = 0; h < 3; h++)
            for (int w = 0; w < 3; w++)
              acc += 48'(int'(k[co][ci][h][w]) * int'(img[im][b][ci][2 * px + dx + h][2 * py + dy + w]));
        acc = acc >>> 8;
        cv = (acc > 32767) ? 16'sh7fff : (acc < -32768) ? 16'sh8000 : data_t'(acc);
        if (cv > m) m = cv;
      end
    return (m > 0) ? m : 16'sd0;
  endfunction

  int fed = 0, got = 0, conv_outs = 0, early = 0;
  initial begin
    lay_t ch[$];
    ch = '{'{6, 6, 3, 1, 0}, '{4, 4, 2, 2, 0}};
    schedule(ch, 0, cur, comp, ox, oy);
    foreach (img[a, b, c, i, j]) img[a][b][c][i][j] = data_t'($urandom_range(511, 0)) - 16'sd200;
    foreach (k[a, c, i, j]) k[a][c][i][j] = data_t'($urandom_range(255, 0)) - 16'sd128;
    foreach (bv[a]) bv[a] = data_t'($urandom_range(255, 0)) - 16'sd128;
  end

  always @(negedge clk) if (rst_n) begin
    in_valid <= (fed < NIMG * 36) && ($urandom_range(4, 0) != 0);
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < CI; c++)
        in_data[(b * CI + c) * 16 +: 16] <= img[fed / 36 % NIMG][b][c][cur[fed % 36] / 6][cur[fed % 36] % 6];
    o_r <= ($urandom_range(2, 0) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) fed++;
    if (c_v && c_r) conv_outs++;
    if (o_v && o_r) begin
      int im, q;
      im = got / 4; q = got % 4;
      if (conv_outs % 16 != 0) early++;
      for (int b = 0; b < NB; b++)
        for (int co = 0; co < CO; co++)
          check(data_t'(o_d[(b * CO + co) * 16 +: 16]) == ref_pool(im, b, co, q / 2, q % 2),
                $sformatf("img %0d out %0d b%0d co%0d: got %0d exp %0d", im, q, b, co,
                          data_t'(o_d[(b * CO + co) * 16 +: 16]), ref_pool(im, b, co, q / 2, q % 2)));
      got++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (got == NIMG * 4);
    repeat (5) @(posedge clk);
    check(early > 0, "pool produced output while the conv layer was mid-image");
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
