// tb_conv_window_op: the convolution window operation with zero padding
// (6x5 input, 3x3 window, stride 1, padding 1), 4 input channels taken two
// per cycle, 3 output channels and a batch of 2 images. The testbench models
// the buffer RAM and the weight bank (one-cycle read latency) and computes
// each output chunk with plain loops, including border outputs whose windows
// reach into the padding, large values that saturate, and output
// back-pressure. It also checks the latency F*F*CI/CI_PAR + 2 from start to
// out_valid.
module tb_conv_window_op;
  import bps_pkg::*;
  localparam int HI = 6, WI = 5, F = 3, S = 1, Z = 1, CI = 4, CO = 3, CP = 2, NB = 2;
  localparam int G = CI / CP, AW = 5, WAW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, idle, ram_en, w_en, out_valid, out_ready = 1'b0;
  logic [15:0] x = '0, y = '0;
  logic [AW-1:0] ram_addr;
  logic [NB*CI*16-1:0] ram_rdata;
  logic [WAW-1:0] w_addr;
  logic [CO*CP*16-1:0] w_data;
  logic [CO*16-1:0] bias;
  logic [NB*CO*16-1:0] out_data;

  conv_window_op #(.HI(HI), .WI(WI), .F(F), .S(S), .Z(Z), .CI(CI), .CO(CO), .CI_PAR(CP), .NB(NB),
                   .AW(AW), .WAW(WAW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_t img [NB][CI][HI][WI];
  data_t k [CO][CI][F][F];
  data_t bv [CO];

  // RAM and weight bank models
  always @(posedge clk) begin
    if (ram_en)
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < CI; c++)
          ram_rdata[(b * CI + c) * 16 +: 16] <= img[b][c][int'(ram_addr) / WI][int'(ram_addr) % WI];
    if (w_en)
      for (int co = 0; co < CO; co++)
        for (int j = 0; j < CP; j++) begin
          int a, g, hw;
          a = int'(w_addr); g = a % G; hw = a / G;
          w_data[(co * CP + j) * 16 +: 16] <= k[co][g * CP + j][hw / F][hw % F];
        end
  end

  function automatic data_t ref_out(int b, int co, int ox, int oy);
    logic signed [47:0] acc;
    acc = 48'(bv[co]) <<< 8;
    for (int ci = 0; ci < CI; ci++)
      for (int h = 0; h < F; h++)
        for (int w = 0; w < F; w++) begin
          int m, n;
          m = ox * S - Z + h; n = oy * S - Z + w;
          if (m >= 0 && m < HI && n >= 0 && n < WI) acc += 48'(int'(k[co][ci][h][w]) * int'(img[b][ci][m][n]));
        end
    acc = acc >>> 8;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

  initial begin
    int n_sat;
    n_sat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 6; round++) begin
      int big;
      big = (round >= 4);   // large values: saturation
      foreach (img[b, c, i, j]) img[b][c][i][j] = big ? data_t'($urandom) : data_t'($urandom_range(511, 0)) - 16'sd256;
      foreach (k[a, c, i, j]) k[a][c][i][j] = big ? data_t'($urandom) : data_t'($urandom_range(255, 0)) - 16'sd128;
      foreach (bv[a]) bv[a] = data_t'($urandom_range(511, 0)) - 16'sd256;
      for (int i = 0; i < HI; i++)
        for (int j = 0; j < WI; j++) begin
          int lat;
          @(negedge clk);
          check(idle, "idle before start");
          start = 1'b1; x = 16'(i); y = 16'(j);
          for (int co = 0; co < CO; co++) bias[co * 16 +: 16] = bv[co];
          @(negedge clk);
          start = 1'b0; x = 16'hffff; y = 16'hffff;   // coordinates only sampled at start
          lat = 1;
          while (!out_valid) begin
            @(negedge clk);
            lat++;
          end
          check(lat == F * F * G + 2, $sformatf("latency %0d, expected %0d", lat, F * F * G + 2));
          repeat ($urandom_range(2, 0)) begin
            @(negedge clk);
            check(out_valid && !idle, "result held until accepted");
          end
          for (int b = 0; b < NB; b++)
            for (int co = 0; co < CO; co++) begin
              data_t e;
              e = ref_out(b, co, i, j);
              if (e == 16'sh7fff || e == 16'sh8000) n_sat++;
              check(data_t'(out_data[(b * CO + co) * 16 +: 16]) == e,
                    $sformatf("out <%0d,%0d> b%0d co%0d: got %0d exp %0d", i, j, b, co,
                              data_t'(out_data[(b * CO + co) * 16 +: 16]), e));
            end
          out_ready = 1'b1;
          #1 check(idle, "idle in the hand-over cycle");
          @(negedge clk); out_ready = 1'b0;
        end
    end
    check(n_sat > 0, "saturation was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
