// tb_pool_window_op: the max-pooling + ReLU window operation with a 3x3
// window, stride 2 and padding 1 on a 7x7 input (so border windows are
// partly outside and their padded taps must be skipped), 3 channels and a
// batch of 2, with values of both signs. Models the buffer RAM, computes
// max-then-ReLU per lane, checks the latency F*F + 2, and holds the result
// with back-pressure. Also runs windows that are all negative (ReLU to 0).
module tb_pool_window_op;
  import bps_pkg::*;
  localparam int HI = 7, WI = 7, F = 3, S = 2, Z = 1, C = 3, NB = 2, AW = 6;
  localparam int HO = (HI + 2 * Z - F) / S + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, idle, ram_en, out_valid, out_ready = 1'b0;
  logic [15:0] x = '0, y = '0;
  logic [AW-1:0] ram_addr;
  logic [NB*C*16-1:0] ram_rdata, out_data;

  pool_window_op #(.HI(HI), .WI(WI), .F(F), .S(S), .Z(Z), .C(C), .NB(NB), .AW(AW)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_t img [NB*C][HI][WI];

  always @(posedge clk)
    if (ram_en)
      for (int l = 0; l < NB * C; l++)
        ram_rdata[l * 16 +: 16] <= img[l][int'(ram_addr) / WI][int'(ram_addr) % WI];

  function automatic data_t ref_out(int l, int ox, int oy);
    data_t m;
    bit have;
    have = 0; m = 0;
    for (int h = 0; h < F; h++)
      for (int w = 0; w < F; w++) begin
        int a, b;
        a = ox * S - Z + h; b = oy * S - Z + w;
        if (a >= 0 && a < HI && b >= 0 && b < WI && (!have || img[l][a][b] > m)) begin
          m = img[l][a][b]; have = 1;
        end
      end
    return (m > 0) ? m : 16'sd0;
  endfunction

  initial begin
    int n_zero, n_pos;
    n_zero = 0; n_pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 6; round++) begin
      foreach (img[l, i, j]) img[l][i][j] = (round == 5) ? -data_t'($urandom_range(1000, 1)) : data_t'($urandom);
      for (int i = 0; i < HO; i++)
        for (int j = 0; j < HO; j++) begin
          int lat;
          @(negedge clk);
          check(idle, "idle before start");
          start = 1'b1; x = 16'(i); y = 16'(j);
          @(negedge clk);
          start = 1'b0; x = '0; y = '0;
          lat = 1;
          while (!out_valid) begin
            @(negedge clk);
            lat++;
          end
          check(lat == F * F + 2, $sformatf("latency %0d", lat));
          repeat ($urandom_range(2, 0)) @(negedge clk);
          for (int l = 0; l < NB * C; l++) begin
            data_t e;
            e = ref_out(l, i, j);
            if (e == 0) n_zero++; else n_pos++;
            check(data_t'(out_data[l * 16 +: 16]) == e, $sformatf("out <%0d,%0d> lane %0d: got %0d exp %0d",
                  i, j, l, data_t'(out_data[l * 16 +: 16]), e));
          end
          out_ready = 1'b1;
          @(negedge clk); out_ready = 1'b0;
        end
    end
    check(n_zero > 0 && n_pos > 0, "both ReLU cases exercised");
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
