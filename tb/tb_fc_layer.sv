// tb_fc_layer: a small fully connected layer (8 inputs in beats of 2, 6
// outputs computed 3 at a time, batch of 2, ReLU) and the same without ReLU.
// The weight bank is modelled with one-cycle read latency. Several random
// vectors are pushed with input gaps and output back-pressure; the outputs
// are compared with a plain matrix-vector product with the same
// requantisation, and the time from the last input beat to the first output
// is checked to be (OUT/PAR) passes of (IN + 2) cycles plus one.
module tb_fc_layer;
  import bps_pkg::*;
  localparam int IN = 8, OUT = 6, PAR = 3, BEAT = 2, NB = 2, WAW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  data_t wm [OUT][IN];
  data_t bv [OUT];
  logic [OUT*16-1:0] bias;
  always_comb for (int o = 0; o < OUT; o++) bias[o * 16 +: 16] = bv[o];

  logic in_valid = 1'b0, in_ready [2], out_valid [2], out_ready = 1'b0;
  logic [NB*BEAT*16-1:0] in_data = '0;
  logic [NB*16-1:0] out_data [2];
  logic w_en [2];
  logic [WAW-1:0] w_addr [2];
  logic [PAR*16-1:0] w_data [2];

  for (genvar r = 0; r < 2; r++) begin : g_dut
    fc_layer #(.IN_LEN(IN), .OUT_LEN(OUT), .OUT_PAR(PAR), .IN_BEAT(BEAT), .NB(NB), .RELU(r == 0), .WAW(WAW)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready(in_ready[r]), .in_data,
      .out_valid(out_valid[r]), .out_ready, .out_data(out_data[r]),
      .w_en(w_en[r]), .w_addr(w_addr[r]), .w_data(w_data[r]), .bias);
    always @(posedge clk)
      if (w_en[r])
        for (int j = 0; j < PAR; j++) w_data[r][j * 16 +: 16] <= wm[int'(w_addr[r]) / IN * PAR + j][int'(w_addr[r]) % IN];
  end

  function automatic data_t ref_out(data_t xv [IN], int o, bit relu);
    logic signed [47:0] acc;
    data_t r;
    acc = 48'(bv[o]) <<< 8;
    for (int i = 0; i < IN; i++) acc += 48'(int'(wm[o][i]) * int'(xv[i]));
    acc = acc >>> 8;
    r = (acc > 32767) ? 16'sh7fff : (acc < -32768) ? 16'sh8000 : data_t'(acc);
    return (relu && r < 0) ? 16'sd0 : r;
  endfunction

  initial begin
    int n_neg;
    n_neg = 0;
    foreach (wm[o, i]) wm[o][i] = data_t'($urandom_range(1023, 0)) - 16'sd512;
    foreach (bv[o]) bv[o] = data_t'($urandom_range(511, 0)) - 16'sd256;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 12; v++) begin
      data_t xv [NB][IN];
      int t_last, lat;
      foreach (xv[b, i]) xv[b][i] = (v == 11) ? data_t'($urandom) : data_t'($urandom_range(1023, 0)) - 16'sd512;
      for (int bt = 0; bt < IN / BEAT; bt++) begin
        @(negedge clk);
        while ($urandom_range(2, 0) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        for (int b = 0; b < NB; b++)
          for (int c = 0; c < BEAT; c++) in_data[(b * BEAT + c) * 16 +: 16] = xv[b][bt * BEAT + c];
        #4 check(in_ready[0] && in_ready[1], "ready while loading");
      end
      @(negedge clk); in_valid = 1'b0;
      lat = 1;
      while (!out_valid[0]) begin
        check(!in_ready[0], "no input accepted while computing");
        @(negedge clk);
        lat++;
      end
      check(lat == (OUT / PAR) * (IN + 2) + 1, $sformatf("compute time %0d", lat));
      for (int o = 0; o < OUT; o++) begin
        while ($urandom_range(2, 0) == 0) begin
          out_ready = 1'b0;
          @(negedge clk);
          check(out_valid[0] && out_valid[1], "output held");
        end
        for (int b = 0; b < NB; b++) begin
          for (int r = 0; r < 2; r++)
            check(data_t'(out_data[r][b * 16 +: 16]) == ref_out(xv[b], o, r == 0),
                  $sformatf("vec %0d out %0d b%0d relu=%0d: got %0d exp %0d", v, o, b, r == 0,
                            data_t'(out_data[r][b * 16 +: 16]), ref_out(xv[b], o, r == 0)));
          if (ref_out(xv[b], o, 1'b0) < 0) n_neg++;
        end
        out_ready = 1'b1;
        @(negedge clk);
        out_ready = 1'b0;
      end
    end
    check(n_neg > 0, "negative sums exercised ReLU");
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
