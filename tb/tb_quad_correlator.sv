// tb_quad_correlator: checks the 64 Ms/s 32-lag correlator built from four
// chips, alone and as a daisy chain of two.
// Stimulus: low-level samples (zero product) outside a burst of random
// samples, so each chip counts exactly 3 per clock plus the signed products of
// the burst. The expected point n is computed from the full-rate records with
// tb_pkg::point at lag n-16 (single) or n-32 / n (chain of two), two samples
// per clock over the dump window of W clocks.
module tb_quad_correlator;
  import corr_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  pair_t xl, yl;
  logic xs [2], ys [2];
  logic dump;
  sample_t xci [2][4], yci [2][4], xco [2][4], yco [2][4];
  logic [4:0]  rd_lag;
  logic [16:0] rd [2];
  int checks = 0, failures = 0;

  for (genvar q = 0; q < 2; q++) begin : g_q
    quad_correlator dut (
      .clk, .rst_n, .x_loc(xl), .y_loc(yl),
      .x_casc_in(xci[q]), .y_casc_in(yci[q]), .x_casc_out(xco[q]), .y_casc_out(yco[q]),
      .x_src(xs[q]), .y_src(ys[q]), .dump, .rd_lag, .rd_data(rd[q]));
  end
  assign xci[0] = '{default: '0};
  assign xci[1] = xco[0];
  assign yci[0] = yco[1];
  assign yci[1] = '{default: '0};

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0;
  // one run: clear records, dump at 10, burst, dump at D1; returns W
  task automatic run(output int W);
    int b0, b1, d1;
    b0 = 60; b1 = 60 + $urandom_range(100, 400); d1 = b1 + 60;
    for (int s = 0; s < MAXS; s++) begin rec[0][s] = '0; rec[1][s] = '0; end
    for (int k = 0; k <= d1; k++) begin
      @(negedge clk);
      for (int e = 0; e < 2; e++) begin
        xl[e] = rnd_sample(k >= b0 && k < b1);
        yl[e] = rnd_sample(k >= b0 && k < b1);
        rec[0][2*k+e] = xl[e];
        rec[1][2*k+e] = yl[e];
      end
      dump = (k == 10) || (k == d1);
    end
    @(negedge clk);
    dump = 0;
    xl = '{default: '0}; yl = '{default: '0};
    W = d1 - 10;
  endtask

  task automatic check(int q, int lag0, int W);
    for (int n = 0; n < 32; n++) begin
      int exp_v;
      rd_lag = 5'(n); #1;
      exp_v = point(0, 1, lag0 + n, W, 4, 0, MAXS - 1);
      checks++;
      if (int'(rd[q]) != exp_v) begin
        failures++;
        if (failures < 20) $display("quad %0d lag %0d: got %0d expected %0d", q, lag0 + n, rd[q], exp_v);
      end
    end
  endtask

  initial begin
    int W;
    dump = 0; rd_lag = 0;
    xl = '{default: '0}; yl = '{default: '0};
    xs = '{0, 0}; ys = '{0, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // single correlators, both on the local signals: lags -16..15
    for (int r = 0; r < 3; r++) begin
      run(W);
      check(0, -16, W);
      check(1, -16, W);
    end
    // daisy chain of two: quad 0 lags -32..-1, quad 1 lags 0..31
    xs = '{0, 1}; ys = '{1, 0};
    run(W);   // settle the lines after the switch
    for (int r = 0; r < 3; r++) begin
      run(W);
      check(0, -32, W);
      check(1, 0, W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
