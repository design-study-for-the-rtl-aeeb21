// tb_octal_correlator: checks the eight polarization-product correlators and
// their daisy chaining. Burst stimulus on Video A-D of both stations; each of
// the 256 points is compared with the product sum of its X and Y video at its
// lag. Mode 2 chains correlators 0-1 (XA*YB over 64 lags) and 4-7 (XC*YD over
// 128 lags); the chain changes both the signal pair and the lag of each point.
module tb_octal_correlator;
  import corr_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  pair_t xv [4], yv [4];
  logic [6:0] chain;
  logic dump;
  logic [7:0]  rd_addr;
  logic [16:0] rd_data;
  int checks = 0, failures = 0;

  sample_t xli [4], yli [4], xlo [4], ylo [4];
  logic link_prev, link_next;
  octal_correlator dut (.clk, .rst_n, .x_vid(xv), .y_vid(yv), .chain, .link_prev, .link_next,
                        .x_link_in(xli), .y_link_in(yli), .x_link_out(xlo), .y_link_out(ylo),
                        .dump, .rd_addr, .rd_data);
  // a second octal closes the loop for the link test: its correlator 7 X
  // output feeds ours, our correlator 0 Y output feeds it; here the links are
  // simply looped back (X out of correlator 7 into correlator 0 is not used
  // unless link_prev is set)
  assign xli = '{default: '0};
  assign yli = '{default: '0};

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int W);
    int b0, b1, d1;
    b0 = 80; b1 = 80 + $urandom_range(100, 300); d1 = b1 + 80;
    for (int g = 0; g < 8; g++) for (int s = 0; s < MAXS; s++) rec[g][s] = '0;
    for (int k = 0; k <= d1; k++) begin
      @(negedge clk);
      for (int v = 0; v < 4; v++) for (int e = 0; e < 2; e++) begin
        xv[v][e] = rnd_sample(k >= b0 && k < b1);
        yv[v][e] = rnd_sample(k >= b0 && k < b1);
        rec[v][2*k+e]   = xv[v][e];
        rec[4+v][2*k+e] = yv[v][e];
      end
      dump = (k == 10) || (k == d1);
    end
    @(negedge clk);
    dump = 0;
    for (int v = 0; v < 4; v++) begin xv[v] = '{default: '0}; yv[v] = '{default: '0}; end
    W = d1 - 10;
  endtask

  task automatic check(int q, int xsig, int ysig, int lag0, int W);
    for (int n = 0; n < 32; n++) begin
      int exp_v;
      rd_addr = {3'(q), 5'(n)}; #1;
      exp_v = point(xsig, ysig, lag0 + n, W, 4, 0, MAXS - 1);
      checks++;
      if (int'(rd_data) != exp_v) begin
        failures++;
        if (failures < 20) $display("corr %0d lag %0d: got %0d expected %0d", q, lag0 + n, rd_data, exp_v);
      end
    end
  endtask

  localparam int XV [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int YV [8] = '{0, 1, 0, 1, 2, 3, 2, 3};

  initial begin
    int W;
    dump = 0; rd_addr = 0; chain = '0; link_prev = 0; link_next = 0;
    for (int v = 0; v < 4; v++) begin xv[v] = '{default: '0}; yv[v] = '{default: '0}; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      run(W);
      for (int q = 0; q < 8; q++) check(q, XV[q], 4 + YV[q], -16, W);
    end
    chain = 7'b111_0001;
    run(W);
    for (int r = 0; r < 2; r++) begin
      run(W);
      check(0, 0, 5, -32, W);
      check(1, 0, 5, 0, W);
      for (int q = 4; q < 8; q++) check(q, 2, 7, 32 * (q - 4) - 64, W);
      check(2, 1, 4, -16, W);
      check(3, 1, 5, -16, W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
