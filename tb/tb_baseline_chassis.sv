// tb_baseline_chassis: one baseline with two correlator modules end to end.
// Module 0 runs with X delay 3 and Y delay 7; a daisy chain of six
// correlators runs from module 0 (second octal, correlators 4-7) across the
// card link into module 1 (first octal, correlators 0-1). After a bank swap, four dump windows are
// accumulated with the SIG/REF input alternating; windows 1 and 2 carry a
// burst of random samples, the others only zero-product samples. After a
// second swap every point of both halves is read through the host port and
// compared with the sum of the per-window expected points.
module tb_baseline_chassis;
  import corr_pkg::*;
  import tb_pkg::*;
  localparam int NM = 2, NP = NM * 512, PER = 1200;

  logic clk = 0, rst_n = 0;
  pair_t x_sig [8*NM], y_sig [8*NM];
  logic sig_ref;
  logic host_we;
  logic [17:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  baseline_chassis #(.N_MODULES(NM), .DEPTH(32), .DUMP_CYCLES(PER)) dut (.*);

  always #50 clk = ~clk;
  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_wr(int a, int d);
    @(negedge clk);
    host_we = 1; host_addr = 18'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic host_rd(int a, output int d);
    @(negedge clk);
    host_addr = 18'(a);
    @(negedge clk);
    d = host_rdata;
  endtask

  localparam int XV [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int YV [8] = '{0, 1, 0, 1, 2, 3, 2, 3};
  localparam int DX [NM] = '{3, 0};
  localparam int DY [NM] = '{7, 0};

  // point p -> X signal, Y signal, lag
  function automatic void pmap(int p, output int xs, output int ys, output int lag);
    int m, o, q, n;
    m = p / 512; o = (p / 256) % 2; q = (p / 32) % 8; n = p % 32;
    xs = 8*m + 4*o + XV[q]; ys = 8*NM + 8*m + 4*o + YV[q]; lag = n - 16;
    lag += 2 * (DX[m] - DY[m]);
    // chain of six across the card boundary: module 0 octal 1 correlators
    // 4..7, then module 1 octal 0 correlators 0..1; X of the first (XC of
    // module 0's second page, delayed DX[0]), Y of the last (YB of module 1)
    if ((m == 0 && o == 1 && q >= 4) || (m == 1 && o == 0 && q < 2)) begin
      int pos;
      pos = (m == 0) ? q - 4 : 4 + q;
      xs = 6; ys = 8*NM + 8 + 1; lag = 32*pos - 96 + n + 2 * (DX[0] - DY[1]);
    end
  endfunction

  longint exp_sum [2][NP];

  task automatic window(bit burst);
    // the window starts right after a dump; the next dump ends it
    int xs, ys, lag;
    for (int g = 0; g < 16*NM; g++) for (int s = 0; s < 2*PER + 4; s++) rec[g][s] = '0;
    for (int k = 0; k < PER; k++) begin
      bit b;
      b = burst && k >= 100 && k < 100 + 300;
      for (int v = 0; v < 8*NM; v++) for (int e = 0; e < 2; e++) begin
        x_sig[v][e] = rnd_sample(b);
        y_sig[v][e] = rnd_sample(b);
        rec[v][2*k+e]        = x_sig[v][e];
        rec[8*NM+v][2*k+e]   = y_sig[v][e];
      end
      if (k < PER - 1) @(negedge clk);
    end
    @(posedge clk iff dut.dump);
    for (int p = 0; p < NP; p++) begin
      pmap(p, xs, ys, lag);
      exp_sum[sig_ref][p] += point(xs, ys, lag, PER, 4, 0, 2*PER - 1);
    end
    @(negedge clk);
  endtask

  initial begin
    int d;
    int nwin [2] = '{0, 0};
    sig_ref = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    foreach (x_sig[i]) begin x_sig[i] = '{default: '0}; y_sig[i] = '{default: '0}; end
    foreach (exp_sum[h, p]) exp_sum[h][p] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    host_wr((1 << 16) | (0 << 2) | 0, DX[0]);
    host_wr((1 << 16) | (0 << 2) | 1, DY[0]);
    host_wr((1 << 16) | (0 << 2) | 3, 9'h0f0);   // module 0, octal 1: chain 4-7, link out
    host_wr((1 << 16) | (1 << 2) | 2, 9'h101);   // module 1, octal 0: link in, chain 0-1
    // let the first dump pass and its unload finish, then swap to a fresh bank
    @(posedge clk iff dut.dump);
    repeat (NP + 20) @(posedge clk);
    host_wr(1, 1);
    // the dump that ends the current (quiet) window already goes into the new bank
    @(posedge clk iff dut.dump);
    for (int p = 0; p < NP; p++) exp_sum[0][p] += 2 * ((3 * PER) >>> 4);
    nwin[0]++;
    @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      sig_ref = j[0];
      window(j == 1 || j == 2);
      nwin[j % 2]++;
    end
    repeat (NP + 20) @(posedge clk);
    host_wr(1, 1);
    repeat (4) @(posedge clk);
    host_rd(3, d); checks++; if (d != nwin[0]) begin failures++; $display("SIG dumps %0d", d); end
    host_rd(4, d); checks++; if (d != nwin[1]) begin failures++; $display("REF dumps %0d", d); end
    for (int h = 0; h < 2; h++)
      for (int p = 0; p < NP; p++) begin
        host_rd((2 << 16) | (h << 13) | p, d);
        checks++;
        if (d != int'(exp_sum[h][p])) begin
          failures++;
          if (failures < 20) $display("half %0d point %0d: got %0d expected %0d", h, p, d, exp_sum[h][p]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
