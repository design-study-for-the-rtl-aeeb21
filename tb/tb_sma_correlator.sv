// tb_sma_correlator: the whole processor at reduced size, end to end.
// Three stations of eight baseband channels (one module per chassis, three
// baselines), sampled from 8-bit voltages. Exercised and counted:
//  - sampling: quiet inputs lie inside the threshold (low level), bursts
//    span the full range;
//  - the switching matrix: station 2 output 0 is fed from its input 5;
//  - delay compensation: baseline (0,1) with X delay 2 and Y delay 5;
//  - daisy chaining: baseline (0,2), second octal, all eight correlators
//    chained into one 256-lag correlator;
//  - dumps, SIG/REF accumulation and bank swaps; an overrun provoked at the
//    end by a dump period shorter than the unload;
//  - the L.O. synthesizer dividers: a frequency word written over the host
//    bus sets the feedback division.
// Every point of every baseline (both halves) is compared with the expected
// product sums.
module tb_sma_correlator;
  import corr_pkg::*;
  import tb_pkg::*;
  localparam int NS = 3, NMOD = 1, NBBC = 8 * NMOD, NB = 3, NP = NMOD * 512, PER = 700, NLO = 2;
  localparam int TH = 40;

  logic clk = 0, rst_n = 0;
  logic signed [7:0] bbc_level [NS][NBBC][2];
  logic [7:0] thresh;
  logic sig_ref, host_we;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic [NLO-1:0] vco_clk = '0, lo_fb_div, lo_ref_div, lo_up, lo_dn;
  logic ref_clk = 0;
  int checks = 0, failures = 0;

  sma_correlator #(.N_STATIONS(NS), .N_MODULES(NMOD), .DEPTH(32), .DUMP_CYCLES(PER), .N_LO(NLO)) dut (.*);

  always #50 clk = ~clk;
  always #1 vco_clk[0] = ~vco_clk[0];
  always #3 vco_clk[1] = ~vco_clk[1];
  always #100 ref_clk = ~ref_clk;
  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_wr(int a, int d);
    @(negedge clk);
    host_we = 1; host_addr = 24'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic host_rd(int a, output int d);
    @(negedge clk);
    host_addr = 24'(a);
    @(negedge clk);
    @(negedge clk);
    d = host_rdata;
  endtask
  function automatic int A(int tgt, int a);
    return (tgt << 19) | a;
  endfunction

  localparam int XV [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int YV [8] = '{0, 1, 0, 1, 2, 3, 2, 3};
  localparam int BI [NB] = '{0, 0, 1};
  localparam int BJ [NB] = '{1, 2, 2};
  localparam int DX [NB] = '{2, 0, 0};
  localparam int DY [NB] = '{5, 0, 0};

  // station signal after the switch -> record index (station s, input k: 8s+k)
  function automatic int sw_src(int s, int o);
    return 8 * s + ((s == 2 && o == 0) ? 5 : o);
  endfunction

  function automatic void pmap(int b, int p, output int xs, output int ys, output int lag);
    int o, q, n;
    o = (p / 256) % 2; q = (p / 32) % 8; n = p % 32;
    xs = sw_src(BI[b], 4*o + XV[q]); ys = sw_src(BJ[b], 4*o + YV[q]); lag = n - 16;
    if (b == 1 && o == 1) begin
      xs = sw_src(BI[b], 4); ys = sw_src(BJ[b], 7); lag = 32*q - 128 + n;
    end
    lag += 2 * (DX[b] - DY[b]);
  endfunction

  function automatic logic [1:0] code(int v);
    int a;
    a = (v < 0) ? -v : v;
    return {v >= 0, a > TH};
  endfunction

  longint exp_sum [NB][2][NP];
  int n_sig = 0, n_ref = 0, n_burst = 0, n_swap = 0, n_dump = 0;

  task automatic window(bit burst);
    int xs, ys, lag;
    for (int g = 0; g < 8*NS; g++) for (int s = 0; s < 2*PER + 4; s++) rec[g][s] = '0;
    for (int k = 0; k < PER; k++) begin
      bit bb;
      bb = burst && k >= 80 && k < 80 + 250;
      for (int s = 0; s < NS; s++) for (int c = 0; c < NBBC; c++) for (int e = 0; e < 2; e++) begin
        int v;
        v = bb ? $urandom_range(0, 254) - 127 : $urandom_range(0, 2*TH) - TH;
        bbc_level[s][c][e] = 8'(v);
        rec[8*s+c][2*k+e] = code(v);
      end
      if (k < PER - 1) @(negedge clk);
    end
    @(posedge clk iff dut.g_i[0].g_j[1].u_bl.dump);
    n_dump++;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < NP; p++) begin
        pmap(b, p, xs, ys, lag);
        exp_sum[b][sig_ref][p] += point(xs, ys, lag, PER, 4, 0, 2*PER - 1);
      end
    @(negedge clk);
  endtask

  int fb_cnt = 0, fb_per = 0, fb_edges = 0;
  always @(posedge vco_clk[0]) fb_cnt++;
  always @(posedge lo_fb_div[0]) begin fb_per = fb_cnt; fb_cnt = 0; fb_edges++; end

  initial begin
    int d;
    thresh = 8'(TH); sig_ref = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    foreach (bbc_level[s, c, e]) bbc_level[s][c][e] = 0;
    foreach (exp_sum[b, h, p]) exp_sum[b][h][p] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // configuration
    host_wr(A(16 + 2, 0), 5);                               // switch: station 2 out 0 <- in 5
    host_wr(A(0, (1 << 16) | 0), DX[0]);                    // baseline (0,1) delays
    host_wr(A(0, (1 << 16) | 1), DY[0]);
    host_wr(A(1, (1 << 16) | 3), 7'h7f);                    // baseline (0,2) octal 1: full chain
    host_wr(A(24, 0), 1500);                                // L.O. 0 at 1500 MHz
    // swap every chassis to a fresh bank after the first unload
    @(posedge clk iff dut.g_i[0].g_j[1].u_bl.dump);
    repeat (NP + 20) @(posedge clk);
    for (int b = 0; b < NB; b++) host_wr(A(b, 1), 1);
    n_swap++;
    @(posedge clk iff dut.g_i[0].g_j[1].u_bl.dump);
    for (int b = 0; b < NB; b++) for (int p = 0; p < NP; p++) exp_sum[b][0][p] += 2 * ((3 * PER) >>> 4);
    n_sig++;
    @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      sig_ref = j[0];
      window(j == 1 || j == 2);
      if (j[0]) n_ref++; else n_sig++;
      if (j == 1 || j == 2) n_burst++;
    end
    repeat (NP + 20) @(posedge clk);
    for (int b = 0; b < NB; b++) host_wr(A(b, 1), 1);
    n_swap++;
    repeat (4) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      host_rd(A(b, 3), d); checks++; if (d != n_sig) begin failures++; $display("b%0d SIG dumps %0d", b, d); end
      host_rd(A(b, 4), d); checks++; if (d != n_ref) begin failures++; $display("b%0d REF dumps %0d", b, d); end
      for (int h = 0; h < 2; h++)
        for (int p = 0; p < NP; p++) begin
          host_rd(A(b, (2 << 16) | (h << 13) | p), d);
          checks++;
          if (d != int'(exp_sum[b][h][p])) begin
            failures++;
            if (failures < 20) $display("baseline %0d half %0d point %0d: got %0d expected %0d", b, h, p, d, exp_sum[b][h][p]);
          end
        end
    end
    // L.O. divider
    checks++;
    if (fb_per != 1500) begin failures++; $display("L.O. feedback period %0d", fb_per); end
    host_rd(A(24, 0), d);
    checks++;
    if (d != 1500) failures++;
    // overrun on baseline 2
    host_wr(A(2, 0), 100);
    repeat (2 * NP) @(posedge clk);
    host_rd(A(2, 2), d);
    checks++;
    if (d[2] !== 1'b1) begin failures++; $display("overrun not flagged"); end
    // mechanism coverage
    $display("dumps=%0d swaps=%0d sig=%0d ref=%0d bursts=%0d lo_edges=%0d overrun=%0d",
             n_dump, n_swap, n_sig, n_ref, n_burst, fb_edges, d[2]);
    checks++;
    if (n_dump == 0 || n_swap == 0 || n_sig == 0 || n_ref == 0 || n_burst == 0 || fb_edges == 0 || d[2] == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
