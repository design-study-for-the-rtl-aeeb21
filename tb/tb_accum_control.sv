// tb_accum_control: checks the dump period, the unload walk over all module
// points, SIG/REF summation with bank swapping, the first-dump overwrite, the
// host read path, the module-register pass-through and the overrun flag.
// A small model of the modules' readout answers each (module, address) one
// clock later with a value that depends on the point and on the dump number.
module tb_accum_control;
  localparam int NM = 2, NP = NM * 512, PER = 1500;
  logic clk = 0, rst_n = 0;
  logic sig_ref, dump;
  logic [0:0] rd_mod, mcfg_mod;
  logic [8:0] rd_addr;
  logic [16:0] rd_data;
  logic mcfg_we;
  logic [1:0] mcfg_addr;
  logic [15:0] mcfg_wdata;
  logic host_we;
  logic [17:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  accum_control #(.N_MODULES(NM), .DUMP_CYCLES(PER)) dut (.*);

  always #50 clk = ~clk;
  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // module readout model
  int ndump = 0;
  function automatic int val(int p, int d);
    return (p * 37 + d * 1001) % 100000;
  endfunction
  always_ff @(posedge clk) begin
    rd_data <= 17'(val(int'(rd_mod) * 512 + int'(rd_addr), ndump));
    if (dump) ndump <= ndump + 1;
  end

  // reference sums for the accumulating bank
  longint ref_sum [2][NP];
  int last_dump_t = -1, t = 0, per_now = PER, per_errs = 0, ndumps_seen = 0;
  logic sr_at_dump;
  always @(posedge clk) begin
    t++;
    if (dump) begin
      if (last_dump_t >= 0 && t - last_dump_t != per_now) per_errs++;
      last_dump_t = t;
      ndumps_seen++;
    end
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

  // run n dumps, toggling sig/ref per dump; add into the reference
  task automatic run_dumps(int n, bit fresh);
    bit first [2];
    first = '{fresh, fresh};
    host_wr(1, 1);                 // swap: the other bank accumulates, fresh
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      sig_ref = k[0];
      @(posedge clk iff dump);
      #1;
      for (int p = 0; p < NP; p++) begin
        int h;
        h = k[0];
        ref_sum[h][p] = (first[h] ? 0 : ref_sum[h][p]) + val(p, ndump);
      end
      first[k[0]] = 0;
    end
    // let the last unload finish, then swap so the host sees this bank
    repeat (NP + 10) @(posedge clk);
    host_wr(1, 1);
    repeat (5) @(posedge clk);
  endtask

  task automatic check_idle_bank(int nsig, int nref);
    int d;
    host_rd(3, d); checks++; if (d != nsig) begin failures++; $display("sig count %0d", d); end
    host_rd(4, d); checks++; if (d != nref) begin failures++; $display("ref count %0d", d); end
    for (int h = 0; h < 2; h++)
      for (int p = 0; p < NP; p += 7) begin
        host_rd((2 << 16) | (h << 13) | p, d);
        checks++;
        if (d != int'(ref_sum[h][p])) begin
          failures++;
          if (failures < 20) $display("half %0d point %0d: got %0d expected %0d", h, p, d, ref_sum[h][p]);
        end
      end
  endtask

  initial begin
    int d;
    sig_ref = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // first dump after reset: discard (partial period is fine, it is overwritten)
    @(posedge clk iff dump);
    repeat (NP + 10) @(posedge clk);
    run_dumps(4, 1);
    check_idle_bank(2, 2);
    run_dumps(3, 1);               // into the bank read before: first dumps overwrite
    check_idle_bank(2, 1);
    // module register pass-through
    fork
      host_wr((1 << 16) | (1 << 2) | 3, 16'h1234);
      begin
        @(posedge clk iff mcfg_we);
        checks++;
        if (mcfg_mod != 1'b1 || mcfg_addr != 2'd3 || mcfg_wdata != 16'h1234) failures++;
      end
    join
    // dump period: measured spacing
    checks++;
    if (per_errs != 0) begin failures++; $display("dump spacing errors: %0d", per_errs); end
    // overrun: a period shorter than the unload
    host_wr(0, 600);
    per_now = 600;
    repeat (3000) @(posedge clk);
    host_rd(2, d);
    checks++;
    if (d[2] !== 1'b1) begin failures++; $display("overrun not flagged"); end
    host_wr(1, 2);
    host_rd(2, d);
    checks++;
    if (d[2] !== 1'b0) begin failures++; $display("overrun not cleared"); end
    host_rd(0, d);
    checks++;
    if (d != 600) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
