// tb_bos_chip: checks the 16-lag correlator chip.
// Phase 1 runs a cycle-exact reference of the chip's documented timing (MAC i
// sees x0(t-1-c) and y0 at the tap for lag i-7) with random inputs, random
// selects and delay options, and compares all 16 latches after every dump and
// the daisy-chain outputs every clock. Phase 2 feeds Y as a shifted copy of X
// and checks that the largest count sits at MAC D+7 for shift D.
module tb_bos_chip;
  import corr_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t x_in [4], y_in [4];
  logic [1:0] x_sel, y_sel;
  logic x_dly, y_dly, dump;
  sample_t x_out, y_out;
  logic [3:0] rd_idx;
  logic [15:0] rd_data;
  int checks = 0, failures = 0;

  bos_chip dut (.*);

  always #50 clk = ~clk;
  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  sample_t xs_h [0:4095], ys_h [0:4095];
  logic dx_h [0:4095], dy_h [0:4095];
  int t;
  longint macc [16];
  longint mlat [16];

  function automatic sample_t x0(int tt);
    if (tt < 0) return '0;
    if (dx_h[tt]) return (tt == 0) ? '0 : xs_h[tt-1];
    return xs_h[tt];
  endfunction
  function automatic sample_t y0(int tt);
    if (tt < 0) return '0;
    if (dy_h[tt]) return (tt == 0) ? '0 : ys_h[tt-1];
    return ys_h[tt];
  endfunction

  task automatic step(bit d);
    // inputs for clock t are applied now (before the edge)
    dump = d;
    xs_h[t] = x_in[x_sel];
    ys_h[t] = y_in[y_sel];
    dx_h[t] = x_dly;
    dy_h[t] = y_dly;
    for (int i = 0; i < 16; i++) begin
      int c, ay, p;
      c  = i / 2;
      ay = (i % 2 == 0) ? 8 - c : 7 - c;
      p  = 3 + w(x0(t - 1 - c), y0(t - ay));
      if (d) begin
        mlat[i] = macc[i] >> 4;
        macc[i] = p;
      end else macc[i] += p;
    end
    @(posedge clk); #1;
    dump = 0;
    // after the edge: chain outputs are x0/y0 delayed by 8
    checks++;
    if (x_out !== x0(t - 7) || y_out !== y0(t - 7)) begin
      failures++;
      if (failures < 10) $display("t=%0d chain out mismatch", t);
    end
    t++;
  endtask

  task automatic check_latches();
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1;
      checks++;
      if (rd_data !== 16'(mlat[i])) begin
        failures++;
        if (failures < 40) $display("MAC %0d: got %0d expected %0d", i, rd_data, mlat[i]);
      end
    end
  endtask

  task automatic randomize_inputs();
    for (int k = 0; k < 4; k++) begin
      x_in[k] = 2'($urandom);
      y_in[k] = 2'($urandom);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin macc[i] = 0; mlat[i] = 0; end
    x_sel = 0; y_sel = 0; x_dly = 0; y_dly = 0; dump = 0; rd_idx = 0;
    randomize_inputs();
    t = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: four configurations, several dump periods each
    for (int cfg = 0; cfg < 4; cfg++) begin
      x_sel = 2'($urandom); y_sel = 2'($urandom);
      x_dly = cfg[0]; y_dly = cfg[1];
      // a configuration change disturbs the lines: start with a dump period
      // that is not checked against a stale reference
      for (int n = 0; n < 3; n++) begin
        int len;
        len = 40 + $urandom_range(0, 60);
        for (int k = 0; k < len; k++) begin
          randomize_inputs();
          step(k == len - 1);
        end
        check_latches();
      end
    end
    // phase 2: lag peak
    for (int D = -7; D <= 8; D += 5) begin
      logic [1:0] r [0:1023];
      int best, bi;
      for (int k = 0; k < 1024; k++) r[k] = 2'($urandom);
      x_sel = 0; y_sel = 0; x_dly = 0; y_dly = 0;
      for (int k = 0; k < 600; k++) begin
        x_in[0] = r[k + 20 - ((D < 0) ? -D : 0)];
        y_in[0] = r[k + 20 - ((D > 0) ? D : 0)];
        step(k == 0 || k == 599);
      end
      best = -1; bi = -1;
      for (int i = 0; i < 16; i++) begin
        rd_idx = 4'(i); #1;
        if (int'(rd_data) > best) begin best = rd_data; bi = i; end
      end
      checks++;
      if (bi != D + 7) begin
        failures++;
        $display("shift %0d: peak at MAC %0d, expected %0d", D, bi, D + 7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
