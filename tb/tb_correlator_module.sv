// tb_correlator_module: checks a correlator card end to end: register writes
// for the X and Y delays, delay compensation, both octal correlators and the
// registered readout (data one clock after the address). With X delayed dx
// and Y delayed dy clocks, point (octal o, correlator q, n) must equal the
// product sum of its input videos at lag n-16+2(dx-dy) in 64 Ms/s samples.
module tb_correlator_module;
  import corr_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  pair_t x_sig [8], y_sig [8];
  logic cfg_we;
  logic [1:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic dump;
  logic [8:0] rd_addr;
  logic [16:0] rd_data;
  int checks = 0, failures = 0;

  sample_t x_link_in [4], y_link_in [4], x_link_out [4], y_link_out [4];
  assign x_link_in = '{default: '0};
  assign y_link_in = '{default: '0};
  correlator_module #(.DEPTH(64)) dut (.*);

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int XV [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int YV [8] = '{0, 1, 0, 1, 2, 3, 2, 3};

  task automatic wr(int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 2'(a); cfg_wdata = 16'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic run(int dx, int dy, output int W);
    int b0, b1, d1;
    b0 = 100; b1 = 100 + $urandom_range(100, 200); d1 = b1 + 100;
    for (int g = 0; g < 16; g++) for (int s = 0; s < MAXS; s++) rec[g][s] = '0;
    for (int k = 0; k <= d1; k++) begin
      @(negedge clk);
      for (int v = 0; v < 8; v++) for (int e = 0; e < 2; e++) begin
        x_sig[v][e] = rnd_sample(k >= b0 && k < b1);
        y_sig[v][e] = rnd_sample(k >= b0 && k < b1);
        rec[v][2*k+e]   = x_sig[v][e];
        rec[8+v][2*k+e] = y_sig[v][e];
      end
      dump = (k == 10) || (k == d1);
    end
    @(negedge clk);
    dump = 0;
    for (int v = 0; v < 8; v++) begin x_sig[v] = '{default: '0}; y_sig[v] = '{default: '0}; end
    W = d1 - 10;
  endtask

  initial begin
    int W, dx, dy;
    dump = 0; rd_addr = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    for (int v = 0; v < 8; v++) begin x_sig[v] = '{default: '0}; y_sig[v] = '{default: '0}; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      dx = (r == 0) ? 0 : $urandom_range(0, 20);
      dy = (r == 0) ? 0 : $urandom_range(0, 20);
      wr(0, dx); wr(1, dy);
      run(dx, dy, W);
      for (int a = 0; a < 512; a++) begin
        int o, q, n, exp_v;
        o = a >> 8; q = (a >> 5) & 7; n = a & 31;
        @(negedge clk) rd_addr = 9'(a);
        @(negedge clk);
        exp_v = point(4*o + XV[q], 8 + 4*o + YV[q], n - 16 + 2*(dx - dy), W, 4, 0, MAXS - 1);
        checks++;
        if (int'(rd_data) != exp_v) begin
          failures++;
          if (failures < 20) $display("dx=%0d dy=%0d point %0d: got %0d expected %0d", dx, dy, a, rd_data, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
