// tb_sample_switch: checks the identity mapping after reset, then random
// routings written through the configuration port (including several outputs
// taking one input), each output one clock behind its selected input.
module tb_sample_switch;
  import corr_pkg::*;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  pair_t din [N], dout [N];
  logic cfg_we;
  logic [6:0] cfg_addr, cfg_sel;
  int map [N];
  int checks = 0, failures = 0;

  sample_switch #(.N(N)) dut (.*);

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_and_check(int cycles);
    pair_t prev [N];
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      foreach (din[i]) begin din[i][0] = 2'($urandom); din[i][1] = 2'($urandom); end
      prev = din;
      @(negedge clk);
      for (int o = 0; o < N; o++) begin
        checks++;
        if (dout[o] != prev[map[o]]) begin
          failures++;
          if (failures < 10) $display("output %0d: not input %0d", o, map[o]);
        end
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_sel = 0;
    foreach (din[i]) din[i] = '{default: '0};
    for (int o = 0; o < N; o++) map[o] = o;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    drive_and_check(4);
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 40; k++) begin
        int o, i;
        o = $urandom_range(0, N - 1);
        i = (r == 3) ? 5 : $urandom_range(0, N - 1);
        @(negedge clk);
        cfg_we = 1; cfg_addr = 7'(o); cfg_sel = 7'(i);
        map[o] = i;
        @(negedge clk);
        cfg_we = 0;
      end
      drive_and_check(4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
