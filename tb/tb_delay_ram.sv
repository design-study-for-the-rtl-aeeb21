// tb_delay_ram: writes a counting-plus-random word stream and checks
// dout(t) = din(t - delay - 2) for several delays, including 0 and DEPTH-2,
// and a delay change on the fly. Uses DEPTH = 64 to keep the run short.
module tb_delay_ram;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic [31:0] din, dout;
  logic [5:0]  delay;
  logic [31:0] hist [0:8191];
  int checks = 0, failures = 0;

  delay_ram #(.W(32), .DEPTH(DEPTH)) dut (.*);

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, since;
    din = 0; delay = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0; since = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      // values on dout now were produced by the edge at the end of clock t-1
      if (since > delay + 2 && t > delay + 2) begin
        checks++;
        if (dout !== hist[t - 1 - int'(delay) - 1]) begin
          failures++;
          if (failures < 10) $display("t=%0d delay=%0d got %h expected %h", t, delay, dout, hist[t - int'(delay) - 2]);
        end
      end
      if (k % 500 == 0) begin
        delay = (k == 1000) ? 6'(DEPTH - 2) : (k == 0) ? 6'd0 : 6'($urandom_range(1, DEPTH - 3));
        since = 0;
      end
      din = {16'(t), 16'($urandom)};
      hist[t] = din;
      @(negedge clk);
      t++; since++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
