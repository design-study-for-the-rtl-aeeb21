// tb_sampler_2bit: sweeps every input level against several thresholds and
// checks the registered {sign, magnitude} code of both samples of a pair.
module tb_sampler_2bit;
  import corr_pkg::*;
  logic clk = 0;
  logic signed [7:0] level [2];
  logic [7:0] thresh;
  pair_t code;
  int checks = 0, failures = 0;

  sampler_2bit dut (.*);

  always #50 clk = ~clk;
  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t expect_code(int v, int th);
    int a;
    a = (v < 0) ? -v : v;
    return {v >= 0, a > th};
  endfunction

  initial begin
    for (int th = 0; th < 128; th += 31) begin
      for (int v = -128; v < 128; v++) begin
        @(negedge clk);
        thresh = 8'(th); level[0] = 8'(v); level[1] = 8'(-v - 1);
        @(negedge clk);
        checks += 2;
        if (code[0] != expect_code(v, th) || code[1] != expect_code(-v - 1, th)) begin
          failures++;
          if (failures < 10) $display("v=%0d th=%0d got %b %b", v, th, code[0], code[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
