// tb_lo_synth_dividers: checks the synthesizer's dividers and detector.
// The feedback divider must give one fb_div rising edge every n_mhz VCO
// cycles for several n_mhz (1000, 1001, 1234, 1999, 2000); the reference
// divider one ref_div edge every 10 reference cycles. The phase/frequency
// detector is then checked for sign: with the reference faster than the
// divided VCO, up must be on far longer than dn, and the other way round.
module tb_lo_synth_dividers;
  logic vco_clk = 0, ref_clk = 0, rst_n = 0;
  logic [10:0] n_mhz;
  logic fb_div, ref_div, up, dn;
  int checks = 0, failures = 0;
  int ref_half = 100;

  lo_synth_dividers dut (.*);

  always #1 vco_clk = ~vco_clk;
  always #(ref_half) ref_clk = ~ref_clk;
  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count VCO cycles between fb_div rising edges
  int vcnt = 0, fb_period = 0, fb_edges = 0;
  always @(posedge vco_clk) vcnt++;
  always @(posedge fb_div) begin fb_period = vcnt; vcnt = 0; fb_edges++; end
  int rcnt = 0, ref_period = 0;
  always @(posedge ref_clk) rcnt++;
  always @(posedge ref_div) begin ref_period = rcnt; rcnt = 0; end
  longint up_t = 0, dn_t = 0;
  always @(posedge vco_clk) begin up_t += up; dn_t += dn; end

  initial begin
    int ns [5] = '{1000, 1001, 1234, 1999, 2000};
    n_mhz = 11'd1000;
    #10 rst_n = 1;
    foreach (ns[i]) begin
      n_mhz = 11'(ns[i]);
      // skip two periods after a change, then check three
      @(posedge fb_div); @(posedge fb_div);
      repeat (3) begin
        @(posedge fb_div);
        #0.5;
        checks++;
        if (fb_period != ns[i]) begin
          failures++;
          $display("n=%0d: fb period %0d", ns[i], fb_period);
        end
      end
    end
    repeat (3) @(posedge ref_div);
    #0.5;
    checks++;
    if (ref_period != 10) begin failures++; $display("ref period %0d", ref_period); end
    // detector: n = 1000 -> fb period 2000 time units; reference period 20*ref_half
    n_mhz = 11'd1000;
    ref_half = 90;  // reference fast
    repeat (5) @(posedge ref_div);
    up_t = 0; dn_t = 0;
    repeat (20) @(posedge ref_div);
    checks++;
    if (!(up_t > 4 * dn_t + 100)) begin failures++; $display("fast ref: up %0d dn %0d", up_t, dn_t); end
    ref_half = 110; // reference slow
    repeat (5) @(posedge ref_div);
    up_t = 0; dn_t = 0;
    repeat (20) @(posedge ref_div);
    checks++;
    if (!(dn_t > 4 * up_t + 100)) begin failures++; $display("slow ref: up %0d dn %0d", up_t, dn_t); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
