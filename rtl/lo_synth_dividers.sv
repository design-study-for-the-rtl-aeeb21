// lo_synth_dividers: digital part of a baseband converter L.O. synthesizer.
//
// The synthesizer is a phase-locked 1-2 GHz oscillator stepped in 1 MHz. This
// block holds its three digital parts:
//  - feedback divider on vco_clk: a dual-modulus /10 or /11 prescaler followed
//    by a program counter P and a swallow counter S (pulse swallowing). With
//    n_mhz = 10P + S, the first S prescaler cycles of every output period divide
//    by 11 and the remaining P-S by 10, so fb_div has a period of exactly n_mhz
//    VCO cycles (1 MHz when locked). The P/S split is this design's choice;
//  - reference divider on ref_clk: 10 MHz / 10 = 1 MHz on ref_div;
//  - phase/frequency detector: up is set by a rising ref_div, dn by a rising
//    fb_div, and both are cleared together as soon as both are set, so the
//    width of up (or dn) is the phase lead of the reference (or the VCO).
// n_mhz is 1000..2000 and is treated as static (written while the loop is
// being retuned). The detector's clear path (up & dn resetting both flops) is
// the intended asynchronous loop of this kind of detector.
module lo_synth_dividers (
  input  logic        vco_clk,
  input  logic        ref_clk,
  input  logic        rst_n,
  input  logic [10:0] n_mhz,
  output logic        fb_div,
  output logic        ref_div,
  output logic        up,
  output logic        dn
);
  // ---- feedback divider (vco_clk domain)
  logic [7:0] p_val, p_cnt;
  logic [3:0] s_val, pre_cnt;
  logic       mc;             // 1: prescaler divides by 11
  logic       pre_tc;

  assign p_val  = 8'(n_mhz / 11'd10);
  assign s_val  = 4'(n_mhz % 11'd10);
  assign mc     = (p_cnt < 8'(s_val));
  assign pre_tc = (pre_cnt == (mc ? 4'd10 : 4'd9));

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt <= '0;
      p_cnt   <= '0;
      fb_div  <= 1'b0;
    end else begin
      pre_cnt <= pre_tc ? 4'd0 : pre_cnt + 4'd1;
      if (pre_tc) begin
        p_cnt  <= (p_cnt == p_val - 8'd1) ? 8'd0 : p_cnt + 8'd1;
        fb_div <= (p_cnt == p_val - 8'd1) || (p_cnt < 8'((p_val >> 1) - 8'd1));
      end
    end
  end

  // ---- reference divider (ref_clk domain)
  logic [3:0] r_cnt;
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cnt   <= '0;
      ref_div <= 1'b0;
    end else begin
      r_cnt   <= (r_cnt == 4'd9) ? 4'd0 : r_cnt + 4'd1;
      ref_div <= (r_cnt == 4'd9) || (r_cnt < 4'd4);
    end
  end

  // ---- phase / frequency detector
  logic clr_n;
  assign clr_n = rst_n & ~(up & dn);

  always_ff @(posedge ref_div or negedge clr_n) begin
    if (!clr_n) up <= 1'b0;
    else        up <= 1'b1;
  end

  always_ff @(posedge fb_div or negedge clr_n) begin
    if (!clr_n) dn <= 1'b0;
    else        dn <= 1'b1;
  end

endmodule
