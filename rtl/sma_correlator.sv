// sma_correlator: the digital I.F. processor and XF correlator of the array.
//
// Data path per station: N_BBC baseband converter outputs (treated here as
// sampled voltages) -> 2-bit samplers -> digital switching matrix -> every
// baseline chassis that uses the station. One baseline_chassis per pair of
// stations (15 for six stations) correlates the station X signals (lower
// station number) against station Y, page by page, with delay compensation,
// dump, unload and SIG/REF summation inside the chassis. Beside the data path
// sit the digital dividers and phase detectors of the N_LO shared baseband
// L.O. synthesizers, whose VCO and loop filter are analog and outside.
//
// Clock: clk is the 32 MHz correlator clock; each signal carries an (even,
// odd) sample pair per clock, i.e. 64 Ms/s. Each LO synthesizer has its own
// vco_clk and all share the 10 MHz ref_clk.
//
// Host bus (a plain register bus standing in for the VME and computer links),
// 24-bit word address, addr[23:19] selects the target:
//   0 .. NB-1            baseline chassis b, addr[17:0] (see accum_control)
//   16 .. 16+N_STATIONS-1 switch of station s: write, addr[SW-1:0] = output,
//                        wdata = input that feeds it
//   24                   L.O. synthesizer words: addr[4:0] synthesizer,
//                        wdata[10:0] frequency in MHz (reads back)
// Read data is valid two clocks after the address.
module sma_correlator
  import corr_pkg::*;
#(
  parameter int unsigned N_STATIONS  = 6,
  parameter int unsigned N_MODULES   = 16,
  parameter int unsigned DEPTH       = 2048,
  parameter int unsigned DUMP_CYCLES = 128000,
  parameter int unsigned N_LO        = 32,
  localparam int unsigned N_BBC      = 8 * N_MODULES,
  localparam int unsigned NB         = N_STATIONS * (N_STATIONS - 1) / 2,
  localparam int unsigned SW         = $clog2(N_BBC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] bbc_level [N_STATIONS][N_BBC][2],
  input  logic        [7:0] thresh,
  input  logic              sig_ref,
  input  logic              host_we,
  input  logic [23:0]       host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  input  logic [N_LO-1:0]   vco_clk,
  input  logic              ref_clk,
  output logic [N_LO-1:0]   lo_fb_div,
  output logic [N_LO-1:0]   lo_ref_div,
  output logic [N_LO-1:0]   lo_up,
  output logic [N_LO-1:0]   lo_dn
);
  function automatic int bidx(int i, int j);
    return i * N_STATIONS - i * (i + 1) / 2 + (j - i - 1);
  endfunction

  wire [4:0] tgt = host_addr[23:19];

  // ---- samplers and switching matrix
  pair_t samp [N_STATIONS][N_BBC];
  pair_t sw   [N_STATIONS][N_BBC];

  for (genvar s = 0; s < N_STATIONS; s++) begin : g_st
    for (genvar k = 0; k < N_BBC; k++) begin : g_smp
      sampler_2bit u_smp (.clk, .level(bbc_level[s][k]), .thresh, .code(samp[s][k]));
    end
    sample_switch #(.N(N_BBC)) u_sw (
      .clk, .rst_n,
      .din     (samp[s]),
      .dout    (sw[s]),
      .cfg_we  (host_we && tgt == 5'(16 + s)),
      .cfg_addr(host_addr[SW-1:0]),
      .cfg_sel (host_wdata[SW-1:0])
    );
  end

  // ---- baseline chassis, one per station pair
  logic [31:0] ch_rdata [NB];

  for (genvar i = 0; i < N_STATIONS; i++) begin : g_i
    for (genvar j = i + 1; j < N_STATIONS; j++) begin : g_j
      localparam int B = bidx(i, j);
      baseline_chassis #(.N_MODULES(N_MODULES), .DEPTH(DEPTH), .DUMP_CYCLES(DUMP_CYCLES)) u_bl (
        .clk, .rst_n,
        .x_sig     (sw[i]),
        .y_sig     (sw[j]),
        .sig_ref,
        .host_we   (host_we && tgt == 5'(B)),
        .host_addr (host_addr[17:0]),
        .host_wdata,
        .host_rdata(ch_rdata[B])
      );
    end
  end

  // ---- L.O. synthesizer digital sections
  logic [10:0] lo_word [N_LO];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LO; l++) lo_word[l] <= 11'd1000;
    end else if (host_we && tgt == 5'd24) begin
      lo_word[host_addr[4:0]] <= host_wdata[10:0];
    end
  end

  for (genvar l = 0; l < N_LO; l++) begin : g_lo
    lo_synth_dividers u_lo (
      .vco_clk(vco_clk[l]), .ref_clk, .rst_n,
      .n_mhz  (lo_word[l]),
      .fb_div (lo_fb_div[l]),
      .ref_div(lo_ref_div[l]),
      .up     (lo_up[l]),
      .dn     (lo_dn[l])
    );
  end

  // ---- host read mux (chassis data is registered inside; align here)
  logic [4:0]  tgt_q;
  logic [4:0]  lo_a_q;
  logic [31:0] rd_q;
  logic [31:0] ch_sel;
  always_comb begin
    ch_sel = '0;
    for (int b = 0; b < NB; b++)
      if (tgt_q == 5'(b)) ch_sel = ch_rdata[b];
  end
  always_ff @(posedge clk) begin
    tgt_q  <= tgt;
    lo_a_q <= host_addr[4:0];
    if (tgt_q < 5'(NB))        rd_q <= ch_sel;
    else if (tgt_q == 5'd24)   rd_q <= {21'd0, lo_word[lo_a_q]};
    else                       rd_q <= '0;
  end
  assign host_rdata = rd_q;

endmodule
