// quad_correlator: 32-channel real correlator at 64 Ms/s from four 16-lag chips.
//
// Each signal arrives as an (even, odd) pair of samples per 32 MHz clock. Four
// bos_chip instances correlate the half-rate streams: chip 0 Even*Even, chip 1
// Odd*Odd, chip 2 Even*Odd (X even, Y odd), chip 3 Odd*Even. The full-rate
// correlation at an even lag 2j is EE(j)+OO(j); at an odd lag 2j+1 it is
// EO(j)+OE(j+1). The pairwise sums are formed at readout.
//
// Lag range (this design's choice): on a local Y input, chips 0, 1 and 2
// switch in their extra Y delay flip-flop, which makes output n (0..31) the
// full-rate lag k = n-16, i.e. sum over s of x[s]*y[s+n-16]. Output n reads MAC
// n/2 of chips 0+1 (n even) or 2+3 (n odd), 17 bits.
//
// Daisy chaining: x_src selects the chain input for X instead of the local
// signal, y_src likewise for Y; the chain inputs carry one sample per chip
// from the neighbouring quad's X/Y DATA OUT. The optional delay is not applied
// to a chained Y, so a chain of L quads, quad q counted from the X end, covers
// lags 32q-16L .. 32q-16L+31 without gaps.
//
// Timing: samples enter every clock, dump is broadcast to all chips, and
// rd_data is combinational from the chips' latches.
module quad_correlator
  import corr_pkg::*;
#(
  parameter int unsigned PRESCALE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pair_t       x_loc,
  input  pair_t       y_loc,
  input  sample_t     x_casc_in  [4],
  input  sample_t     y_casc_in  [4],
  output sample_t     x_casc_out [4],
  output sample_t     y_casc_out [4],
  input  logic        x_src,          // 0 local, 1 daisy chain
  input  logic        y_src,
  input  logic        dump,
  input  logic [4:0]  rd_lag,
  output logic [16:0] rd_data
);
  // chip c uses X sample XPH[c] and Y sample YPH[c] (0 even, 1 odd)
  localparam bit XPH [4] = '{1'b0, 1'b1, 1'b0, 1'b1};
  localparam bit YPH [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
  localparam bit YDL [4] = '{1'b1, 1'b1, 1'b1, 1'b0};

  logic [15:0] lat [4];

  for (genvar c = 0; c < 4; c++) begin : g_chip
    sample_t xi [4];
    sample_t yi [4];
    assign xi[0] = x_loc[XPH[c]];
    assign xi[1] = x_casc_in[c];
    assign xi[2] = '0;
    assign xi[3] = '0;
    assign yi[0] = y_loc[YPH[c]];
    assign yi[1] = y_casc_in[c];
    assign yi[2] = '0;
    assign yi[3] = '0;

    bos_chip #(.PRESCALE(PRESCALE), .LATCH_W(16)) u_chip (
      .clk, .rst_n,
      .x_in   (xi),
      .y_in   (yi),
      .x_sel  ({1'b0, x_src}),
      .y_sel  ({1'b0, y_src}),
      .x_dly  (1'b0),
      .y_dly  (YDL[c] && !y_src),
      .x_out  (x_casc_out[c]),
      .y_out  (y_casc_out[c]),
      .dump,
      .rd_idx (rd_lag[4:1]),
      .rd_data(lat[c])
    );
  end

  assign rd_data = rd_lag[0] ? 17'(lat[2]) + 17'(lat[3])
                             : 17'(lat[0]) + 17'(lat[1]);

endmodule
