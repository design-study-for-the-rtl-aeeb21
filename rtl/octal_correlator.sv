// octal_correlator: one "page pair" of a baseline, eight 32-channel correlators.
//
// Inputs are Video A, B, C, D of station X and of station Y (A and C right
// circular, B and D left circular). Following the wiring of the document's
// octal correlator drawing, correlator q forms:
//   0: XA*YA  1: XA*YB  2: XB*YA  3: XB*YB  4: XC*YC  5: XC*YD  6: XD*YC  7: XD*YD
// giving all four polarization products of two 32 MHz bands, 8 x 32 = 256
// points.
//
// chain[q] (this design's choice of which correlators can be chained) links
// correlator q to q+1: q+1 then takes its X from q's X DATA OUT and q takes its
// Y from q+1's Y DATA OUT, so a run of chained correlators acts as one
// correlator with 32 lags per member on the X signal of the first member and
// the Y signal of the last.
//
// link_prev/link_next extend a chain across octal boundaries: correlator 0
// then takes X from x_link_in (the previous octal's correlator 7) and
// correlator 7 takes Y from y_link_in (the next octal's correlator 0), so a
// chain can run through every correlator of a baseline, up to 256 x 32 lags.
//
// Readout: rd_addr = {correlator[2:0], lag[4:0]}, combinational 17-bit data.
module octal_correlator
  import corr_pkg::*;
#(
  parameter int unsigned PRESCALE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pair_t       x_vid [4],   // A, B, C, D
  input  pair_t       y_vid [4],
  input  logic [6:0]  chain,
  input  logic        link_prev,         // correlator 0 continues the previous octal's chain
  input  logic        link_next,         // correlator 7 continues into the next octal
  input  sample_t     x_link_in  [4],    // X DATA OUT of the previous octal's correlator 7
  input  sample_t     y_link_in  [4],    // Y DATA OUT of the next octal's correlator 0
  output sample_t     x_link_out [4],
  output sample_t     y_link_out [4],
  input  logic        dump,
  input  logic [7:0]  rd_addr,
  output logic [16:0] rd_data
);
  localparam int XV [8] = '{0, 0, 1, 1, 2, 2, 3, 3};
  localparam int YV [8] = '{0, 1, 0, 1, 2, 3, 2, 3};

  sample_t xco [8][4];
  sample_t yco [8][4];
  logic [16:0] rd [8];

  for (genvar q = 0; q < 8; q++) begin : g_q
    sample_t xci [4];
    sample_t yci [4];
    logic    xs, ys;
    if (q > 0) begin : g_xc
      assign xci = xco[q-1];
      assign xs  = chain[q-1];
    end else begin : g_x0
      assign xci = x_link_in;
      assign xs  = link_prev;
    end
    if (q < 7) begin : g_yc
      assign yci = yco[q+1];
      assign ys  = chain[q];
    end else begin : g_y7
      assign yci = y_link_in;
      assign ys  = link_next;
    end

    quad_correlator #(.PRESCALE(PRESCALE)) u_corr (
      .clk, .rst_n,
      .x_loc     (x_vid[XV[q]]),
      .y_loc     (y_vid[YV[q]]),
      .x_casc_in (xci),
      .y_casc_in (yci),
      .x_casc_out(xco[q]),
      .y_casc_out(yco[q]),
      .x_src     (xs),
      .y_src     (ys),
      .dump,
      .rd_lag    (rd_addr[4:0]),
      .rd_data   (rd[q])
    );
  end

  assign x_link_out = xco[7];
  assign y_link_out = yco[0];
  assign rd_data    = rd[rd_addr[7:5]];

endmodule
