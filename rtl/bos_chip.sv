// bos_chip: 16-lag, 2-bit cross-correlator chip.
//
// Models the NFRA ("Bos") correlator gate array as the document draws it: a
// 1-of-4 select on each of the X and Y inputs, a switchable extra delay
// flip-flop after each select, an 8-stage X delay line running one way and an
// 8-stage Y delay line running the other way, and 16 multiply/accumulators
// between them. X DATA OUT (end of the X line) and Y DATA OUT (end of the Y
// line) let chips be daisy chained for more lags.
//
// Taps (this design's choice): MAC 2c multiplies X stage c by Y stage 7-c and
// MAC 2c+1 multiplies X stage c by Y stage 6-c (MAC 15 takes the Y line input).
// With x0/y0 the signals after the optional delay, MAC i at clock t sees
// x0(t-1-c) and y0(t-8+c) or y0(t-7+c), i.e. it accumulates x0(s)*y0(s+i-7):
// MAC i measures lag i-7 in samples of this chip's stream.
//
// Each MAC adds the offset reduced product (corr_pkg::rprod, 0..6) into a
// PRESCALE+LATCH_W bit counter; 4 prescaler bits plus 16 latched bits make the
// 20 accumulation stages of the chip's data sheet (6+16 = 22 is the other
// option). A one-clock dump pulse copies the upper LATCH_W bits into the result
// latches and restarts each counter with that clock's product, so no sample
// is lost between periods. rd_data is the latch selected by rd_idx
// (combinational). One sample per clock; the clock is the 32 MHz sample clock.
module bos_chip
  import corr_pkg::*;
#(
  parameter int unsigned PRESCALE = 4,
  parameter int unsigned LATCH_W  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sample_t     x_in [4],     // (a)..(d)
  input  sample_t     y_in [4],
  input  logic [1:0]  x_sel,
  input  logic [1:0]  y_sel,
  input  logic        x_dly,        // 1: pass X through the extra DELAY FF
  input  logic        y_dly,
  output sample_t     x_out,
  output sample_t     y_out,
  input  logic        dump,
  input  logic [3:0]  rd_idx,
  output logic [LATCH_W-1:0] rd_data
);
  localparam int unsigned ACC_W = PRESCALE + LATCH_W;
  localparam int unsigned NST   = 8;

  sample_t x_s, y_s, x_d, y_d, x0, y0;
  sample_t xr [NST];
  sample_t yr [NST];
  logic [LATCH_W-1:0] lat [16];

  assign x_s = x_in[x_sel];
  assign y_s = y_in[y_sel];
  assign x0  = x_dly ? x_d : x_s;
  assign y0  = y_dly ? y_d : y_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d <= '0;
      y_d <= '0;
      for (int s = 0; s < NST; s++) begin
        xr[s] <= '0;
        yr[s] <= '0;
      end
    end else begin
      x_d   <= x_s;
      y_d   <= y_s;
      xr[0] <= x0;
      yr[0] <= y0;
      for (int s = 1; s < NST; s++) begin
        xr[s] <= xr[s-1];
        yr[s] <= yr[s-1];
      end
    end
  end

  assign x_out = xr[NST-1];
  assign y_out = yr[NST-1];

  for (genvar i = 0; i < 16; i++) begin : g_mac
    localparam int C = i / 2;
    sample_t ytap;
    logic [PROD_W-1:0] p;
    logic [ACC_W-1:0]   acc;
    logic [LATCH_W-1:0] res;
    if (i % 2 == 0)    begin : g_even assign ytap = yr[7-C]; end
    else if (C == 7)   begin : g_last assign ytap = y0;      end
    else               begin : g_odd  assign ytap = yr[6-C]; end
    assign p = rprod(xr[C], ytap);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc <= '0;
        res <= '0;
      end else if (dump) begin
        res <= acc[ACC_W-1:PRESCALE];
        acc <= ACC_W'(p);
      end else begin
        acc <= acc + ACC_W'(p);
      end
    end
    assign lat[i] = res;
  end

  assign rd_data = lat[rd_idx];

endmodule
