// delay_ram: programmable delay line for one station's sample words.
//
// Compensates the interferometer delay in whole 32 MHz clocks (31.25 ns, two
// 64 Ms/s samples). A circular buffer of DEPTH words is written every clock at
// wp; the word read at wp-delay-1 is registered, so
//   dout(t) = din(t - delay - 2)     for delay in 0 .. DEPTH-2.
// DEPTH = 2048 covers the 100 lags per km of a 20 km baseline; the depth and
// the exact latency are this design's choices.
module delay_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] delay,
  output logic [W-1:0]  dout
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW-1:0] ra;

  assign ra = wp - delay - AW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp <= '0;
    else        wp <= wp + AW'(1);
  end

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    dout    <= mem[ra];
  end

endmodule
