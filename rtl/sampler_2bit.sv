// sampler_2bit: behavioural model of the 2-bit (4-level) sampler.
//
// The real part is an analog A/D converter on each baseband converter output;
// this model takes the analog voltage as a signed 8-bit number, two samples
// per 32 MHz clock (64 Ms/s), and registers the 2-bit codes {sign, magnitude}:
// sign = 1 for a level >= 0, magnitude = 1 when |level| > thresh. The code
// assignment and the threshold input are this design's choices.
module sampler_2bit
  import corr_pkg::*;
(
  input  logic              clk,
  input  logic signed [7:0] level [2],   // [0] even, [1] odd
  input  logic        [7:0] thresh,
  output pair_t             code
);
  function automatic sample_t quantize(logic signed [7:0] v, logic [7:0] t);
    logic [8:0] mag;
    mag = v[7] ? 9'(-$signed({v[7], v})) : {1'b0, v};
    return {~v[7], (mag > {1'b0, t})};
  endfunction

  always_ff @(posedge clk) begin
    code[0] <= quantize(level[0], thresh);
    code[1] <= quantize(level[1], thresh);
  end

endmodule
