// sample_switch: digital switching matrix between samplers and correlators.
//
// The second level of signal switching: each of the N correlator-side outputs
// of one station can take any of the N sampler outputs, so the correlators
// can use all baseband converters or only some of them (several outputs may
// share one input). The switch is a full crossbar with one select register
// per output, written through cfg_we/cfg_addr/cfg_sel; reset sets the identity
// mapping. Each output is registered: dout(t) = din[sel](t-1).
module sample_switch
  import corr_pkg::*;
#(
  parameter int unsigned N  = 128,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_t         din  [N],
  output pair_t         dout [N],
  input  logic          cfg_we,
  input  logic [SW-1:0] cfg_addr,
  input  logic [SW-1:0] cfg_sel
);
  logic [SW-1:0] sel [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) sel[o] <= SW'(o);
    end else if (cfg_we) begin
      sel[cfg_addr] <= cfg_sel;
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < N; o++) dout[o] <= din[sel[o]];
  end

endmodule
