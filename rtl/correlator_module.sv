// correlator_module: one correlator card, two frequency pages of a baseline.
//
// Holds two octal correlators (64 correlator chips), the delay memories for
// the station X and station Y signals, a small register file and the data
// readout buffer. Inputs are eight station signals per side, each an
// (even, odd) sample pair per clock: signals 0..3 are Video A..D of the first
// page, 4..7 of the second. Both sides pass through a delay_ram with its own
// delay register, so the geometric delay of either station is removed before
// correlation (latency delay+2 clocks).
//
// Registers (cfg_we, cfg_addr, cfg_wdata; a stand-in for the card's VME slave
// interface): 0 X delay, 1 Y delay, 2 {link from previous module (bit 8), link
// octal 0 -> octal 1 (bit 7), chain bits of octal 0 (6:0)}, 3 {link to next
// module (bit 7), chain bits of octal 1 (6:0)}. The x/y link ports carry a
// daisy chain from card to card over the backplane; the two cards of a link
// must both have their link bit set.
// Readout: rd_addr = {octal, correlator[2:0], lag[4:0]}; rd_data is registered,
// valid the clock after rd_addr. dump is broadcast to every chip.
module correlator_module
  import corr_pkg::*;
#(
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned PRESCALE = 4,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pair_t       x_sig [8],
  input  pair_t       y_sig [8],
  input  sample_t     x_link_in  [4],   // from the previous module
  input  sample_t     y_link_in  [4],   // from the next module
  output sample_t     x_link_out [4],
  output sample_t     y_link_out [4],
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [15:0] cfg_wdata,
  input  logic        dump,
  input  logic [8:0]  rd_addr,
  output logic [16:0] rd_data
);
  logic [AW-1:0] dly_x, dly_y;
  logic [6:0]    chain [2];
  logic          link_in, link_mid, link_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_x    <= '0;
      dly_y    <= '0;
      chain[0] <= '0;
      chain[1] <= '0;
      link_in  <= 1'b0;
      link_mid <= 1'b0;
      link_out <= 1'b0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        2'd0: dly_x    <= cfg_wdata[AW-1:0];
        2'd1: dly_y    <= cfg_wdata[AW-1:0];
        2'd2: {link_in, link_mid, chain[0]} <= cfg_wdata[8:0];
        2'd3: {link_out, chain[1]}          <= cfg_wdata[7:0];
      endcase
    end
  end

  // pack / delay / unpack: signal s, sample e at bits [4s+2e +: 2]
  logic [31:0] xw, yw, xd, yd;
  always_comb begin
    for (int s = 0; s < 8; s++)
      for (int e = 0; e < 2; e++) begin
        xw[4*s+2*e +: 2] = x_sig[s][e];
        yw[4*s+2*e +: 2] = y_sig[s][e];
      end
  end

  delay_ram #(.W(32), .DEPTH(DEPTH)) u_dly_x (.clk, .rst_n, .din(xw), .delay(dly_x), .dout(xd));
  delay_ram #(.W(32), .DEPTH(DEPTH)) u_dly_y (.clk, .rst_n, .din(yw), .delay(dly_y), .dout(yd));

  logic [16:0] rd [2];
  sample_t     xl [3][4];   // X links: module in, octal 0 -> 1, out
  sample_t     yl [3][4];   // Y links: out (octal 0), octal 1 -> 0, module in
  assign xl[0]      = x_link_in;
  assign x_link_out = xl[2];
  assign yl[2]      = y_link_in;
  assign y_link_out = yl[0];

  for (genvar o = 0; o < 2; o++) begin : g_oct
    pair_t xv [4];
    pair_t yv [4];
    for (genvar v = 0; v < 4; v++) begin : g_v
      for (genvar e = 0; e < 2; e++) begin : g_e
        assign xv[v][e] = xd[16*o+4*v+2*e +: 2];
        assign yv[v][e] = yd[16*o+4*v+2*e +: 2];
      end
    end
    octal_correlator #(.PRESCALE(PRESCALE)) u_oct (
      .clk, .rst_n,
      .x_vid  (xv),
      .y_vid  (yv),
      .chain  (chain[o]),
      .link_prev (o == 0 ? link_in  : link_mid),
      .link_next (o == 0 ? link_mid : link_out),
      .x_link_in (xl[o]),
      .y_link_in (yl[o+1]),
      .x_link_out(xl[o+1]),
      .y_link_out(yl[o]),
      .dump,
      .rd_addr(rd_addr[7:0]),
      .rd_data(rd[o])
    );
  end

  always_ff @(posedge clk) rd_data <= rd[rd_addr[8]];

endmodule
