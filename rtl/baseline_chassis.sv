// baseline_chassis: the processor for one baseline (station X against Y).
//
// N_MODULES correlator modules (16: 32 pages, 128 signals per station) and the
// accumulator/control module. Neighbouring modules are linked for daisy
// chains that span cards (X runs from module m to m+1, Y from m+1 to m). Module m receives station signals 8m..8m+7 of
// each side. The control module issues the dump, walks the modules over the
// readout bus (module select registered to line up with each module's
// registered readout) and keeps the summation memory; host accesses go
// through it (see accum_control for the address map).
module baseline_chassis
  import corr_pkg::*;
#(
  parameter int unsigned N_MODULES   = 16,
  parameter int unsigned DEPTH       = 2048,
  parameter int unsigned DUMP_CYCLES = 128000,
  parameter int unsigned PRESCALE    = 4,
  localparam int unsigned MW         = (N_MODULES > 1) ? $clog2(N_MODULES) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pair_t       x_sig [8*N_MODULES],
  input  pair_t       y_sig [8*N_MODULES],
  input  logic        sig_ref,
  input  logic        host_we,
  input  logic [17:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  logic          dump, mcfg_we;
  logic [MW-1:0] rd_mod, rd_mod_q, mcfg_mod;
  logic [8:0]    rd_addr;
  logic [1:0]    mcfg_addr;
  logic [15:0]   mcfg_wdata;
  logic [16:0]   mod_data [N_MODULES];

  accum_control #(.N_MODULES(N_MODULES), .DUMP_CYCLES(DUMP_CYCLES)) u_ctl (
    .clk, .rst_n, .sig_ref,
    .dump, .rd_mod, .rd_addr, .rd_data(mod_data[rd_mod_q]),
    .mcfg_we, .mcfg_mod, .mcfg_addr, .mcfg_wdata,
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

  always_ff @(posedge clk) rd_mod_q <= rd_mod;

  for (genvar m = 0; m < N_MODULES; m++) begin : g_mod
    sample_t xo [4], yo [4];    // this module's link outputs
    sample_t xi [4], yi [4];
    if (m == 0) begin : g_xf
      assign xi = '{default: '0};
    end else begin : g_xl
      assign xi = g_mod[m-1].xo;
    end
    if (m == N_MODULES - 1) begin : g_yf
      assign yi = '{default: '0};
    end else begin : g_yl
      assign yi = g_mod[m+1].yo;
    end
    correlator_module #(.DEPTH(DEPTH), .PRESCALE(PRESCALE)) u_mod (
      .clk, .rst_n,
      .x_sig    (x_sig[8*m +: 8]),
      .y_sig    (y_sig[8*m +: 8]),
      .x_link_in (xi),
      .y_link_in (yi),
      .x_link_out(xo),
      .y_link_out(yo),
      .cfg_we   (mcfg_we && mcfg_mod == MW'(m)),
      .cfg_addr (mcfg_addr),
      .cfg_wdata(mcfg_wdata),
      .dump,
      .rd_addr,
      .rd_data  (mod_data[m])
    );
  end

endmodule
