// accum_control: accumulator/control module of a baseline chassis.
//
// Three jobs. (1) Accumulation control: a counter issues a one-clock dump to
// every correlator chip each dump_period clocks (default 128000, the 4 ms
// unload cycle at 32 MHz). (2) Unload: after each dump it reads every point of
// every module, N_MODULES x 512, one per clock over the chassis readout bus
// (rd_mod, rd_addr out; rd_data back one clock later), and adds it into the
// summation memory. (3) Summation memory: two banks, A and B, each with a SIG
// and a REF half; the sig_ref input, sampled at the dump, says into which half
// that dump goes, so the two parts of a phase- or load-switching cycle are
// accumulated apart. One bank accumulates while the host reads the other; a
// host "swap" exchanges them, and the first dump into each half of the new
// bank overwrites instead of adding. The banks, the swap and the overwrite
// rule are this design's reading of the drawn SIG/REF, A/B summation memory.
//
// A dump that falls due while an unload is still running is skipped and sets
// the sticky overrun flag (cleared by writing control bit 1).
//
// Host bus (word address, 18 bits; read data registered, one clock):
//   addr[17:16] = 0  registers: 0 dump_period (rw); 1 control (w: bit0 swap,
//                    bit1 clear overrun); 2 status {overrun, busy, acc_bank};
//                    3/4 SIG/REF dump count of the idle bank; 5 dumps issued
//   addr[17:16] = 1  module registers: addr[5:2] module, addr[1:0] register
//   addr[17:16] = 2  idle bank: addr[13] 0 SIG / 1 REF, addr[12:0] point
//                    {module, octal, correlator, lag}
module accum_control #(
  parameter int unsigned N_MODULES   = 16,
  parameter int unsigned DUMP_CYCLES = 128000,
  parameter int unsigned SUM_W       = 32,
  localparam int unsigned MW         = (N_MODULES > 1) ? $clog2(N_MODULES) : 1,
  localparam int unsigned NPTS       = N_MODULES * 512,
  localparam int unsigned PW         = $clog2(NPTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sig_ref,       // 0 SIG, 1 REF
  // to the correlator modules
  output logic              dump,
  output logic [MW-1:0]     rd_mod,
  output logic [8:0]        rd_addr,
  input  logic [16:0]       rd_data,
  output logic              mcfg_we,
  output logic [MW-1:0]     mcfg_mod,
  output logic [1:0]        mcfg_addr,
  output logic [15:0]       mcfg_wdata,
  // host
  input  logic              host_we,
  input  logic [17:0]       host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata
);
  logic [31:0]       period, cnt;
  logic              busy, overrun, acc_bank, tag;
  logic [PW-1:0]     idx, idx_d;
  logic              vld_d, last_d;
  logic              first [2];
  logic [15:0]       ndump [2];       // dumps in the accumulating bank
  logic [15:0]       ndump_idle [2];  // dumps in the idle bank
  logic [31:0]       ndumps_total;
  logic              swap_req;
  logic [SUM_W-1:0]  mem [4*NPTS];    // {bank, half, point}

  wire due  = (cnt == period - 32'd1);
  assign dump = due && !busy;

  wire reg_wr = host_we && host_addr[17:16] == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period       <= DUMP_CYCLES;
      cnt          <= '0;
      busy         <= 1'b0;
      overrun      <= 1'b0;
      acc_bank     <= 1'b0;
      tag          <= 1'b0;
      idx          <= '0;
      idx_d        <= '0;
      vld_d        <= 1'b0;
      last_d       <= 1'b0;
      first        <= '{1'b1, 1'b1};
      ndump        <= '{16'd0, 16'd0};
      ndump_idle   <= '{16'd0, 16'd0};
      ndumps_total <= '0;
      swap_req     <= 1'b0;
    end else begin
      cnt <= due ? '0 : cnt + 32'd1;
      if (due && busy) overrun <= 1'b1;

      // unload sequencer
      if (dump) begin
        busy         <= 1'b1;
        tag          <= sig_ref;
        idx          <= '0;
        ndumps_total <= ndumps_total + 32'd1;
      end else if (busy) begin
        idx <= idx + PW'(1);
        if (idx == PW'(NPTS - 1)) busy <= 1'b0;
      end
      vld_d  <= busy && !dump;
      idx_d  <= idx;
      last_d <= busy && idx == PW'(NPTS - 1);
      if (last_d) begin
        first[tag] <= 1'b0;
        ndump[tag] <= ndump[tag] + 16'd1;
      end

      // host registers
      if (reg_wr && host_addr[2:0] == 3'd0) begin
        period <= (host_wdata == 0) ? 32'd1 : host_wdata;
        cnt    <= '0;
      end
      if (reg_wr && host_addr[2:0] == 3'd1) begin
        if (host_wdata[0]) swap_req <= 1'b1;
        if (host_wdata[1]) overrun  <= 1'b0;
      end

      // a swap waits until no unload is in flight
      if (swap_req && !busy && !vld_d && !dump) begin
        swap_req   <= 1'b0;
        acc_bank   <= ~acc_bank;
        first      <= '{1'b1, 1'b1};
        ndump      <= '{16'd0, 16'd0};
        ndump_idle <= ndump;
      end
    end
  end

  assign rd_mod  = busy ? MW'(idx >> 9) : '0;
  assign rd_addr = idx[8:0];

  // summation memory: adders in front of the RAM
  wire [PW+1:0] wa = {acc_bank, tag, idx_d};
  always_ff @(posedge clk) begin
    if (vld_d)
      mem[wa] <= (first[tag] ? '0 : mem[wa]) + SUM_W'(rd_data);
  end

  // module configuration pass-through
  assign mcfg_we    = host_we && host_addr[17:16] == 2'd1;
  assign mcfg_mod   = MW'(host_addr[5:2]);
  assign mcfg_addr  = host_addr[1:0];
  assign mcfg_wdata = host_wdata[15:0];

  // host reads
  wire [PW+1:0] ra = {~acc_bank, host_addr[13], host_addr[PW-1:0]};
  always_ff @(posedge clk) begin
    unique case (host_addr[17:16])
      2'd0: unique case (host_addr[2:0])
              3'd0:    host_rdata <= period;
              3'd2:    host_rdata <= {29'd0, overrun, busy, acc_bank};
              3'd3:    host_rdata <= {16'd0, ndump_idle[0]};
              3'd4:    host_rdata <= {16'd0, ndump_idle[1]};
              3'd5:    host_rdata <= ndumps_total;
              default: host_rdata <= '0;
            endcase
      2'd2:    host_rdata <= 32'(mem[ra]);
      default: host_rdata <= '0;
    endcase
  end

endmodule
