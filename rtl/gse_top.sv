// gse_top -- the ground-support electronics for the MAXI Gas Slit Camera:
// NB VME I/O boards loaded as pseudo-DP and NB boards loaded as pseudo-MDP,
// in one VME crate read by one host computer.
//
// The same board runs either configuration; which one is only a matter of
// the FPGA program loaded. A pseudo-DP board replaces the flight digital
// processor in front of one GSC electronics unit (GSCE-A or GSCE-B, six
// counters each), so NB=2 boards read all twelve counters. A pseudo-MDP
// board replaces one GSCE with its counters in front of the flight DP. The
// two groups belong to different test set-ups and share only the VME bus
// here: each board has its own VME slave, its own 32 Mbyte address window
// and its own serial link signals brought out as ports. Wiring a pseudo-MDP
// board's links to a pseudo-DP board's links gives a complete DP-MDP loop,
// which is how the tests exercise the design.
//
// VME windows (A31..A25): pseudo-DP board b at VME_BASE+b, pseudo-MDP board
// b at VME_BASE+NB+b. Inside a window, byte offset 4*w reaches memory word w
// (w < 2^22) and offset 0x0100_0000 + 4*r reaches register r (see gse_pkg).
// The VME data lines are split into vme_d_in and vme_d_out with an output
// enable; DTACK* of all boards is wire-ANDed (open collector on the bus).
//
// Each configuration has its own clock: 25 MHz for the pseudo-DP (one cycle
// per 40 ns command-register check) and 24 MHz for the pseudo-MDP (the
// timing base of the pseudo events).
module gse_top
  import gse_pkg::*;
#(
  parameter int unsigned NB       = 2,
  parameter int unsigned DP_CLK   = DP_CLK_HZ,
  parameter int unsigned MDP_CLK  = MDP_CLK_HZ,
  parameter int unsigned BAUD     = LINK_BAUD,
  parameter int unsigned AW       = MEM_AW,
  parameter logic [6:0]  VME_BASE = 7'h10
) (
  input  logic          dp_clk,
  input  logic          dp_rst_n,
  input  logic          mdp_clk,
  input  logic          mdp_rst_n,
  // VME bus
  input  logic          vme_as_n,
  input  logic [1:0]    vme_ds_n,
  input  logic          vme_write_n,
  input  logic          vme_lword_n,
  input  logic [5:0]    vme_am,
  input  logic [31:1]   vme_addr,
  input  logic [31:0]   vme_d_in,
  output logic [31:0]   vme_d_out,
  output logic          vme_d_oe,
  output logic          vme_dtack_n,
  // pseudo-DP boards: command link out, event link in
  output logic [NB-1:0] dp_cmd_en_n,
  output logic [NB-1:0] dp_cmd_clk,
  output logic [NB-1:0] dp_cmd_data,
  input  logic [NB-1:0] dp_dat_en_n,
  input  logic [NB-1:0] dp_dat_clk,
  input  logic [NB-1:0] dp_dat_data,
  // pseudo-MDP boards: command link in, event link out
  input  logic [NB-1:0] mdp_cmd_en_n,
  input  logic [NB-1:0] mdp_cmd_clk,
  input  logic [NB-1:0] mdp_cmd_data,
  output logic [NB-1:0] mdp_dat_en_n,
  output logic [NB-1:0] mdp_dat_clk,
  output logic [NB-1:0] mdp_dat_data
);

  localparam int unsigned NBRD = 2 * NB;

  logic [NBRD-1:0][31:0] brd_d_out;
  logic [NBRD-1:0]       brd_d_oe, brd_dtack_n;

  for (genvar b = 0; b < NB; b++) begin : g_board
    logic               dp_start, dp_we, dp_ack, mdp_start, mdp_we, mdp_ack;
    logic [HOST_AW-1:0] dp_addr, mdp_addr;
    logic [31:0]        dp_wdata, dp_rdata, mdp_wdata, mdp_rdata;

    vme_slave u_dp_vme (
      .clk (dp_clk), .rst_n (dp_rst_n),
      .base_addr (VME_BASE + 7'(b)),
      .as_n (vme_as_n), .ds_n (vme_ds_n), .write_n (vme_write_n), .lword_n (vme_lword_n),
      .am (vme_am), .addr (vme_addr), .d_in (vme_d_in),
      .d_out (brd_d_out[b]), .d_oe (brd_d_oe[b]), .dtack_n (brd_dtack_n[b]),
      .hb_start (dp_start), .hb_we (dp_we), .hb_addr (dp_addr), .hb_wdata (dp_wdata),
      .hb_ack (dp_ack), .hb_rdata (dp_rdata)
    );

    pseudo_dp #(.CLK_HZ(DP_CLK), .BAUD(BAUD), .AW(AW)) u_dp (
      .clk      (dp_clk),
      .rst_n    (dp_rst_n),
      .hb_start (dp_start),
      .hb_we    (dp_we),
      .hb_addr  (dp_addr),
      .hb_wdata (dp_wdata),
      .hb_ack   (dp_ack),
      .hb_rdata (dp_rdata),
      .cmd_en_n (dp_cmd_en_n[b]),
      .cmd_clk  (dp_cmd_clk[b]),
      .cmd_data (dp_cmd_data[b]),
      .dat_en_n (dp_dat_en_n[b]),
      .dat_clk  (dp_dat_clk[b]),
      .dat_data (dp_dat_data[b])
    );

    vme_slave u_mdp_vme (
      .clk (mdp_clk), .rst_n (mdp_rst_n),
      .base_addr (VME_BASE + 7'(NB + b)),
      .as_n (vme_as_n), .ds_n (vme_ds_n), .write_n (vme_write_n), .lword_n (vme_lword_n),
      .am (vme_am), .addr (vme_addr), .d_in (vme_d_in),
      .d_out (brd_d_out[NB + b]), .d_oe (brd_d_oe[NB + b]), .dtack_n (brd_dtack_n[NB + b]),
      .hb_start (mdp_start), .hb_we (mdp_we), .hb_addr (mdp_addr), .hb_wdata (mdp_wdata),
      .hb_ack (mdp_ack), .hb_rdata (mdp_rdata)
    );

    pseudo_mdp #(.CLK_HZ(MDP_CLK), .BAUD(BAUD), .AW(AW)) u_mdp (
      .clk      (mdp_clk),
      .rst_n    (mdp_rst_n),
      .hb_start (mdp_start),
      .hb_we    (mdp_we),
      .hb_addr  (mdp_addr),
      .hb_wdata (mdp_wdata),
      .hb_ack   (mdp_ack),
      .hb_rdata (mdp_rdata),
      .cmd_en_n (mdp_cmd_en_n[b]),
      .cmd_clk  (mdp_cmd_clk[b]),
      .cmd_data (mdp_cmd_data[b]),
      .dat_en_n (mdp_dat_en_n[b]),
      .dat_clk  (mdp_dat_clk[b]),
      .dat_data (mdp_dat_data[b])
    );
  end

  // bus-level combination of the boards' drivers
  always_comb begin
    vme_d_out   = '0;
    vme_d_oe    = 1'b0;
    vme_dtack_n = 1'b1;
    for (int unsigned i = 0; i < NBRD; i++) begin
      if (brd_d_oe[i]) vme_d_out = vme_d_out | brd_d_out[i];
      vme_d_oe    = vme_d_oe | brd_d_oe[i];
      vme_dtack_n = vme_dtack_n & brd_dtack_n[i];
    end
  end

endmodule
