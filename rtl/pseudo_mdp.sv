// pseudo_mdp -- FPGA configuration of one VME I/O board standing in for the
// GSC counters and their MDP electronics (an event generator), to test the
// MAXI digital processor (DP).
//
// Command path: 32-bit commands from the DP are received on the
// Enable/CLK/Data link and handed to cmd_responder, which raises an arrival
// flag for the host, answers a GPS request with a 64-bit reply at once, and
// starts or stops the event generator on GSC power on/off.
//
// Event path: event_generator reads 3-word packets (timing, upper, lower)
// from the board memory and offers each event after its programmed delay;
// the serial transmitter sends it to the DP at 128 kbit/s. A pending GPS
// reply goes out before the next event. The host may rewrite the pattern in
// memory at any time through the host bus, without stopping the link.
//
// Host bus: as in pseudo_dp. hb_addr[MEM_AW] = 0 addresses board memory,
// = 1 the registers of gse_pkg::mdp_reg_e. CTRL read bits: 0 generator
// running, 1 end of pattern reached (cleared by the next start), 2 command
// arrival flag.
//
// The block structure follows the published description; register map and
// host bus are this design's own. AW below MEM_AW shrinks the memory for
// simulation.
module pseudo_mdp
  import gse_pkg::*;
#(
  parameter int unsigned CLK_HZ = MDP_CLK_HZ,
  parameter int unsigned BAUD   = LINK_BAUD,
  parameter int unsigned AW     = MEM_AW
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic               hb_start,
  input  logic               hb_we,
  input  logic [HOST_AW-1:0] hb_addr,
  input  logic [31:0]        hb_wdata,
  output logic               hb_ack,
  output logic [31:0]        hb_rdata,
  // command link from the DP
  input  logic               cmd_en_n,
  input  logic               cmd_clk,
  input  logic               cmd_data,
  // event link to the DP
  output logic               dat_en_n,
  output logic               dat_clk,
  output logic               dat_data
);

  // ---------------- registers ----------------
  logic [MEM_AW-1:0] start_addr;
  logic [31:0]       gps_code, pwron_code, pwroff_code, gps_hdr;
  logic              host_start, host_stop, arr_clr, end_seen;

  // ---------------- command receiver and responder ----------------
  logic        rx_valid;
  logic [31:0] rx_data;
  logic        arrival, gen_start, gen_stop, gps_valid, gps_ready;
  logic [31:0] last_cmd, cmd_count, gps_count;
  logic [63:0] gps_data;

  serial_rx #(.NBITS(CMD_BITS)) u_rx (
    .clk, .rst_n,
    .ser_en_n (cmd_en_n),
    .ser_clk  (cmd_clk),
    .ser_data (cmd_data),
    .out_valid(rx_valid),
    .out_data (rx_data),
    .frame_err(),
    .arrival  ()
  );

  cmd_responder u_resp (
    .clk, .rst_n,
    .cmd_valid (rx_valid),
    .cmd_data  (rx_data),
    .arrival_clr (arr_clr),
    .gps_code, .pwron_code, .pwroff_code, .gps_hdr,
    .arrival, .last_cmd, .cmd_count,
    .gen_start, .gen_stop,
    .gps_valid, .gps_ready, .gps_data, .gps_count
  );

  // ---------------- memory, arbiter, generator ----------------
  logic [1:0]     c_req, c_gnt, c_rvalid;
  mem_req_t [1:0] c_cmd;
  logic [31:0]    c_rdata;
  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;
  logic        ev_valid, ev_ready, running, gen_done;
  logic [63:0] ev_data;
  logic [31:0] ev_sent;

  event_generator u_gen (
    .clk, .rst_n,
    .start      (gen_start | host_start),
    .stop       (gen_stop | host_stop),
    .start_addr,
    .c_req      (c_req[1]),
    .c_cmd      (c_cmd[1]),
    .c_gnt      (c_gnt[1]),
    .c_rvalid   (c_rvalid[1]),
    .c_rdata,
    .ev_valid, .ev_ready, .ev_data,
    .running, .done (gen_done), .ev_sent
  );

  mem_arbiter #(.N(2)) u_arb (
    .clk, .rst_n,
    .c_req, .c_cmd, .c_gnt, .c_rvalid, .c_rdata,
    .m_req, .m_we, .m_addr, .m_wdata, .m_rdata
  );

  gse_memory #(.AW(AW)) u_mem (
    .clk,
    .req   (m_req),
    .we    (m_we),
    .addr  (m_addr[AW-1:0]),
    .wdata (m_wdata),
    .rdata (m_rdata)
  );

  // ---------------- event / GPS transmitter ----------------
  logic        tx_ready;
  logic [63:0] tx_word;

  assign tx_word   = gps_valid ? gps_data : ev_data;
  assign gps_ready = tx_ready;
  assign ev_ready  = tx_ready && !gps_valid;

  serial_tx #(.NBITS(EVT_BITS), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n,
    .in_valid (gps_valid | ev_valid),
    .in_ready (tx_ready),
    .in_data  (tx_word),
    .ser_en_n (dat_en_n),
    .ser_clk  (dat_clk),
    .ser_data (dat_data),
    .done     ()
  );

  // ---------------- host bus ----------------
  logic        is_reg, mb_ack, rg_ack;
  logic [31:0] mb_rdata, rg_rdata;

  assign is_reg = hb_addr[MEM_AW];

  host_mem_bridge u_hmb (
    .clk, .rst_n,
    .start (hb_start && !is_reg),
    .we    (hb_we),
    .addr  (hb_addr[MEM_AW-1:0]),
    .wdata (hb_wdata),
    .ack   (mb_ack),
    .rdata (mb_rdata),
    .c_req (c_req[0]),
    .c_cmd (c_cmd[0]),
    .c_gnt (c_gnt[0]),
    .c_rvalid (c_rvalid[0]),
    .c_rdata
  );

  mdp_reg_e reg_sel;
  assign reg_sel = mdp_reg_e'(hb_addr[3:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_addr  <= '0;
      gps_code    <= '0;
      pwron_code  <= '0;
      pwroff_code <= '0;
      gps_hdr     <= '0;
      host_start  <= 1'b0;
      host_stop   <= 1'b0;
      arr_clr     <= 1'b0;
      end_seen    <= 1'b0;
      rg_ack      <= 1'b0;
      rg_rdata    <= '0;
    end else begin
      host_start <= 1'b0;
      host_stop  <= 1'b0;
      arr_clr    <= 1'b0;
      rg_ack     <= 1'b0;
      if (gen_done) end_seen <= 1'b1;
      if (gen_start || host_start) end_seen <= 1'b0;
      if (hb_start && is_reg) begin
        rg_ack <= 1'b1;
        if (hb_we) begin
          unique case (reg_sel)
            MDP_REG_CTRL: begin
              host_start <= hb_wdata[0];
              host_stop  <= hb_wdata[1];
            end
            MDP_REG_START:  start_addr  <= hb_wdata[MEM_AW-1:0];
            MDP_REG_ARRCLR: arr_clr     <= 1'b1;
            MDP_REG_GPSREQ: gps_code    <= hb_wdata;
            MDP_REG_PWRON:  pwron_code  <= hb_wdata;
            MDP_REG_PWROFF: pwroff_code <= hb_wdata;
            MDP_REG_GPSHDR: gps_hdr     <= hb_wdata;
            default: ;
          endcase
        end else begin
          unique case (reg_sel)
            MDP_REG_CTRL:   rg_rdata <= {29'd0, arrival, end_seen, running};
            MDP_REG_START:  rg_rdata <= 32'(start_addr);
            MDP_REG_CMD:    rg_rdata <= last_cmd;
            MDP_REG_GPSREQ: rg_rdata <= gps_code;
            MDP_REG_PWRON:  rg_rdata <= pwron_code;
            MDP_REG_PWROFF: rg_rdata <= pwroff_code;
            MDP_REG_GPSHDR: rg_rdata <= gps_hdr;
            MDP_REG_EVSENT: rg_rdata <= ev_sent;
            MDP_REG_CMDCNT: rg_rdata <= cmd_count;
            MDP_REG_GPSCNT: rg_rdata <= gps_count;
            default:        rg_rdata <= 32'hDEAD_0000;
          endcase
        end
      end
    end
  end

  assign hb_ack   = rg_ack | mb_ack;
  assign hb_rdata = rg_ack ? rg_rdata : mb_rdata;

endmodule
