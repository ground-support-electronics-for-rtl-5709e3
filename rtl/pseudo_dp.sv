// pseudo_dp -- FPGA configuration of one VME I/O board standing in for the
// MAXI digital processor (DP), to test GSC counters and the MDP.
//
// Command path: the host writes a 32-bit command into the command register;
// the register is examined every clock cycle (40 ns at 25 MHz) and, as soon
// as the serial transmitter is free, the command is sent to the MDP on the
// Enable/CLK/Data link at 128 kbit/s. A command written while the previous
// one is still waiting or being sent is refused and sets the sticky
// cmd_lost status bit.
//
// Event path: 64-bit GSC events from the MDP are received, converted to
// parallel form and written by dbuf_writer into one half of the board
// memory, with a size/pointer index, while the host reads the other half
// through the host bus. The host swaps the halves at its own pace, which
// turns the pair of buffers into an endless ring.
//
// Host bus: hb_start begins an access (hb_we, word address hb_addr, hb_wdata)
// and hb_ack answers it, with hb_rdata for a read. hb_addr[MEM_AW] = 0
// addresses board memory (word hb_addr[MEM_AW-1:0]); = 1 addresses the
// registers of gse_pkg::dp_reg_e. Register accesses are acknowledged in the
// next cycle, memory accesses after arbitration (a few cycles).
//
// Status register bits: 0 command busy, 1 buffer being written (0 A, 1 B),
// 2 overflow, 3 a buffer has been closed, 4 cmd_lost.
//
// The block structure follows the published board description; the
// register map and host bus are this design's own. AW below MEM_AW shrinks
// the memory for simulation (upper address bits are then ignored).
module pseudo_dp
  import gse_pkg::*;
#(
  parameter int unsigned CLK_HZ = DP_CLK_HZ,
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
  // command link to the MDP
  output logic               cmd_en_n,
  output logic               cmd_clk,
  output logic               cmd_data,
  // event link from the MDP
  input  logic               dat_en_n,
  input  logic               dat_clk,
  input  logic               dat_data
);

  // ---------------- command register and transmitter ----------------
  logic        cmd_pend, cmd_lost, tx_ready, tx_busy;
  logic [31:0] cmd_reg;

  serial_tx #(.NBITS(CMD_BITS), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n,
    .in_valid (cmd_pend),
    .in_ready (tx_ready),
    .in_data  (cmd_reg),
    .ser_en_n (cmd_en_n),
    .ser_clk  (cmd_clk),
    .ser_data (cmd_data),
    .done     ()
  );
  assign tx_busy = !tx_ready;

  // ---------------- event receiver ----------------
  logic        rx_valid, rx_err;
  logic [63:0] rx_data;
  logic [31:0] err_count;

  serial_rx #(.NBITS(EVT_BITS)) u_rx (
    .clk, .rst_n,
    .ser_en_n (dat_en_n),
    .ser_clk  (dat_clk),
    .ser_data (dat_data),
    .out_valid(rx_valid),
    .out_data (rx_data),
    .frame_err(rx_err),
    .arrival  ()
  );

  // ---------------- double buffer writer ----------------
  logic        swap;
  logic        wsel, closed_valid, overflow, dw_ready;
  logic [31:0] cur_count, closed_count, ev_count, drop_count;
  logic [1:0]     c_req, c_gnt, c_rvalid;
  mem_req_t [1:0] c_cmd;
  logic [31:0]    c_rdata;

  // An event arriving while the writer is busy with the previous one is
  // impossible at link speed (4 writes vs. >10,000 clocks per frame); it
  // would be dropped and counted as an error.
  dbuf_writer #(.AW(AW)) u_dbuf (
    .clk, .rst_n,
    .ev_valid (rx_valid),
    .ev_ready (dw_ready),
    .ev_data  (rx_data),
    .swap,
    .c_req    (c_req[1]),
    .c_cmd    (c_cmd[1]),
    .c_gnt    (c_gnt[1]),
    .wsel, .cur_count, .closed_count, .closed_valid, .overflow,
    .ev_count, .drop_count
  );

  // ---------------- memory and its arbiter ----------------
  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;

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

  // ---------------- host bus ----------------
  logic        is_reg;
  logic        mb_ack;
  logic [31:0] mb_rdata;
  logic        rg_ack;
  logic [31:0] rg_rdata;

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

  dp_reg_e reg_sel;
  assign reg_sel = dp_reg_e'(hb_addr[3:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_pend  <= 1'b0;
      cmd_lost  <= 1'b0;
      cmd_reg   <= '0;
      swap      <= 1'b0;
      rg_ack    <= 1'b0;
      rg_rdata  <= '0;
      err_count <= '0;
    end else begin
      swap   <= 1'b0;
      rg_ack <= 1'b0;
      if (cmd_pend && tx_ready) cmd_pend <= 1'b0;
      if (rx_err || (rx_valid && !dw_ready)) err_count <= err_count + 1'b1;
      if (hb_start && is_reg) begin
        rg_ack <= 1'b1;
        if (hb_we) begin
          unique case (reg_sel)
            DP_REG_CMD: begin
              if (cmd_pend || tx_busy) begin
                cmd_lost <= 1'b1;
              end else begin
                cmd_reg  <= hb_wdata;
                cmd_pend <= 1'b1;
              end
            end
            DP_REG_BUFCHG: swap <= 1'b1;
            DP_REG_STATUS: cmd_lost <= 1'b0;
            default: ;
          endcase
        end else begin
          unique case (reg_sel)
            DP_REG_CMD:     rg_rdata <= cmd_reg;
            DP_REG_STATUS:  rg_rdata <= {27'd0, cmd_lost, closed_valid, overflow, wsel,
                                         cmd_pend | tx_busy};
            DP_REG_BUFCHG:  rg_rdata <= closed_count;
            DP_REG_EVCNT:   rg_rdata <= ev_count;
            DP_REG_DROPCNT: rg_rdata <= drop_count;
            DP_REG_CURCNT:  rg_rdata <= cur_count;
            DP_REG_ERRCNT:  rg_rdata <= err_count;
            default:        rg_rdata <= 32'hDEAD_0000;
          endcase
        end
      end
    end
  end

  assign hb_ack   = rg_ack | mb_ack;
  assign hb_rdata = rg_ack ? rg_rdata : mb_rdata;

endmodule
