// vme_slave -- VME interface of one VME I/O board: decodes the board's
// address window and turns each VME data transfer into one access on the
// FPGA's host bus (the "VME address control" and "VME data control" of the
// board).
//
// Supported cycles: A32 single 32-bit data transfers (address modifiers
// 0x09 and 0x0D, LWORD* low, DS0* and DS1* both low, A1 low). The board
// answers in a 32 Mbyte window whose upper address bits A31..A25 equal
// base_addr; inside the window A24..A2 is the host-bus word address, so
// bit A24 selects the register file and A23..A2 the 16 Mbyte memory.
// Cycles that do not match are ignored (no DTACK*); the crate's bus timer
// ends them.
//
// AS*, DS0* and DS1* are synchronised to the local clock; address, address
// modifier, WRITE*, LWORD* and data are taken when the synchronised strobes
// show a transfer, which the VME set-up rules make safe. The host-bus access
// starts then; DTACK* is driven low when it completes, with the read data
// on d_out and d_oe high, and released once both data strobes have gone
// high again. One transfer thus costs the strobe synchroniser (2 clocks),
// the host-bus access and the release.
//
// That the board sits on the VME bus and that the host reaches the command
// register and memory through it follows the published description; the
// window size, the cycle types supported and the timing are this design's
// own. On the board this function lives in a separate programmable device
// next to the FPGA.
module vme_slave
  import gse_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [6:0]         base_addr,   // A31..A25 of this board's window
  // VME bus (active-low strobes)
  input  logic               as_n,
  input  logic [1:0]         ds_n,
  input  logic               write_n,
  input  logic               lword_n,
  input  logic [5:0]         am,
  input  logic [31:1]        addr,
  input  logic [31:0]        d_in,
  output logic [31:0]        d_out,
  output logic               d_oe,
  output logic               dtack_n,
  // host bus to the FPGA
  output logic               hb_start,
  output logic               hb_we,
  output logic [HOST_AW-1:0] hb_addr,
  output logic [31:0]        hb_wdata,
  input  logic               hb_ack,
  input  logic [31:0]        hb_rdata
);

  typedef enum logic [1:0] {V_IDLE, V_WAIT, V_DONE} vstate_e;
  vstate_e st;

  logic [1:0] as_s;
  logic [1:0] ds0_s, ds1_s;
  logic       strobe, released, match;

  always_comb begin
    strobe   = !as_s[1] && !ds0_s[1] && !ds1_s[1];
    released = ds0_s[1] && ds1_s[1];
    match    = (addr[31:25] == base_addr) && (am == 6'h09 || am == 6'h0D) &&
               !lword_n && !addr[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s     <= 2'b11;
      ds0_s    <= 2'b11;
      ds1_s    <= 2'b11;
      st       <= V_IDLE;
      hb_start <= 1'b0;
      hb_we    <= 1'b0;
      hb_addr  <= '0;
      hb_wdata <= '0;
      d_out    <= '0;
      d_oe     <= 1'b0;
      dtack_n  <= 1'b1;
    end else begin
      as_s     <= {as_s[0], as_n};
      ds0_s    <= {ds0_s[0], ds_n[0]};
      ds1_s    <= {ds1_s[0], ds_n[1]};
      hb_start <= 1'b0;
      unique case (st)
        V_IDLE: if (strobe && match) begin
          hb_start <= 1'b1;
          hb_we    <= !write_n;
          hb_addr  <= addr[HOST_AW+1:2];
          hb_wdata <= d_in;
          st       <= V_WAIT;
        end
        V_WAIT: if (hb_ack) begin
          d_out   <= hb_rdata;
          d_oe    <= !hb_we;
          dtack_n <= 1'b0;
          st      <= V_DONE;
        end
        V_DONE: if (released) begin
          d_oe    <= 1'b0;
          dtack_n <= 1'b1;
          st      <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  // DTACK* is only given while the master still holds a data strobe
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                     $fell(dtack_n) |-> !(ds0_s[1] && ds1_s[1]));

endmodule
