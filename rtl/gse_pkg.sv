// gse_pkg -- constants and types shared by the ground-support FPGA designs.
//
// The serial link between the mission data processor (MDP) and the digital
// processor (DP) carries 32-bit commands (DP to MDP) and 64-bit GSC events
// (MDP to DP) at 128 kbit/s. Board memory is organised in 32-bit words,
// 16 Mbyte in total (4M words). The GSC event field widths follow the
// published data format (2 x 14-bit pulse heights, 16-bit time, 8-bit hit
// pattern, 12-bit ID); the order of the fields inside the 64-bit word is this
// design's own choice and matters only to software and testbenches, since the
// hardware moves events as opaque 64-bit words.
package gse_pkg;

  localparam int unsigned CMD_BITS   = 32;          // command length, 4 byte
  localparam int unsigned EVT_BITS   = 64;          // event length, 8 byte
  localparam int unsigned WORD_BITS  = 32;          // memory word
  localparam int unsigned MEM_AW     = 22;          // 4M words = 16 Mbyte
  localparam int unsigned LINK_BAUD  = 128_000;     // serial bit rate
  localparam int unsigned MDP_CLK_HZ = 24_000_000;  // pseudo-MDP clock (timing counter)
  localparam int unsigned DP_CLK_HZ  = 25_000_000;  // pseudo-DP clock (40 ns register check)

  // Host-side register window: host word address bit HOST_AW-1 set selects
  // the register file, clear selects the board memory.
  localparam int unsigned HOST_AW    = MEM_AW + 1;

  // GSC observational event (64 bit).
  typedef struct packed {
    logic [11:0] id;        // data ID bits
    logic [7:0]  hit;       // hit pattern on the anode wires
    logic [15:0] time_tag;  // arrival time
    logic [13:0] ph_l;      // pulse height, left end of anode
    logic [13:0] ph_r;      // pulse height, right end of anode
  } gsc_event_t;

  // One memory request from a client of the arbiter.
  typedef struct packed {
    logic                 we;
    logic [MEM_AW-1:0]    addr;
    logic [WORD_BITS-1:0] wdata;
  } mem_req_t;

  // Pseudo-DP register map (host word offsets inside the register window).
  typedef enum logic [3:0] {
    DP_REG_CMD      = 4'd0,  // W: send command / R: last command written
    DP_REG_STATUS   = 4'd1,  // R: status bits
    DP_REG_BUFCHG   = 4'd2,  // W: change buffer / R: packets in last closed buffer
    DP_REG_EVCNT    = 4'd3,  // R: events received
    DP_REG_DROPCNT  = 4'd4,  // R: events dropped on overflow
    DP_REG_CURCNT   = 4'd5,  // R: packets in the buffer being written
    DP_REG_ERRCNT   = 4'd6   // R: malformed frames received
  } dp_reg_e;

  // Pseudo-MDP register map.
  typedef enum logic [3:0] {
    MDP_REG_CTRL     = 4'd0,  // W: bit0 start, bit1 stop / R: status
    MDP_REG_START    = 4'd1,  // R/W: start word address of the pattern
    MDP_REG_CMD      = 4'd2,  // R: last command received
    MDP_REG_ARRCLR   = 4'd3,  // W: clear arrival flag
    MDP_REG_GPSREQ   = 4'd4,  // R/W: code of the GPS request command
    MDP_REG_PWRON    = 4'd5,  // R/W: code of the GSC power-on command
    MDP_REG_PWROFF   = 4'd6,  // R/W: code of the GSC power-off command
    MDP_REG_GPSHDR   = 4'd7,  // R/W: upper word of the GPS reply
    MDP_REG_EVSENT   = 4'd8,  // R: events sent
    MDP_REG_CMDCNT   = 4'd9,  // R: commands received
    MDP_REG_GPSCNT   = 4'd10  // R: GPS replies sent
  } mdp_reg_e;

endpackage
