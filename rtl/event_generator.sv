// event_generator -- plays pseudo GSC events out of board memory at
// programmed times, for the pseudo-MDP configuration.
//
// The pattern in memory is a list of 3-word packets starting at start_addr:
//   word 0: bit 31 = flag, bits 30..0 = output timing T (clock cycles)
//   word 1: event bits 63..32
//   word 2: event bits 31..0
// A packet whose flag is 0 ends the list (the drawn end marker is an all-zero
// word). Each event is offered to the transmitter T clock cycles after the
// previous event was handed over (after start for the first one), i.e. after
// T/f seconds with f the clock frequency: at 24 MHz, T from 0 to 2^31-1 gives
// 0 ns to 89.5 s. If the transmitter is still busy the event waits, so the
// rate is capped by the link at 1969 events/s. The next packet is fetched
// while the timer runs; a packet takes 3 reads, so T below about 8 cycles
// is lengthened to the fetch time.
//
// start (one cycle) begins at start_addr; stop (one cycle) abandons the list
// at once. running is high from start until the end marker or stop; done
// pulses when the end marker is read. Addresses wrap at the end of memory.
//
// From the published description: the 3-word packet, the flag and 31-bit
// timing field, the end marker and the T/f delay. This design's own choices:
// measuring T between hand-overs, the meaning of flag=1 as "valid packet"
// and the start/stop controls. The generator only reads memory, so the
// write enable and write data of its request are always zero.
module event_generator
  import gse_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic [MEM_AW-1:0] start_addr,
  // arbiter client (reads only)
  output logic              c_req,
  output mem_req_t          c_cmd,
  input  logic              c_gnt,
  input  logic              c_rvalid,
  input  logic [31:0]       c_rdata,
  // event out
  output logic              ev_valid,
  input  logic              ev_ready,
  output logic [63:0]       ev_data,
  // status
  output logic              running,
  output logic              done,
  output logic [31:0]       ev_sent
);

  typedef enum logic [2:0] {G_IDLE, G_REQ, G_WAIT, G_HOLD} gstate_e;
  gstate_e st;

  logic [MEM_AW-1:0] addr;
  logic [1:0]        k;       // word of the packet being fetched
  logic [30:0]       timing;
  logic [31:0]       timer;   // cycles since the last hand-over

  assign running  = (st != G_IDLE);
  assign c_req    = (st == G_REQ);
  assign ev_valid = (st == G_HOLD) && ({1'b0, timing} <= timer);

  always_comb begin
    c_cmd       = '0;
    c_cmd.we    = 1'b0;
    c_cmd.addr  = addr + MEM_AW'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= G_IDLE;
      addr    <= '0;
      k       <= '0;
      timing  <= '0;
      timer   <= '0;
      ev_data <= '0;
      done    <= 1'b0;
      ev_sent <= '0;
    end else begin
      done <= 1'b0;
      if (timer != '1) timer <= timer + 1'b1;
      if (stop) begin
        st <= G_IDLE;
      end else begin
        unique case (st)
          G_IDLE: if (start) begin
            addr  <= start_addr;
            k     <= '0;
            timer <= 32'd1;
            st    <= G_REQ;
          end
          G_REQ:  if (c_gnt) st <= G_WAIT;
          G_WAIT: if (c_rvalid) begin
            unique case (k)
              2'd0: begin
                timing <= c_rdata[30:0];
                if (!c_rdata[31]) begin
                  st   <= G_IDLE;
                  done <= 1'b1;
                end else begin
                  k  <= 2'd1;
                  st <= G_REQ;
                end
              end
              2'd1: begin
                ev_data[63:32] <= c_rdata;
                k  <= 2'd2;
                st <= G_REQ;
              end
              default: begin
                ev_data[31:0] <= c_rdata;
                k  <= 2'd0;
                st <= G_HOLD;
              end
            endcase
          end
          G_HOLD: if (ev_valid && ev_ready) begin
            timer   <= 32'd1;
            ev_sent <= ev_sent + 1'b1;
            addr    <= addr + MEM_AW'(3);
            st      <= G_REQ;
          end
          default: st <= G_IDLE;
        endcase
      end
    end
  end

endmodule
