// dbuf_writer -- stores received GSC events in a double buffer in board
// memory, with a packet index, for the pseudo-DP configuration.
//
// The memory of 2^AW words is split into two equal buffers, A (lower half)
// and B (upper half). Each buffer is split again into an index region (first
// quarter of memory for A) and a data region (second quarter for A). For the
// n-th event stored in a buffer, counting from 0:
//   index word 2n     = size of the packet in bits (64 for a GSC event)
//   index word 2n+1   = word address of the packet in the data region
//   data  words 2n, 2n+1 = event bits 63..32, then 31..0
// The two data words are written first and the pointer last, so a reader
// that finds a pointer also finds its data. Each event takes four memory
// writes through the arbiter.
//
// The host reads one buffer while events go into the other. A one-cycle
// swap request closes the buffer being written (its packet count is kept in
// closed_count) and restarts at packet 0 of the other buffer; a swap that
// arrives during an event's writes is carried out right after them. When a
// buffer already holds its capacity of 2^(AW-3) packets the packet number is
// no longer incremented: further events are counted in drop_count and
// discarded, so stored data are never overwritten, and overflow stays set
// until the next swap.
//
// Interface: ev_valid/ev_ready handshake on the 64-bit event; memory client
// port of mem_arbiter. From the published description: the A/B split, the
// size/pointer layout, 8 bytes per event, the halt on overflow. This design's
// own choices: the bit-count size unit, absolute pointers, the write order
// and the swap handshake. The writer never reads, so the write enable of
// its memory request is always one.
module dbuf_writer
  import gse_pkg::*;
#(
  parameter int unsigned AW = MEM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ev_valid,
  output logic              ev_ready,
  input  logic [63:0]       ev_data,
  input  logic              swap,
  // arbiter client
  output logic              c_req,
  output mem_req_t          c_cmd,
  input  logic              c_gnt,
  // status
  output logic              wsel,          // buffer being written: 0 = A, 1 = B
  output logic [31:0]       cur_count,     // packets in the buffer being written
  output logic [31:0]       closed_count,  // packets in the buffer last closed
  output logic              closed_valid,  // a buffer has been closed since reset
  output logic              overflow,
  output logic [31:0]       ev_count,      // events accepted since reset
  output logic [31:0]       drop_count     // events discarded on overflow
);

  localparam int unsigned CAP = 2 ** (AW - 3);  // packets per buffer

  typedef enum logic [2:0] {W_IDLE, W_UP, W_LO, W_SIZE, W_PTR} wstate_e;
  wstate_e st;

  logic [63:0]    ev;
  logic           swap_pend;
  logic [AW-1:0]  buf_base, idx_addr, dat_addr;

  always_comb begin
    buf_base = {wsel, {(AW-1){1'b0}}};
    idx_addr = buf_base + AW'({cur_count[AW-3:0], 1'b0});
    dat_addr = buf_base + AW'(2 ** (AW - 2)) + AW'({cur_count[AW-3:0], 1'b0});
  end

  assign ev_ready = (st == W_IDLE) && !swap_pend && !swap;
  assign c_req    = (st != W_IDLE);

  always_comb begin
    c_cmd = '0;
    c_cmd.we = 1'b1;
    unique case (st)
      W_UP:    begin c_cmd.addr = MEM_AW'(dat_addr);       c_cmd.wdata = ev[63:32]; end
      W_LO:    begin c_cmd.addr = MEM_AW'(dat_addr + 1'b1); c_cmd.wdata = ev[31:0];  end
      W_SIZE:  begin c_cmd.addr = MEM_AW'(idx_addr);       c_cmd.wdata = 32'd64;    end
      W_PTR:   begin c_cmd.addr = MEM_AW'(idx_addr + 1'b1); c_cmd.wdata = 32'(dat_addr); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= W_IDLE;
      ev           <= '0;
      swap_pend    <= 1'b0;
      wsel         <= 1'b0;
      cur_count    <= '0;
      closed_count <= '0;
      closed_valid <= 1'b0;
      overflow     <= 1'b0;
      ev_count     <= '0;
      drop_count   <= '0;
    end else begin
      if (swap) swap_pend <= 1'b1;
      unique case (st)
        W_IDLE: begin
          if (swap_pend) begin
            swap_pend    <= 1'b0;
            closed_count <= cur_count;
            closed_valid <= 1'b1;
            wsel         <= !wsel;
            cur_count    <= '0;
            overflow     <= 1'b0;
          end else if (ev_valid && ev_ready) begin
            ev_count <= ev_count + 1'b1;
            if (cur_count == 32'(CAP)) begin
              overflow   <= 1'b1;
              drop_count <= drop_count + 1'b1;
            end else begin
              ev <= ev_data;
              st <= W_UP;
            end
          end
        end
        W_UP:   if (c_gnt) st <= W_LO;
        W_LO:   if (c_gnt) st <= W_SIZE;
        W_SIZE: if (c_gnt) st <= W_PTR;
        W_PTR:  if (c_gnt) begin
          st        <= W_IDLE;
          cur_count <= cur_count + 1'b1;
        end
        default: st <= W_IDLE;
      endcase
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) cur_count <= 32'(CAP));

endmodule
