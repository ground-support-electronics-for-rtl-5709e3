// host_mem_bridge -- turns one host-bus memory access into an arbiter request.
//
// The host bus is strobe based: a one-cycle start with we, word address and
// write data begins an access, and the bridge answers with a one-cycle ack
// (with rdata for a read) when it is done. A write is acknowledged in the
// cycle after the arbiter grants it, a read in the cycle after its data
// returns. A start while an access is outstanding is ignored. This protocol
// is this design's own: it stands for the local side of the VME interface.
module host_mem_bridge
  import gse_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              we,
  input  logic [MEM_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic              ack,
  output logic [31:0]       rdata,
  // arbiter client side
  output logic              c_req,
  output mem_req_t          c_cmd,
  input  logic              c_gnt,
  input  logic              c_rvalid,
  input  logic [31:0]       c_rdata
);

  typedef enum logic [1:0] {B_IDLE, B_REQ, B_WAIT} bstate_e;
  bstate_e st;

  assign c_req = (st == B_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= B_IDLE;
      c_cmd <= '0;
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack <= 1'b0;
      unique case (st)
        B_IDLE: if (start) begin
          c_cmd <= '{we: we, addr: addr, wdata: wdata};
          st    <= B_REQ;
        end
        B_REQ: if (c_gnt) begin
          if (c_cmd.we) begin
            ack <= 1'b1;
            st  <= B_IDLE;
          end else begin
            st  <= B_WAIT;
          end
        end
        B_WAIT: if (c_rvalid) begin
          ack   <= 1'b1;
          rdata <= c_rdata;
          st    <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end

endmodule
