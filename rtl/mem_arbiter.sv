// mem_arbiter -- shares the single board-memory port between N clients
// (the host behind the VME interface and the FPGA's own data path).
//
// Each client holds c_req with its request (mem_req_t: we, addr, wdata) until
// it sees c_gnt. One client is granted per cycle, in round-robin order
// starting after the last one served, so the host can read or rewrite memory
// at any time without stopping the data path for more than one cycle at a
// time. The granted request goes straight to the memory; read data arrives
// on the shared rdata one cycle later, flagged by c_rvalid for the client
// that asked (c_rdata is the memory's m_rdata passed through). Sharing the memory between host and FPGA follows the
// published description; the round-robin policy is this design's choice.
module mem_arbiter
  import gse_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [N-1:0]     c_req,
  input  mem_req_t [N-1:0]     c_cmd,
  output logic     [N-1:0]     c_gnt,
  output logic     [N-1:0]     c_rvalid,
  output logic     [31:0]      c_rdata,
  // memory side
  output logic                 m_req,
  output logic                 m_we,
  output logic [MEM_AW-1:0]    m_addr,
  output logic [31:0]          m_wdata,
  input  logic [31:0]          m_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    // search from last+1 around to last
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (32'(last) + k) % N;
      if (!any && c_req[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
    c_gnt = '0;
    if (any) c_gnt[sel] = 1'b1;
    m_req   = any;
    m_we    = c_cmd[sel].we;
    m_addr  = c_cmd[sel].addr;
    m_wdata = c_cmd[sel].wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= IW'(N - 1);
      c_rvalid <= '0;
    end else begin
      c_rvalid <= '0;
      if (any) begin
        last <= sel;
        if (!c_cmd[sel].we) c_rvalid[sel] <= 1'b1;
      end
    end
  end

  assign c_rdata = m_rdata;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_gnt));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (c_gnt & ~c_req) == '0);

endmodule
