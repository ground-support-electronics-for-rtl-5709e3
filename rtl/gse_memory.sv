// gse_memory -- the 16 Mbyte board memory, seen as 2^AW words of 32 bits.
//
// On the board this is an SDRAM device next to the FPGA. Here it is a plain
// single-port synchronous array: a request (req with we, addr, wdata) is
// taken every cycle; a write updates the word at the clock edge, a read
// returns the word on rdata in the following cycle. Row activation, refresh
// and burst handling of a real SDRAM controller are not modelled; the
// 32-bit word width follows the 32-bit words of the pseudo-event memory
// layout. Default AW=22 gives 4M words = 16 Mbyte, the board's capacity.
module gse_memory #(
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
