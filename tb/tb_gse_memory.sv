// tb_gse_memory -- self-checking test of gse_memory at a reduced size
// (AW=10). Writes a pattern computed from the address to every word, then
// reads back in a scrambled order and checks each word one cycle after its
// request; also checks that a read does not disturb the stored word and
// that a write leaves rdata unchanged.
module tb_gse_memory;
  localparam int AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [31:0]   wdata = '0, rdata;

  gse_memory #(.AW(AW)) dut (.clk, .req, .we, .addr, .wdata, .rdata);

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      req = 1; we = 1; addr = AW'(a); wdata = pat(a);
      @(negedge clk);
    end
    for (int i = 0; i < 2**AW; i++) begin
      int a;
      a = (i * 389 + 17) % (2**AW);
      req = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a)) begin failures++; $display("FAIL addr %0d got %h", a, rdata); end
    end
    // a write does not change rdata
    begin
      logic [31:0] hold;
      hold = rdata;
      req = 1; we = 1; addr = 5; wdata = 32'h1111_2222;
      @(negedge clk);
      checks++;
      if (rdata !== hold) begin failures++; $display("FAIL rdata changed on write"); end
      req = 1; we = 0; addr = 5;
      @(negedge clk);
      checks++;
      if (rdata !== 32'h1111_2222) begin failures++; $display("FAIL rewrite"); end
      req = 0; addr = 6;
      @(negedge clk);
      checks++;
      if (rdata !== 32'h1111_2222) begin failures++; $display("FAIL rdata moved without req"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
