// tb_vme_slave -- self-checking test of vme_slave.
//
// A VME master model runs A32 D32 cycles with its own timing (not tied to
// the board clock); behind the slave a small register-file model answers the
// host bus after a random delay. The test checks that writes arrive with the
// right word address and data, that reads return the model's data with
// DTACK*, that DTACK* stays low until the data strobes are released, and
// that cycles outside the board window, with another address modifier or
// not 32 bits wide get no answer and reach nothing.
module tb_vme_slave;
  import gse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #6 clk = ~clk;
  int checks = 0, failures = 0;

  logic        as_n = 1, write_n = 1, lword_n = 1;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = '0;
  logic [31:1] addr = '0;
  logic [31:0] d_in = '0, d_out;
  logic        d_oe, dtack_n;
  logic               hb_start, hb_we, hb_ack = 0;
  logic [HOST_AW-1:0] hb_addr;
  logic [31:0]        hb_wdata, hb_rdata = '0;

  vme_slave dut (.clk, .rst_n, .base_addr(7'h15), .as_n, .ds_n, .write_n, .lword_n, .am,
                 .addr, .d_in, .d_out, .d_oe, .dtack_n, .hb_start, .hb_we, .hb_addr,
                 .hb_wdata, .hb_ack, .hb_rdata);

  // host-bus model: sparse register file, answers 1..6 clocks after start
  logic [31:0] regs[logic [HOST_AW-1:0]];
  int nstart = 0;
  always @(posedge clk) begin
    if (rst_n && hb_start) begin
      nstart++;
      fork
        begin
          automatic logic we = hb_we;
          automatic logic [HOST_AW-1:0] a = hb_addr;
          automatic logic [31:0] wd = hb_wdata;
          repeat ($urandom_range(1, 6)) @(posedge clk);
          if (we) regs[a] = wd;
          hb_rdata <= regs.exists(a) ? regs[a] : 32'hFFFF_0000 ^ 32'(a);
          hb_ack <= 1;
          @(posedge clk);
          hb_ack <= 0;
        end
      join_none
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // returns 1 if the cycle was acknowledged
  task automatic vme(input bit we, input logic [31:0] ba, input logic [31:0] d,
                     input logic [5:0] m, input bit lw, output logic [31:0] q, output bit ok);
    int t;
    addr = ba[31:1]; am = m; write_n = !we; lword_n = !lw; d_in = d;
    #15 as_n = 0;
    #10 ds_n = 2'b00;
    t = 0;
    while (dtack_n && t < 100) begin #5; t++; end
    ok = !dtack_n;
    q = d_oe ? d_out : 32'h0;
    if (ok) begin
      // DTACK* must be held while DS* is low
      #40;
      check("dtack held", dtack_n, 0);
    end
    ds_n = 2'b11; as_n = 1;
    t = 0;
    while (!dtack_n && t < 100) begin #5; t++; end
    check("dtack released", dtack_n, 1);
    #20;
  endtask

  initial begin
    logic [31:0] q, exp_q[int];
    bit ok;
    int n0;
    #30 rst_n = 1;
    #30;
    for (int i = 0; i < 30; i++) begin
      logic [22:0] w; logic [31:0] d;
      w = {$urandom_range(0, 1) == 1, 22'($urandom_range(0, 255))};
      d = $urandom;
      vme(1, {7'h15, w, 2'b00}, d, 6'h09, 1, q, ok);
      check("write acknowledged", ok, 1);
      check("write reached the addressed word", regs.exists(w) ? regs[w] : 32'hDEAD_BEEF ^ d, d);
      exp_q[int'(w)] = d;
    end
    foreach (exp_q[w]) begin
      vme(0, {7'h15, 23'(w), 2'b00}, 0, 6'h0D, 1, q, ok);
      check("read acknowledged", ok, 1);
      check($sformatf("read word %0h", w), q, exp_q[w]);
    end
    n0 = nstart;
    vme(1, {7'h14, 23'd5, 2'b00}, 32'h1, 6'h09, 1, q, ok);
    check("other board ignored", ok, 0);
    vme(1, {7'h15, 23'd5, 2'b00}, 32'h1, 6'h39, 1, q, ok);
    check("A24 modifier ignored", ok, 0);
    vme(0, {7'h15, 23'd5, 2'b00}, 32'h1, 6'h09, 0, q, ok);
    check("16-bit cycle ignored", ok, 0);
    check("no host access for ignored cycles", nstart, n0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
