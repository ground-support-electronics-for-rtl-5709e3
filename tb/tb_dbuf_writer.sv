// tb_dbuf_writer -- self-checking test of dbuf_writer with a reduced memory
// (AW=8: two buffers of 128 words, 32 packets each).
//
// A test-bench "host" shares the memory through mem_arbiter. The test fills
// buffer A with 10 events, swaps, reads A back and checks every index entry
// (size 64 at word 2n, pointer at word 2n+1) and every data pair against its
// own model of the layout. It then sends 40 events into B: 32 must be stored,
// 8 dropped with overflow set and nothing overwritten. A swap requested
// while an event is being written must take effect after it. While events
// are written the host keeps reading memory, so the writer sees contention.
module tb_dbuf_writer;
  import gse_pkg::*;
  localparam int AW  = 8;
  localparam int CAP = 2 ** (AW - 3);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ev_valid = 0, ev_ready, swap = 0;
  logic [63:0] ev_data = '0;
  logic        wsel, closed_valid, overflow;
  logic [31:0] cur_count, closed_count, ev_count, drop_count;

  logic     [1:0] c_req, c_gnt, c_rvalid;
  mem_req_t [1:0] c_cmd;
  logic [31:0]    c_rdata;
  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;

  dbuf_writer #(.AW(AW)) dut (
    .clk, .rst_n, .ev_valid, .ev_ready, .ev_data, .swap,
    .c_req(c_req[1]), .c_cmd(c_cmd[1]), .c_gnt(c_gnt[1]),
    .wsel, .cur_count, .closed_count, .closed_valid, .overflow, .ev_count, .drop_count);
  mem_arbiter #(.N(2)) u_arb (.clk, .rst_n, .c_req, .c_cmd, .c_gnt, .c_rvalid, .c_rdata,
                              .m_req, .m_we, .m_addr, .m_wdata, .m_rdata);
  gse_memory #(.AW(AW)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr[AW-1:0]),
                               .wdata(m_wdata), .rdata(m_rdata));

  // host port (client 0)
  task automatic host_read(input int a, output logic [31:0] d);
    @(negedge clk);
    c_req[0] = 1; c_cmd[0] = '{we: 1'b0, addr: MEM_AW'(a), wdata: '0};
    #1;
    while (!c_gnt[0]) begin @(negedge clk); #1; end
    @(negedge clk);
    c_req[0] = 0;
    d = c_rdata;
  endtask

  task automatic send(input logic [63:0] w);
    @(negedge clk);
    ev_valid = 1; ev_data = w;
    #1;
    while (!ev_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    ev_valid = 0;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  logic [63:0] sent_a[$], sent_b[$];
  bit noise = 0;

  // background host reads to create contention
  initial begin
    c_req[0] = 0; c_cmd[0] = '0;
    forever begin
      logic [31:0] d;
      @(negedge clk);
      if (noise) host_read($urandom_range(0, 2**AW - 1), d);
    end
  end

  task automatic check_buffer(input int b, input logic [63:0] q[$]);
    int base;
    base = b * 2 ** (AW - 1);
    for (int n = 0; n < q.size(); n++) begin
      logic [31:0] sz, ptr, up, lo;
      host_read(base + 2 * n, sz);
      host_read(base + 2 * n + 1, ptr);
      check($sformatf("buf %0d size %0d", b, n), sz, 64);
      check($sformatf("buf %0d ptr %0d", b, n), ptr, base + 2 ** (AW - 2) + 2 * n);
      host_read(int'(ptr), up);
      host_read(int'(ptr) + 1, lo);
      check($sformatf("buf %0d data %0d", b, n), {up, lo}, q[n]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    noise = 1;
    for (int i = 0; i < 10; i++) begin
      logic [63:0] w; w = {$urandom, $urandom}; sent_a.push_back(w); send(w);
    end
    repeat (8) @(negedge clk);
    check("count A", cur_count, 10);
    check("wsel A", wsel, 0);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    repeat (3) @(negedge clk);
    check("closed A", closed_count, 10);
    check("closed_valid", closed_valid, 1);
    check("wsel B", wsel, 1);
    check("count B", cur_count, 0);
    noise = 0;
    repeat (4) @(negedge clk);
    // B: overflow after CAP packets
    for (int i = 0; i < CAP + 8; i++) begin
      logic [63:0] w; w = {$urandom, $urandom};
      if (i < CAP) sent_b.push_back(w);
      send(w);
    end
    repeat (8) @(negedge clk);
    check("count B full", cur_count, CAP);
    check("overflow", overflow, 1);
    check("dropped", drop_count, 8);
    check("ev_count", ev_count, 10 + CAP + 8);
    // A was not touched by the B writes
    check_buffer(0, sent_a);
    check_buffer(1, sent_b);
    // swap issued in the same cycle as an event: the event goes to B (full,
    // dropped) or is held; then swap clears overflow and goes to A
    fork
      send(64'h0123_4567_89AB_CDEF);
      begin @(negedge clk); swap = 1; @(negedge clk); swap = 0; end
    join
    repeat (8) @(negedge clk);
    check("wsel back to A", wsel, 0);
    check("overflow cleared", overflow, 0);
    check("closed B", closed_count, CAP);
    // the event accepted after the swap is packet 0 of A
    begin
      logic [31:0] up, lo;
      check("count A after swap", cur_count, 1);
      host_read(2 ** (AW - 2), up);
      host_read(2 ** (AW - 2) + 1, lo);
      check("A packet 0 rewritten", {up, lo}, 64'h0123_4567_89AB_CDEF);
    end
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
