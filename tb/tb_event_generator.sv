// tb_event_generator -- self-checking test of event_generator with a small
// memory (AW=8) shared through mem_arbiter with a test-bench host.
//
// The host writes a pattern of 3-word packets (flag|timing, upper, lower)
// ending in an all-zero word. A consumer standing in for the serial
// transmitter accepts an event and then stays busy for BUSY cycles. Each
// event must come out unchanged and in order, and the gap between hand-overs
// must be exactly max(timing, BUSY) clock cycles (the first one counted from
// start). At the end marker, done must pulse and running fall. A second run
// is stopped half way and must stop at once.
module tb_event_generator;
  import gse_pkg::*;
  localparam int AW   = 8;
  localparam int BUSY = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              start = 0, stop = 0;
  logic [MEM_AW-1:0] start_addr = '0;
  logic              ev_valid, ev_ready, running, done;
  logic [63:0]       ev_data;
  logic [31:0]       ev_sent;

  logic     [1:0] c_req, c_gnt, c_rvalid;
  mem_req_t [1:0] c_cmd;
  logic [31:0]    c_rdata;
  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;

  event_generator dut (
    .clk, .rst_n, .start, .stop, .start_addr,
    .c_req(c_req[1]), .c_cmd(c_cmd[1]), .c_gnt(c_gnt[1]), .c_rvalid(c_rvalid[1]), .c_rdata,
    .ev_valid, .ev_ready, .ev_data, .running, .done, .ev_sent);
  mem_arbiter #(.N(2)) u_arb (.clk, .rst_n, .c_req, .c_cmd, .c_gnt, .c_rvalid, .c_rdata,
                              .m_req, .m_we, .m_addr, .m_wdata, .m_rdata);
  gse_memory #(.AW(AW)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr[AW-1:0]),
                               .wdata(m_wdata), .rdata(m_rdata));

  task automatic host_write(input int a, input logic [31:0] d);
    @(negedge clk);
    c_req[0] = 1; c_cmd[0] = '{we: 1'b1, addr: MEM_AW'(a), wdata: d};
    #1;
    while (!c_gnt[0]) begin @(negedge clk); #1; end
    @(negedge clk);
    c_req[0] = 0;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d (%0h) exp %0d (%0h)", what, got, got, exp, exp); end
  endtask

  // consumer model
  int since = 1000;
  assign ev_ready = (since >= BUSY);
  longint cyc = 0, last_evt;
  logic [63:0] got_q[$];
  longint      gap_q[$];
  int ndone = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    since <= since + 1;
    if (start) last_evt <= cyc;
    if (rst_n && ev_valid && ev_ready) begin
      since <= 1;
      got_q.push_back(ev_data);
      gap_q.push_back(cyc - last_evt);
      last_evt <= cyc;
    end
    if (rst_n && done) ndone++;
  end

  int          timing[6] = '{100, 0, 50, 300, 20, 75};
  logic [63:0] evs[6];

  initial begin
    c_req[0] = 0; c_cmd[0] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      evs[i] = {$urandom, $urandom};
      host_write(5 + 3 * i, {1'b1, 31'(timing[i])});
      host_write(6 + 3 * i, evs[i][63:32]);
      host_write(7 + 3 * i, evs[i][31:0]);
    end
    host_write(5 + 18, 32'h0);
    start_addr = MEM_AW'(5);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (!running);
    repeat (5) @(negedge clk);
    check("events out", got_q.size(), 6);
    check("ev_sent", ev_sent, 6);
    check("done pulses", ndone, 1);
    for (int i = 0; i < 6 && i < got_q.size(); i++) begin
      int e;
      e = (i == 0) ? timing[0] : ((timing[i] > BUSY) ? timing[i] : BUSY);
      check($sformatf("event %0d data", i), got_q[i], evs[i]);
      check($sformatf("event %0d gap", i), gap_q[i], e);
    end
    // second run, stopped after the second event
    got_q.delete(); gap_q.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (got_q.size() == 2);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    check("stopped", running, 0);
    repeat (600) @(negedge clk);
    check("no events after stop", got_q.size(), 2);
    check("ev_sent total", ev_sent, 8);
    check("no done on stop", ndone, 1);
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
