// tb_pseudo_mdp -- self-checking test of the pseudo-MDP board configuration
// at a reduced size (AW=8) and a fast link (10 clocks per bit, so a 64-bit
// frame occupies 650 clocks).
//
// The test plays the host on the host bus and the DP on the serial links,
// with its own frame encoder and decoder. It loads the command codes and a
// pattern of pseudo events, then checks: the arrival flag and the latched
// command; the immediate GPS reply {header, clock count at the request};
// that GSC power-on plays the pattern with frame starts spaced by
// max(timing, 650) clocks and bit-exact data; that the end marker ends the
// run; and that power-off stops a run at once.
module tb_pseudo_mdp;
  import gse_pkg::*;
  localparam int AW = 8, HALF = 5, FRAME = 2 * HALF * 65;
  localparam logic [HOST_AW-1:0] REG = HOST_AW'(1) << MEM_AW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               hb_start = 0, hb_we = 0, hb_ack;
  logic [HOST_AW-1:0] hb_addr = '0;
  logic [31:0]        hb_wdata = '0, hb_rdata;
  logic cmd_en_n = 1, cmd_clk = 0, cmd_data = 0;
  logic dat_en_n, dat_clk, dat_data;

  pseudo_mdp #(.CLK_HZ(1000), .BAUD(100), .AW(AW)) dut (
    .clk, .rst_n, .hb_start, .hb_we, .hb_addr, .hb_wdata, .hb_ack, .hb_rdata,
    .cmd_en_n, .cmd_clk, .cmd_data, .dat_en_n, .dat_clk, .dat_data);

  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic host(input bit we, input logic [HOST_AW-1:0] a, input logic [31:0] d,
                      output logic [31:0] q);
    @(negedge clk);
    hb_start = 1; hb_we = we; hb_addr = a; hb_wdata = d;
    @(negedge clk);
    hb_start = 0;
    while (!hb_ack) @(negedge clk);
    q = hb_rdata;
  endtask

  function automatic logic [HOST_AW-1:0] r(input mdp_reg_e e);
    return REG | HOST_AW'(e);
  endfunction

  // DP side: send one 32-bit command; returns the cycle Enable rose
  task automatic send_cmd(input logic [31:0] w, output longint t_end);
    @(negedge clk);
    cmd_en_n = 0;
    repeat (HALF) @(negedge clk);
    for (int i = 31; i >= 0; i--) begin
      cmd_clk = 1; cmd_data = w[i];
      repeat (HALF) @(negedge clk);
      cmd_clk = 0;
      repeat (HALF) @(negedge clk);
    end
    cmd_en_n = 1;
    t_end = cyc;
    repeat (HALF) @(negedge clk);
  endtask

  // data link decoder
  logic [63:0] got[$];
  longint      fall[$];
  logic [63:0] sh; int n; logic ck_d = 0, en_d = 1;
  always @(negedge clk) begin
    ck_d <= dat_clk; en_d <= dat_en_n;
    if (en_d && !dat_en_n) begin n = 0; fall.push_back(cyc); end
    if (!dat_en_n && ck_d && !dat_clk) begin sh = {sh[62:0], dat_data}; n++; end
    if (!en_d && dat_en_n) begin
      checks++;
      if (n != 64) begin failures++; $display("FAIL data bit count %0d", n); end
      got.push_back(sh);
    end
  end

  localparam logic [31:0] C_GPS = 32'h6750_0001, C_ON = 32'h6750_00A1, C_OFF = 32'h6750_00A0,
                          HDR = 32'h5A00_0123;
  int          timing[4] = '{1000, 2000, 0, 700};
  logic [63:0] evs[4];

  initial begin
    logic [31:0] q;
    longint te;
    int base;
    repeat (2) @(negedge clk);
    rst_n = 1;
    host(1, r(MDP_REG_GPSREQ), C_GPS, q);
    host(1, r(MDP_REG_PWRON), C_ON, q);
    host(1, r(MDP_REG_PWROFF), C_OFF, q);
    host(1, r(MDP_REG_GPSHDR), HDR, q);
    host(0, r(MDP_REG_PWRON), 0, q); check("code readback", q, C_ON);
    // pattern at word 40: 4 events then end marker
    base = 40;
    for (int i = 0; i < 4; i++) begin
      evs[i] = {$urandom, $urandom};
      host(1, HOST_AW'(base + 3 * i), {1'b1, 31'(timing[i])}, q);
      host(1, HOST_AW'(base + 3 * i + 1), evs[i][63:32], q);
      host(1, HOST_AW'(base + 3 * i + 2), evs[i][31:0], q);
    end
    host(1, HOST_AW'(base + 12), 0, q);
    host(1, r(MDP_REG_START), base, q);
    // ---- unknown command: flag only ----
    send_cmd(32'h1234_5678, te);
    repeat (10) @(negedge clk);
    host(0, r(MDP_REG_CTRL), 0, q); check("arrival flag", q[2], 1); check("not running", q[0], 0);
    host(0, r(MDP_REG_CMD), 0, q);  check("command latched", q, 32'h1234_5678);
    host(1, r(MDP_REG_ARRCLR), 0, q);
    host(0, r(MDP_REG_CTRL), 0, q); check("arrival cleared", q[2], 0);
    repeat (2 * FRAME) @(negedge clk);
    check("no reply to unknown command", got.size(), 0);
    // ---- GPS request ----
    send_cmd(C_GPS, te);
    wait (got.size() == 1);
    check("gps header", got[0][63:32], HDR);
    check("gps time near request", (got[0][31:0] >= te + 1) && (got[0][31:0] <= te + 5), 1);
    check("gps reply starts at once", (fall[0] - te) <= 8, 1);
    // ---- power on: play the pattern ----
    send_cmd(C_ON, te);
    wait (got.size() == 5);
    repeat (FRAME + 10) @(negedge clk);
    for (int i = 0; i < 4; i++) check($sformatf("event %0d", i), got[1 + i], evs[i]);
    for (int i = 1; i < 4; i++) begin
      int e;
      e = (timing[i] > FRAME) ? timing[i] : FRAME;
      check($sformatf("gap before event %0d", i), fall[1 + i] - fall[i], e);
    end
    host(0, r(MDP_REG_CTRL), 0, q); check("ended", q[1:0], 2'b10);
    host(0, r(MDP_REG_EVSENT), 0, q); check("events sent", q, 4);
    // ---- power off mid-run: slow pattern ----
    host(1, HOST_AW'(base), {1'b1, 31'd3000}, q);
    host(1, HOST_AW'(base + 3), {1'b1, 31'd3000}, q);
    send_cmd(C_ON, te);
    wait (got.size() == 6);
    send_cmd(C_OFF, te);
    repeat (5000) @(negedge clk);
    check("stopped after power off", got.size(), 6);
    host(0, r(MDP_REG_CTRL), 0, q); check("not running", q[0], 0);
    host(0, r(MDP_REG_CMDCNT), 0, q); check("commands", q, 5);
    host(0, r(MDP_REG_GPSCNT), 0, q); check("gps replies", q, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
