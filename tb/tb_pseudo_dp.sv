// tb_pseudo_dp -- self-checking test of the pseudo-DP board configuration at
// a reduced size (AW=8: 32 packets per buffer) and a fast link (10 clocks
// per bit).
//
// The test plays the host on the host bus and the MDP on the two serial
// links, with its own frame encoder and decoder. It checks that a command
// written to the command register starts on the link within a couple of
// clocks and arrives bit-exact, that a second command written while the
// first is on the line is refused (cmd_lost), that received events land in
// the double buffer with the size/pointer index, that a buffer change hands
// the filled buffer to the host, that an overflowing buffer stops and counts
// the dropped events, and that malformed frames are counted.
module tb_pseudo_dp;
  import gse_pkg::*;
  localparam int AW = 8, CAP = 2 ** (AW - 3), HALF = 5;
  localparam logic [HOST_AW-1:0] REG = HOST_AW'(1) << MEM_AW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               hb_start = 0, hb_we = 0, hb_ack;
  logic [HOST_AW-1:0] hb_addr = '0;
  logic [31:0]        hb_wdata = '0, hb_rdata;
  logic cmd_en_n, cmd_clk, cmd_data;
  logic dat_en_n = 1, dat_clk = 0, dat_data = 0;

  pseudo_dp #(.CLK_HZ(1000), .BAUD(100), .AW(AW)) dut (
    .clk, .rst_n, .hb_start, .hb_we, .hb_addr, .hb_wdata, .hb_ack, .hb_rdata,
    .cmd_en_n, .cmd_clk, .cmd_data, .dat_en_n, .dat_clk, .dat_data);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  function automatic logic [HOST_AW-1:0] r(input dp_reg_e e);
    return REG | HOST_AW'(e);
  endfunction

  // MDP side: send one frame of nbits
  task automatic send(input logic [63:0] w, input int nbits);
    @(negedge clk);
    dat_en_n = 0;
    repeat (HALF) @(negedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      dat_clk = 1; dat_data = w[i % 64];
      repeat (HALF) @(negedge clk);
      dat_clk = 0;
      repeat (HALF) @(negedge clk);
    end
    dat_en_n = 1;
    repeat (HALF) @(negedge clk);
  endtask

  // command link decoder
  logic [31:0] cmd_got[$];
  longint      cmd_fall[$];
  logic [31:0] csh; int cn; logic ck_d = 0, en_d = 1;
  always @(negedge clk) begin
    ck_d <= cmd_clk; en_d <= cmd_en_n;
    if (en_d && !cmd_en_n) begin cn = 0; cmd_fall.push_back(cyc); end
    if (!cmd_en_n && ck_d && !cmd_clk) begin csh = {csh[30:0], cmd_data}; cn++; end
    if (!en_d && cmd_en_n) begin
      checks++;
      if (cn != 32) begin failures++; $display("FAIL command bit count %0d", cn); end
      cmd_got.push_back(csh);
    end
  end

  initial begin
    logic [31:0] q;
    logic [63:0] evs[$];
    longint t_wr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    // ---- command path ----
    t_wr = cyc;
    host(1, r(DP_REG_CMD), 32'hC0FF_EE01, q);
    host(0, r(DP_REG_STATUS), 0, q);
    check("busy while sending", q[0], 1);
    host(1, r(DP_REG_CMD), 32'hBAD0_0002, q);   // refused
    host(0, r(DP_REG_STATUS), 0, q);
    check("cmd_lost", q[4], 1);
    wait (cmd_got.size() == 1);
    check("command 1", cmd_got[0], 32'hC0FF_EE01);
    check("enable within 2 clocks of the write", (cmd_fall[0] - t_wr) <= 3, 1);
    host(1, r(DP_REG_STATUS), 0, q);              // clear cmd_lost
    repeat (20) @(negedge clk);
    host(1, r(DP_REG_CMD), 32'h0000_0A5A, q);
    wait (cmd_got.size() == 2);
    check("command 2", cmd_got[1], 32'h0000_0A5A);
    host(0, r(DP_REG_STATUS), 0, q);
    check("cmd_lost cleared", q[4], 0);
    // ---- event path, buffer A ----
    for (int i = 0; i < 12; i++) begin
      logic [63:0] w; w = {$urandom, $urandom}; evs.push_back(w); send(w, 64);
    end
    repeat (10) @(negedge clk);
    host(0, r(DP_REG_EVCNT), 0, q);  check("event count", q, 12);
    host(0, r(DP_REG_CURCNT), 0, q); check("packets in A", q, 12);
    host(1, r(DP_REG_BUFCHG), 0, q);
    repeat (3) @(negedge clk);
    host(0, r(DP_REG_BUFCHG), 0, q); check("closed count", q, 12);
    host(0, r(DP_REG_STATUS), 0, q); check("now writing B", q[1], 1); check("closed flag", q[3], 1);
    for (int n = 0; n < 12; n++) begin
      logic [31:0] sz, ptr, up, lo;
      host(0, HOST_AW'(2 * n), 0, sz);
      host(0, HOST_AW'(2 * n + 1), 0, ptr);
      host(0, HOST_AW'(ptr), 0, up);
      host(0, HOST_AW'(ptr + 1), 0, lo);
      check($sformatf("size %0d", n), sz, 64);
      check($sformatf("ptr %0d", n), ptr, 2 ** (AW - 2) + 2 * n);
      check($sformatf("event %0d", n), {up, lo}, evs[n]);
    end
    // ---- overflow in B ----
    for (int i = 0; i < CAP + 3; i++) send({32'(i), 32'hB0B0_0000 + 32'(i)}, 64);
    repeat (10) @(negedge clk);
    host(0, r(DP_REG_CURCNT), 0, q);  check("B full", q, CAP);
    host(0, r(DP_REG_DROPCNT), 0, q); check("dropped", q, 3);
    host(0, r(DP_REG_STATUS), 0, q);  check("overflow flag", q[2], 1);
    host(0, HOST_AW'(2 ** (AW - 1) + 2 ** (AW - 2) + 2 * (CAP - 1) + 1), 0, q);
    check("last stored packet kept", q, 32'hB0B0_0000 + 32'(CAP - 1));
    // ---- malformed frames ----
    send(64'h1, 40);
    send(64'h1, 64);
    repeat (10) @(negedge clk);
    host(0, r(DP_REG_ERRCNT), 0, q); check("frame errors", q, 1);
    host(0, r(DP_REG_EVCNT), 0, q);  check("events total", q, 12 + CAP + 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
