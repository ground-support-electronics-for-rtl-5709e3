// tb_gse_top -- end-to-end test of gse_top: each pseudo-DP board is wired to
// a pseudo-MDP board (command link DP->MDP, event link MDP->DP), giving a
// complete DP-MDP loop per board pair, and both pairs run the same scenario
// at once. Sizes are reduced (AW=8: 32 packets per buffer) and the link is
// fast (100 ns per bit), with the two configurations on clocks of different
// periods (8 ns and 10 ns), as on separate boxes.
//
// Scenario per pair, driven only through the shared VME bus:
//   1. program the pseudo-MDP codes and load a pattern of pseudo events;
//   2. the pseudo-DP sends a GPS request; the reply lands in buffer A;
//   3. a second command written while the first is on the line is refused;
//   4. GSC power-on: the pattern plays (back-to-back events at the link
//      limit, and one programmed delay); a GPS request sent during the run
//      is answered between two events; the last event's data are rewritten
//      in the pseudo-MDP memory while the run is going on;
//   5. buffer change; every packet of buffer A is read and compared;
//   6. a long pattern overflows buffer B: the excess is dropped;
//   7. a slow pattern is started and stopped by GSC power-off.
// Each mechanism is counted and must occur at least once per pair.
module tb_gse_top;
  import gse_pkg::*;
  localparam int NB = 2, AW = 8, CAP = 2 ** (AW - 3);
  localparam logic [HOST_AW-1:0] REG = HOST_AW'(1) << MEM_AW;
  localparam logic [31:0] C_GPS = 32'h4750_5300, C_ON = 32'h5057_0001, C_OFF = 32'h5057_0000,
                          HDR = 32'h6B50_0000;
  localparam int MDP_HALF = 5;               // mdp clocks per half bit slot
  localparam int FRAME = 2 * MDP_HALF * 65;  // mdp clocks per event frame

  logic dp_clk = 0, mdp_clk = 0, dp_rst_n = 0, mdp_rst_n = 0;
  always #4 dp_clk = ~dp_clk;
  always #5 mdp_clk = ~mdp_clk;
  int checks = 0, failures = 0;

  logic        vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = '0;
  logic [31:1] vme_addr = '0;
  logic [31:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [NB-1:0] c_en, c_ck, c_dt, d_en, d_ck, d_dt;

  gse_top #(.NB(NB), .DP_CLK(1250), .MDP_CLK(1000), .BAUD(100), .AW(AW)) dut (
    .dp_clk, .dp_rst_n, .mdp_clk, .mdp_rst_n,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr, .vme_d_in,
    .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .dp_cmd_en_n(c_en), .dp_cmd_clk(c_ck), .dp_cmd_data(c_dt),
    .dp_dat_en_n(d_en), .dp_dat_clk(d_ck), .dp_dat_data(d_dt),
    .mdp_cmd_en_n(c_en), .mdp_cmd_clk(c_ck), .mdp_cmd_data(c_dt),
    .mdp_dat_en_n(d_en), .mdp_dat_clk(d_ck), .mdp_dat_data(d_dt));

  typedef enum int {M_CMD, M_REFUSED, M_GPS, M_PLAY, M_BACK2BACK, M_DELAY, M_GPS_IN_RUN,
                    M_REWRITE, M_BUFCHG, M_OVERFLOW, M_END, M_PWROFF, M_NUM} mech_e;
  int mech[NB][M_NUM];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // VME master model: one A32 D32 cycle; concurrent callers take turns
  bit vme_busy = 0;
  task automatic vme(input bit we, input logic [31:0] ba, input logic [31:0] d,
                     output logic [31:0] q);
    int t;
    while (vme_busy) #7;
    vme_busy = 1;
    vme_addr = ba[31:1]; vme_am = 6'h09; vme_write_n = !we; vme_lword_n = 0; vme_d_in = d;
    #15 vme_as_n = 0;
    #10 vme_ds_n = 2'b00;
    t = 0;
    while (vme_dtack_n && t < 1000) begin #5; t++; end
    if (vme_dtack_n) begin failures++; $display("FAIL VME cycle to %h not acknowledged", ba); end
    q = vme_d_oe ? vme_d_out : 32'h0;
    #5 vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n) #5;
    #10 vme_busy = 0;
  endtask

  localparam logic [6:0] VBASE = 7'h10;   // gse_top default VME_BASE

  task automatic dph(input int b, input bit we, input logic [HOST_AW-1:0] a,
                     input logic [31:0] d, output logic [31:0] q);
    vme(we, {VBASE + 7'(b), a, 2'b00}, d, q);
  endtask

  task automatic mdh(input int b, input bit we, input logic [HOST_AW-1:0] a,
                     input logic [31:0] d, output logic [31:0] q);
    vme(we, {VBASE + 7'(NB + b), a, 2'b00}, d, q);
  endtask

  // send a command from the pseudo-DP host; wait until it is on the line
  task automatic dp_cmd(input int b, input logic [31:0] c);
    logic [31:0] q;
    dph(b, 1, REG | HOST_AW'(DP_REG_CMD), c, q);
    mech[b][M_CMD]++;
    do dph(b, 0, REG | HOST_AW'(DP_REG_STATUS), 0, q); while (q[0]);
  endtask

  task automatic dp_wait_events(input int b, input int n);
    logic [31:0] q;
    do begin
      repeat (50) @(negedge dp_clk);
      dph(b, 0, REG | HOST_AW'(DP_REG_EVCNT), 0, q);
    end while (q < 32'(n));
  endtask

  // event-link frame starts, seen on the MDP clock
  longint mcyc = 0;
  always @(posedge mdp_clk) mcyc <= mcyc + 1;
  longint fall_t[NB][$];
  logic [NB-1:0] d_en_d = '1;
  always @(negedge mdp_clk) begin
    d_en_d <= d_en;
    for (int b = 0; b < NB; b++) if (d_en_d[b] && !d_en[b]) fall_t[b].push_back(mcyc);
  end

  task automatic load_pattern(input int b, input int base, input int n, input int tim[],
                              input logic [63:0] ev[]);
    logic [31:0] q;
    for (int i = 0; i < n; i++) begin
      mdh(b, 1, HOST_AW'(base + 3 * i), {1'b1, 31'(tim[i])}, q);
      mdh(b, 1, HOST_AW'(base + 3 * i + 1), ev[i][63:32], q);
      mdh(b, 1, HOST_AW'(base + 3 * i + 2), ev[i][31:0], q);
    end
    mdh(b, 1, HOST_AW'(base + 3 * n), 0, q);
    mdh(b, 1, REG | HOST_AW'(MDP_REG_START), base, q);
  endtask

  task automatic scenario(input int b);
    logic [31:0] q;
    logic [63:0] ev[];
    int          tim[];
    logic [63:0] stored[$];
    logic [63:0] rewritten;
    int nf0, gps_pos;
    // 1. program the pseudo-MDP
    mdh(b, 1, REG | HOST_AW'(MDP_REG_GPSREQ), C_GPS, q);
    mdh(b, 1, REG | HOST_AW'(MDP_REG_PWRON), C_ON, q);
    mdh(b, 1, REG | HOST_AW'(MDP_REG_PWROFF), C_OFF, q);
    mdh(b, 1, REG | HOST_AW'(MDP_REG_GPSHDR), HDR | 32'(b), q);
    ev = new[8]; tim = new[8];
    for (int i = 0; i < 8; i++) begin
      ev[i] = {8'h10 + 8'(b), 24'(i), $urandom};
      tim[i] = (i == 4) ? 3 * FRAME : 0;
    end
    load_pattern(b, 10, 8, tim, ev);
    // 2. GPS request
    dp_cmd(b, C_GPS);
    dp_wait_events(b, 1);
    dph(b, 0, HOST_AW'(2 ** (AW - 2)), 0, q);
    check($sformatf("b%0d gps reply header", b), q, HDR | 32'(b));
    if (q == (HDR | 32'(b))) mech[b][M_GPS]++;
    // 3. refused command
    dph(b, 1, REG | HOST_AW'(DP_REG_CMD), 32'h0000_0099, q);
    dph(b, 1, REG | HOST_AW'(DP_REG_CMD), 32'h0000_0098, q);
    dph(b, 0, REG | HOST_AW'(DP_REG_STATUS), 0, q);
    if (q[4]) mech[b][M_REFUSED]++;
    check($sformatf("b%0d command refused", b), q[4], 1);
    do dph(b, 0, REG | HOST_AW'(DP_REG_STATUS), 0, q); while (q[0]);
    dph(b, 1, REG | HOST_AW'(DP_REG_STATUS), 0, q);
    mdh(b, 0, REG | HOST_AW'(MDP_REG_CMD), 0, q);
    check($sformatf("b%0d unknown command latched", b), q, 32'h0000_0099);
    // 4. power on, GPS during the run, live rewrite of the last event
    nf0 = fall_t[b].size();
    dp_cmd(b, C_ON);
    dp_cmd(b, C_GPS);
    rewritten = {8'h20 + 8'(b), 24'hEEEE, 32'hFACE_0000 + 32'(b)};
    mdh(b, 1, HOST_AW'(10 + 3 * 7 + 1), rewritten[63:32], q);
    mdh(b, 1, HOST_AW'(10 + 3 * 7 + 2), rewritten[31:0], q);
    ev[7] = rewritten;
    dp_wait_events(b, 1 + 9);
    do mdh(b, 0, REG | HOST_AW'(MDP_REG_CTRL), 0, q); while (q[0]);
    if (q[1]) mech[b][M_END]++;
    check($sformatf("b%0d end of pattern", b), q[1], 1);
    // frame spacing on the event link: 9 frames after nf0
    for (int i = nf0 + 1; i < fall_t[b].size(); i++) begin
      longint g;
      g = fall_t[b][i] - fall_t[b][i - 1];
      if (g == FRAME) mech[b][M_BACK2BACK]++;
      else if (g >= 3 * FRAME) mech[b][M_DELAY]++;
    end
    // 5. buffer change and read-back of buffer A
    dph(b, 1, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
    repeat (4) @(negedge dp_clk);
    dph(b, 0, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
    check($sformatf("b%0d closed count", b), q, 10);
    if (q == 10) mech[b][M_BUFCHG]++;
    for (int n = 0; n < 10; n++) begin
      logic [31:0] sz, ptr, up, lo;
      dph(b, 0, HOST_AW'(2 * n), 0, sz);
      dph(b, 0, HOST_AW'(2 * n + 1), 0, ptr);
      dph(b, 0, HOST_AW'(ptr), 0, up);
      dph(b, 0, HOST_AW'(ptr + 1), 0, lo);
      check($sformatf("b%0d size %0d", b, n), sz, 64);
      stored.push_back({up, lo});
    end
    gps_pos = -1;
    begin
      int k;
      k = 0;
      for (int n = 1; n < 10; n++) begin
        if (stored[n][63:32] == (HDR | 32'(b))) gps_pos = n;
        else begin
          check($sformatf("b%0d event %0d", b, k), stored[n], ev[k]);
          k++;
        end
      end
      if (k == 8) mech[b][M_PLAY]++;
    end
    if (gps_pos > 1 && gps_pos < 9) mech[b][M_GPS_IN_RUN]++;
    if (stored[9] == rewritten || stored[8] == rewritten) mech[b][M_REWRITE]++;
    // 6. overflow of buffer B
    begin
      int n;
      n = CAP + 2;
      ev = new[n]; tim = new[n];
      for (int i = 0; i < n; i++) begin ev[i] = {8'h30, 24'(i), $urandom}; tim[i] = 0; end
      load_pattern(b, 100, n, tim, ev);
      dp_cmd(b, C_ON);
      dp_wait_events(b, 10 + n);
      dph(b, 0, REG | HOST_AW'(DP_REG_DROPCNT), 0, q);
      check($sformatf("b%0d dropped", b), q, 2);
      dph(b, 0, REG | HOST_AW'(DP_REG_STATUS), 0, q);
      if (q[2]) mech[b][M_OVERFLOW]++;
      dph(b, 0, HOST_AW'(2 ** (AW - 1) + 2 ** (AW - 2) + 2 * (CAP - 1)), 0, q);
      check($sformatf("b%0d last kept packet", b), q, ev[CAP - 1][63:32]);
    end
    // 7. slow pattern stopped by power-off
    begin
      logic [31:0] sent0, sent1;
      ev = new[3]; tim = new[3];
      for (int i = 0; i < 3; i++) begin ev[i] = {$urandom, $urandom}; tim[i] = 4 * FRAME; end
      load_pattern(b, 10, 3, tim, ev);
      dph(b, 1, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
      mdh(b, 0, REG | HOST_AW'(MDP_REG_EVSENT), 0, sent0);
      dp_cmd(b, C_ON);
      dp_cmd(b, C_OFF);
      repeat (12 * FRAME) @(negedge mdp_clk);
      mdh(b, 0, REG | HOST_AW'(MDP_REG_EVSENT), 0, sent1);
      check($sformatf("b%0d nothing sent after power-off", b), sent1, sent0);
      mdh(b, 0, REG | HOST_AW'(MDP_REG_CTRL), 0, q);
      check($sformatf("b%0d stopped", b), q[0], 0);
      if (!q[0] && sent1 == sent0) mech[b][M_PWROFF]++;
    end
  endtask

  initial begin
    repeat (3) @(negedge mdp_clk);
    dp_rst_n = 1; mdp_rst_n = 1;
    repeat (3) @(negedge mdp_clk);
    fork
      scenario(0);
      scenario(1);
    join
    for (int b = 0; b < NB; b++)
      for (int m = 0; m < M_NUM; m++) begin
        checks++;
        if (mech[b][m] == 0) begin
          failures++;
          $display("FAIL pair %0d: mechanism %s never happened", b, mech_e'(m));
        end
      end
    for (int m = 0; m < M_NUM; m++)
      $display("%-14s pair0 %0d pair1 %0d", mech_e'(m), mech[0][m], mech[1][m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge mdp_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
