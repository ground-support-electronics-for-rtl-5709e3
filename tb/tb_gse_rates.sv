// tb_gse_rates -- the pseudo-MDP's programmable event rates, played through
// gse_top at full size (every parameter at its default: 24 MHz pseudo-MDP,
// 25 MHz pseudo-DP, 128 kbit/s, 16 Mbyte per board).
//
// Pair 0 is looped; pair 1 idles. The host loads two patterns into the
// pseudo-MDP memory and starts each with a START register write:
//   1. periodic: NPER events, each T = 2,400,000 clocks apart, i.e. the
//      10 events/s per counter expected in orbit;
//   2. random: NRND events with gaps drawn by $urandom between 1,000 and
//      200,000 clocks. Gaps shorter than one event frame (65 bit slots,
//      12187.5 clocks) must come out at the link limit instead.
// A monitor records the clock count at every falling Enable of the event
// link. Each gap between frames is checked against max(T, frame time), with
// one clock of tolerance for the bit-clock phase, and the test prints the
// measured mean rate of each pattern. At the end the pseudo-DP's event
// counter must equal the number of events sent, and the last stored event is
// read back from buffer A.
module tb_gse_rates;
  import gse_pkg::*;
  localparam int NB = 2;
  localparam logic [HOST_AW-1:0] REG = HOST_AW'(1) << MEM_AW;
  localparam logic [31:0] C_GPS = 32'h4750_5300, C_ON = 32'h5057_0001, C_OFF = 32'h5057_0000,
                          HDR = 32'h6B50_0000;

  logic dp_clk = 0, mdp_clk = 0, dp_rst_n = 0, mdp_rst_n = 0;
  always #20 dp_clk = ~dp_clk;
  always #21 mdp_clk = ~mdp_clk;
  int checks = 0, failures = 0;

  logic        vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0]  vme_ds_n = 2'b11;
  logic [5:0]  vme_am = '0;
  logic [31:1] vme_addr = '0;
  logic [31:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic [NB-1:0] c_en, c_ck, c_dt, d_en, d_ck, d_dt;

  gse_top dut (
    .dp_clk, .dp_rst_n, .mdp_clk, .mdp_rst_n,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_addr, .vme_d_in,
    .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .dp_cmd_en_n(c_en), .dp_cmd_clk(c_ck), .dp_cmd_data(c_dt),
    .dp_dat_en_n(d_en), .dp_dat_clk(d_ck), .dp_dat_data(d_dt),
    .mdp_cmd_en_n(c_en), .mdp_cmd_clk(c_ck), .mdp_cmd_data(c_dt),
    .mdp_dat_en_n(d_en), .mdp_dat_clk(d_ck), .mdp_dat_data(d_dt));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d (%0h) exp %0d (%0h)", what, got, got, exp, exp); end
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

  task automatic dph(input bit we, input logic [HOST_AW-1:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    vme(we, {VBASE, a, 2'b00}, d, q);
  endtask

  task automatic mdh(input bit we, input logic [HOST_AW-1:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    vme(we, {VBASE + 7'(NB), a, 2'b00}, d, q);
  endtask

  // event link monitor, in cycles of the pseudo-MDP clock
  longint mcyc = 0;
  always @(posedge mdp_clk) mcyc <= mcyc + 1;
  longint d_fall[$];
  logic d_en_d = 1;
  always @(negedge mdp_clk) begin
    d_en_d <= d_en[0];
    if (mdp_rst_n && d_en_d && !d_en[0]) d_fall.push_back(mcyc);
  end

  localparam int NPER = 5, NRND = 10;
  localparam int TPER = 2_400_000;           // 24 MHz / 10 events/s
  localparam int BASE1 = 1000, BASE2 = 5000;
  int          tper[NPER], trnd[NRND];
  logic [63:0] last_ev;

  // load a pattern of n events with the given gaps, then the end marker
  task automatic load(input int base, input int n, input int t[]);
    logic [31:0] q;
    for (int i = 0; i < n; i++) begin
      last_ev = {8'h20, 8'(base >> 8), 16'(i), $urandom};
      mdh(1, HOST_AW'(base + 3 * i), {1'b1, 31'(t[i])}, q);
      mdh(1, HOST_AW'(base + 3 * i + 1), last_ev[63:32], q);
      mdh(1, HOST_AW'(base + 3 * i + 2), last_ev[31:0], q);
    end
    mdh(1, HOST_AW'(base + 3 * n), 0, q);
  endtask

  // run a loaded pattern and check its frame gaps
  task automatic play(input string name, input int base, input int n, input int t[]);
    logic [31:0] q;
    longint first;
    d_fall.delete();
    mdh(1, REG | HOST_AW'(MDP_REG_START), base, q);
    // the DP's GSC power-on command starts playback
    dph(1, REG | HOST_AW'(DP_REG_CMD), C_ON, q);
    do mdh(0, REG | HOST_AW'(MDP_REG_CTRL), 0, q); while (!q[0]);
    do begin
      repeat (20_000) @(negedge mdp_clk);
      mdh(0, REG | HOST_AW'(MDP_REG_CTRL), 0, q);
    end while (q[0]);
    check($sformatf("%s: frames", name), d_fall.size(), n);
    first = (d_fall.size() > 0) ? d_fall[0] : 0;
    for (int i = 1; i < n && i < d_fall.size(); i++) begin
      longint g, lo, hi;
      g = d_fall[i] - d_fall[i - 1];
      lo = (t[i] > 12187) ? longint'(t[i]) : 64'd12187;
      hi = lo + 1;
      checks++;
      if (g < lo || g > hi) begin
        failures++;
        $display("FAIL %s gap %0d: %0d clocks, expected %0d..%0d", name, i, g, lo, hi);
      end
    end
    if (d_fall.size() == n && n > 1)
      $display("%s: %0d events, mean rate %.3f events/s", name, n,
               real'(n - 1) * 24.0e6 / real'(d_fall[n - 1] - first));
  endtask

  initial begin
    logic [31:0] q, up, lo, ptr;
    repeat (3) @(negedge mdp_clk);
    dp_rst_n = 1; mdp_rst_n = 1;
    mdh(1, REG | HOST_AW'(MDP_REG_GPSREQ), C_GPS, q);
    mdh(1, REG | HOST_AW'(MDP_REG_PWRON), C_ON, q);
    mdh(1, REG | HOST_AW'(MDP_REG_PWROFF), C_OFF, q);
    mdh(1, REG | HOST_AW'(MDP_REG_GPSHDR), HDR, q);
    for (int i = 0; i < NPER; i++) tper[i] = TPER;
    for (int i = 0; i < NRND; i++) trnd[i] = 1_000 + int'($urandom_range(199_000));
    trnd[3] = 0;                                 // at least one at the link limit
    load(BASE1, NPER, tper);
    load(BASE2, NRND, trnd);
    play("periodic 10/s", BASE1, NPER, tper);
    play("random", BASE2, NRND, trnd);
    // every event reached the pseudo-DP and the last one is stored intact
    repeat (20_000) @(negedge dp_clk);
    dph(0, REG | HOST_AW'(DP_REG_EVCNT), 0, q);
    check("events received by the pseudo-DP", q, NPER + NRND);
    dph(1, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
    repeat (4) @(negedge dp_clk);
    dph(0, HOST_AW'(2 * (NPER + NRND - 1) + 1), 0, ptr);
    dph(0, HOST_AW'(ptr), 0, up);
    dph(0, HOST_AW'(ptr + 1), 0, lo);
    check("last stored event", {up, lo}, last_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge mdp_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
