// tb_gse_full -- one complete DP-MDP operation through gse_top with every
// parameter at its default: two boards per configuration, 16 Mbyte memory
// per board, 25 MHz pseudo-DP clock, 24 MHz pseudo-MDP clock (simulated as
// 40 ns and 42 ns periods) and the 128 kbit/s link.
//
// Pair 0 is looped (pseudo-DP 0 <-> pseudo-MDP 0); pair 1 idles. The host
// programs the pseudo-MDP, loads a four-event pattern (three back-to-back,
// one 1 ms later), then from the pseudo-DP sends GSC power-on and a GPS
// request. The test checks the frame spacing at the link limit (65 bit slots,
// 12187.5 clocks of 24 MHz: 1969 events/s), the 1 ms programmed delay, the
// command frame length (33 slots, 257.8 us), and after a buffer change
// every stored packet in buffer A (index at the start of memory, data in the
// second quarter).
module tb_gse_full;
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

  // link timing monitors, in cycles of the sending side
  longint mcyc = 0, dcyc = 0;
  always @(posedge mdp_clk) mcyc <= mcyc + 1;
  always @(posedge dp_clk) dcyc <= dcyc + 1;
  longint d_fall[$], c_fall[$], c_rise[$];
  logic d_en_d = 1, c_en_d = 1;
  always @(negedge mdp_clk) begin
    d_en_d <= d_en[0];
    if (d_en_d && !d_en[0]) d_fall.push_back(mcyc);
  end
  always @(negedge dp_clk) begin
    c_en_d <= c_en[0];
    if (c_en_d && !c_en[0]) c_fall.push_back(dcyc);
    if (!c_en_d && c_en[0]) c_rise.push_back(dcyc);
  end

  logic [63:0] ev[4];
  int          tim[4] = '{0, 0, 0, 24_000};   // last one 1 ms after the third

  initial begin
    logic [31:0] q;
    localparam int BASE = 1000;
    localparam int DATA_A = 2 ** (MEM_AW - 2);
    repeat (3) @(negedge mdp_clk);
    dp_rst_n = 1; mdp_rst_n = 1;
    // program the pseudo-MDP and load the pattern
    mdh(1, REG | HOST_AW'(MDP_REG_GPSREQ), C_GPS, q);
    mdh(1, REG | HOST_AW'(MDP_REG_PWRON), C_ON, q);
    mdh(1, REG | HOST_AW'(MDP_REG_PWROFF), C_OFF, q);
    mdh(1, REG | HOST_AW'(MDP_REG_GPSHDR), HDR, q);
    for (int i = 0; i < 4; i++) begin
      ev[i] = {8'h10, 24'(i), $urandom};
      mdh(1, HOST_AW'(BASE + 3 * i), {1'b1, 31'(tim[i])}, q);
      mdh(1, HOST_AW'(BASE + 3 * i + 1), ev[i][63:32], q);
      mdh(1, HOST_AW'(BASE + 3 * i + 2), ev[i][31:0], q);
    end
    mdh(1, HOST_AW'(BASE + 12), 0, q);
    mdh(1, REG | HOST_AW'(MDP_REG_START), BASE, q);
    // power on, then a GPS request as soon as the command line is free
    dph(1, REG | HOST_AW'(DP_REG_CMD), C_ON, q);
    do dph(0, REG | HOST_AW'(DP_REG_STATUS), 0, q); while (q[0]);
    dph(1, REG | HOST_AW'(DP_REG_CMD), C_GPS, q);
    do begin
      repeat (2000) @(negedge dp_clk);
      dph(0, REG | HOST_AW'(DP_REG_EVCNT), 0, q);
    end while (q < 5);
    // command frame: Enable low for 2*32+1 half slots of 97.66 clocks
    check("command frame length (dp clocks)", (c_rise[0] - c_fall[0] >= 6347) && (c_rise[0] - c_fall[0] <= 6348), 1);
    $display("command frame: Enable low for %0d clocks of 25 MHz", c_rise[0] - c_fall[0]);
    // event link: 5 frames (4 events + GPS reply somewhere after the second)
    check("frames on event link", d_fall.size(), 5);
    begin
      int n1969 = 0, ndelay = 0;
      for (int i = 1; i < d_fall.size(); i++) begin
        longint g;
        g = d_fall[i] - d_fall[i - 1];
        $display("frame gap %0d clocks of 24 MHz", g);
        if (g == 12187 || g == 12188) n1969++;
        else if (g == 24_000) ndelay++;
      end
      checks += 2;
      if (n1969 < 3) begin failures++; $display("FAIL back-to-back frames %0d", n1969); end
      if (ndelay != 1) begin failures++; $display("FAIL 1 ms delay not seen"); end
    end
    // buffer change and read back
    dph(1, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
    repeat (4) @(negedge dp_clk);
    dph(0, REG | HOST_AW'(DP_REG_BUFCHG), 0, q);
    check("packets in buffer A", q, 5);
    begin
      int k = 0, ngps = 0;
      for (int n = 0; n < 5; n++) begin
        logic [31:0] sz, ptr, up, lo;
        dph(0, HOST_AW'(2 * n), 0, sz);
        dph(0, HOST_AW'(2 * n + 1), 0, ptr);
        check("size", sz, 64);
        check("pointer", ptr, DATA_A + 2 * n);
        dph(0, HOST_AW'(ptr), 0, up);
        dph(0, HOST_AW'(ptr + 1), 0, lo);
        if (up == HDR) ngps++;
        else begin check($sformatf("event %0d", k), {up, lo}, ev[k]); k++; end
      end
      check("gps replies stored", ngps, 1);
      check("events stored", k, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge mdp_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
