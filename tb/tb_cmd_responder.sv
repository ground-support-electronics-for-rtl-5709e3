// tb_cmd_responder -- self-checking test of cmd_responder.
//
// Commands are presented as one-cycle pulses. The test checks that every
// command sets the arrival flag (until cleared) and is latched and counted;
// that a GPS request produces at once a reply {gps_hdr, clock count at the
// request}, held until taken; that the power-on and power-off codes give one
// start or stop pulse; and that other codes cause no action.
module tb_cmd_responder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cmd_valid = 0, arrival_clr = 0, gps_ready = 0;
  logic [31:0] cmd_data = '0;
  localparam logic [31:0] GPS = 32'h4750_5352, PON = 32'h5057_4F4E, POFF = 32'h5057_4F46,
                          HDR = 32'hA5C3_0001;
  logic        arrival, gen_start, gen_stop, gps_valid;
  logic [31:0] last_cmd, cmd_count, gps_count;
  logic [63:0] gps_data;

  cmd_responder dut (
    .clk, .rst_n, .cmd_valid, .cmd_data, .arrival_clr,
    .gps_code(GPS), .pwron_code(PON), .pwroff_code(POFF), .gps_hdr(HDR),
    .arrival, .last_cmd, .cmd_count, .gen_start, .gen_stop,
    .gps_valid, .gps_ready, .gps_data, .gps_count);

  longint cyc = 0;       // clock edges since reset release
  int nstart = 0, nstop = 0;
  always @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && gen_start) nstart++;
    if (rst_n && gen_stop) nstop++;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic cmd(input logic [31:0] c, output longint t);
    @(negedge clk);
    cmd_valid = 1; cmd_data = c; t = cyc;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    longint t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check("no arrival at reset", arrival, 0);
    cmd(32'h1111_0001, t);
    check("arrival", arrival, 1);
    check("last", last_cmd, 32'h1111_0001);
    check("no action", {gps_valid, 30'(nstart), 30'(nstop)}, 0);
    @(negedge clk); arrival_clr = 1; @(negedge clk); arrival_clr = 0;
    check("arrival cleared", arrival, 0);
    repeat (37) @(negedge clk);
    cmd(GPS, t);
    check("gps valid", gps_valid, 1);
    check("gps reply", gps_data, {HDR, 32'(t)});
    check("arrival on gps", arrival, 1);
    repeat (5) @(negedge clk);
    check("gps held", gps_valid, 1);
    gps_ready = 1; @(negedge clk); gps_ready = 0;
    check("gps taken", gps_valid, 0);
    check("gps count", gps_count, 1);
    cmd(PON, t);
    @(negedge clk);
    check("start pulses", nstart, 1);
    cmd(POFF, t);
    @(negedge clk);
    check("stop pulses", nstop, 1);
    check("start pulses still", nstart, 1);
    cmd(32'hFFFF_FFFF, t);
    check("count", cmd_count, 5);
    check("gps not set", gps_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
