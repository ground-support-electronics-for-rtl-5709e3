// tb_serial_tx -- self-checking test of serial_tx.
//
// Two transmitters are driven: a 32-bit one with an exact 5-clock half slot
// (CLK_HZ=1000, BAUD=100) and a 64-bit one at the real 24 MHz / 128 kbit/s.
// A monitor written independently of the transmitter samples Data on every
// falling CLK edge while Enable is low, rebuilds each word and compares it
// with what was sent. It also checks the frame timing: Enable low for
// 2*NBITS+1 half slots, back-to-back frames every NBITS+1 slots, and for the
// real link a frame period of 12187.5 clocks on average (1969 events/s).
module tb_serial_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- small, exact divider ----
  logic        a_valid, a_ready, a_en, a_ck, a_dt, a_done;
  logic [31:0] a_data;
  serial_tx #(.NBITS(32), .CLK_HZ(1000), .BAUD(100)) dut_a (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .ser_en_n(a_en), .ser_clk(a_ck), .ser_data(a_dt), .done(a_done));

  // ---- real rate, 64 bits ----
  logic        b_valid, b_ready, b_en, b_ck, b_dt, b_done;
  logic [63:0] b_data;
  serial_tx #(.NBITS(64), .CLK_HZ(24_000_000), .BAUD(128_000)) dut_b (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .ser_en_n(b_en), .ser_clk(b_ck), .ser_data(b_dt), .done(b_done));

  // monitor A
  logic [31:0] a_q[$];
  logic [63:0] a_sh; int a_n; logic a_ck_d, a_en_d; longint a_low_start, a_fall_prev;
  int a_frames = 0;
  always @(negedge clk) begin
    a_ck_d <= a_ck; a_en_d <= a_en;
    if (rst_n) begin
      if (a_en_d && !a_en) begin
        a_n = 0; a_sh = 0; a_low_start = $time / 10;
        if (a_frames > 0) begin
          checks++;
          if ((a_low_start - a_fall_prev) != 33 * 10) begin
            failures++; $display("FAIL A frame period %0d", a_low_start - a_fall_prev);
          end
        end
        a_fall_prev = a_low_start;
      end
      if (!a_en && a_ck_d && !a_ck) begin a_sh = {a_sh[62:0], a_dt}; a_n++; end
      if (!a_en_d && a_en) begin
        logic [31:0] exp;
        exp = a_q.pop_front();
        checks += 3;
        if (a_n != 32) begin failures++; $display("FAIL A bit count %0d", a_n); end
        if (a_sh[31:0] != exp) begin failures++; $display("FAIL A word %h exp %h", a_sh[31:0], exp); end
        if (($time/10 - a_low_start) != 65 * 5) begin
          failures++; $display("FAIL A enable-low length %0d", $time/10 - a_low_start);
        end
        a_frames++;
      end
    end
  end

  // monitor B
  logic [63:0] b_q[$];
  logic [63:0] b_sh; int b_n; logic b_ck_d, b_en_d; longint b_first, b_last; int b_frames = 0;
  always @(negedge clk) begin
    b_ck_d <= b_ck; b_en_d <= b_en;
    if (rst_n) begin
      if (b_en_d && !b_en) begin
        b_n = 0;
        if (b_frames == 0) b_first = $time / 10;
        b_last = $time / 10;
      end
      if (!b_en && b_ck_d && !b_ck) begin b_sh = {b_sh[62:0], b_dt}; b_n++; end
      if (!b_en_d && b_en) begin
        logic [63:0] exp;
        exp = b_q.pop_front();
        checks += 2;
        if (b_n != 64) begin failures++; $display("FAIL B bit count %0d", b_n); end
        if (b_sh != exp) begin failures++; $display("FAIL B word %h exp %h", b_sh, exp); end
        b_frames++;
      end
    end
  end

  initial begin
    a_valid = 0; b_valid = 0; a_data = 0; b_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // B: four back-to-back events at the real rate (runs in parallel)
    fork
      begin
        for (int i = 0; i < 4; i++) begin
          logic [63:0] w;
          w = {$urandom, $urandom};
          b_q.push_back(w);
          @(negedge clk);
          b_data = w; b_valid = 1;
          while (!b_ready) @(negedge clk);
          @(negedge clk);
          b_valid = 0;
        end
      end
      begin
        // A: twelve back-to-back random commands plus the edge patterns
        for (int i = 0; i < 14; i++) begin
          logic [31:0] w;
          w = (i == 0) ? 32'hFFFF_FFFF : (i == 1) ? 32'h0000_0000 : $urandom;
          a_q.push_back(w);
          a_data = w; a_valid = 1;
          while (!a_ready) @(negedge clk);
          @(negedge clk);
          a_valid = 0;
        end
      end
    join
    wait (b_frames == 4 && a_frames == 14);
    repeat (10) @(posedge clk);
    // 3 frame periods of 65 slots at 187.5 clocks/slot = 36562.5 clocks
    checks++;
    if ((b_last - b_first) < 36562 || (b_last - b_first) > 36563) begin
      failures++; $display("FAIL B 3-frame time %0d clocks", b_last - b_first);
    end
    $display("B: 3 frames in %0d clocks -> %0.1f events/s at 24 MHz",
             b_last - b_first, 3.0 * 24.0e6 / real'(b_last - b_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog a_frames=%0d b_frames=%0d", a_frames, b_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
