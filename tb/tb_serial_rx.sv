// tb_serial_rx -- self-checking test of serial_rx (64-bit event receiver).
//
// The test drives Enable/CLK/Data directly with its own timing: Data changes
// with the rising CLK, the receiver must take it on the falling edge. It
// sends random words at several bit periods (down to 8 clocks per bit), then
// frames with 63 and 65 bits, which must raise frame_err and deliver nothing,
// and checks that every good word arrives once and unchanged, within a few
// clocks of Enable rising.
module tb_serial_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en_n = 1, sck = 0, sdt = 0;
  logic        valid, ferr, arr;
  logic [63:0] data;

  serial_rx #(.NBITS(64)) dut (
    .clk, .rst_n, .ser_en_n(en_n), .ser_clk(sck), .ser_data(sdt),
    .out_valid(valid), .out_data(data), .frame_err(ferr), .arrival(arr));

  logic [63:0] exp_q[$];
  int nvalid = 0, nerr = 0, exp_err = 0;
  longint t_rise;

  task automatic send(input logic [63:0] w, input int nbits, input int half);
    en_n = 0;
    repeat (half) @(negedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      sck = 1; sdt = (i < 64) ? w[i] : 1'b1;
      repeat (half) @(negedge clk);
      sck = 0;
      repeat (half) @(negedge clk);
    end
    en_n = 1;
    t_rise = $time;
    repeat (half) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && valid) begin
      logic [63:0] e;
      nvalid++;
      checks += 2;
      e = exp_q.pop_front();
      if (data != e) begin failures++; $display("FAIL word %h exp %h", data, e); end
      if (($time - t_rise) > 50) begin failures++; $display("FAIL late by %0d", $time - t_rise); end
    end
    if (rst_n && ferr) nerr++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      logic [63:0] w;
      w = (i == 0) ? '1 : (i == 1) ? 64'h8000_0000_0000_0001 : {$urandom, $urandom};
      exp_q.push_back(w);
      send(w, 64, 4 + (i % 5));
    end
    send(64'h1234_5678_9abc_def0, 63, 5); exp_err++;
    send(64'h1234_5678_9abc_def0, 65, 5); exp_err++;
    exp_q.push_back(64'hCAFE_F00D_0123_4567);
    send(64'hCAFE_F00D_0123_4567, 64, 6);
    repeat (20) @(negedge clk);
    checks += 3;
    if (nvalid != 21) begin failures++; $display("FAIL %0d words received", nvalid); end
    if (nerr != exp_err) begin failures++; $display("FAIL %0d frame errors", nerr); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
