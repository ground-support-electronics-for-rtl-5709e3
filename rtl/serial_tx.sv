// serial_tx -- transmitter for the three-wire Enable/CLK/Data link between
// the MDP and the DP (commands DP->MDP, GSC events MDP->DP).
//
// A word of NBITS bits is sent most significant bit first (D31..D0 for a
// command, D63..D0 for an event) while Enable is held low. Each bit occupies
// one bit slot of 1/BAUD seconds; CLK is high in the first half of the slot
// and low in the second, and Data changes together with the rising CLK, so
// the receiver samples on the falling CLK edge in the middle of the bit.
// Enable falls half a slot before the first CLK pulse and, after the last
// bit, stays high for at least half a slot. One frame therefore takes
// NBITS+1 slots: 65 x 7.8125 us = 507.8 us for an event, a limit of
// 1969 events/s, and 33 slots = 257.8 us for a command.
//
// The half-slot tick comes from a phase accumulator stepped by 2*BAUD each
// CLK_HZ clock, so the bit rate is exact on average with one clock of
// jitter (24 MHz / 256 kHz = 93.75 clocks per half slot).
//
// Interface: in_valid/in_ready handshake; in_ready is high only when idle.
// done pulses for one cycle when Enable returns high after the last bit.
//
// From the published description: the three signals, the bit order, the
// 128 kbit/s rate, the word lengths and the 1969 events/s limit. This
// design's own choices: the idle levels, the half-slot lead and guard and
// the CLK duty cycle.
module serial_tx #(
  parameter int unsigned NBITS  = 32,
  parameter int unsigned CLK_HZ = 24_000_000,
  parameter int unsigned BAUD   = 128_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [NBITS-1:0] in_data,
  output logic             ser_en_n,   // Enable, active low
  output logic             ser_clk,    // serial clock
  output logic             ser_data,   // serial data
  output logic             done
);

  localparam int unsigned LAST_PH = 2 * NBITS + 1;  // guard half slot
  localparam int unsigned PH_W    = $clog2(LAST_PH + 2);

  logic [31:0]      acc;
  logic             tick;
  logic             busy;
  logic [PH_W-1:0]  ph;
  logic [NBITS-1:0] sh;

  // half-slot tick
  always_comb tick = (acc + 32'(2 * BAUD)) >= 32'(CLK_HZ);

  logic last_tick;  // end of the guard half slot
  logic [31:0] acc_next;

  always_comb begin
    last_tick = busy && tick && (32'(ph) == LAST_PH);
    acc_next  = tick ? acc + 32'(2 * BAUD) - 32'(CLK_HZ) : acc + 32'(2 * BAUD);
  end

  // a new word is taken when idle or right at the end of the guard, so
  // back-to-back words follow each other every NBITS+1 slots exactly
  assign in_ready = !busy || last_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      busy     <= 1'b0;
      ph       <= '0;
      sh       <= '0;
      ser_en_n <= 1'b1;
      ser_clk  <= 1'b0;
      ser_data <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= last_tick;
      acc  <= busy ? acc_next : '0;
      if (in_valid && in_ready) begin
        busy     <= 1'b1;
        ph       <= '0;
        sh       <= in_data;
        ser_en_n <= 1'b0;
        ser_clk  <= 1'b0;
        ser_data <= in_data[NBITS-1];
      end else if (last_tick) begin
        busy <= 1'b0;
      end else if (busy && tick) begin
        ph <= ph + 1'b1;
        if (32'(ph) + 1 < LAST_PH) begin
          if (ph[0] == 1'b0) begin
            // odd phase: first half of a bit slot, CLK rises, data moves
            ser_clk <= 1'b1;
            if (ph != '0) begin
              ser_data <= sh[NBITS-2];
              sh       <= {sh[NBITS-2:0], 1'b0};
            end
          end else begin
            ser_clk <= 1'b0;
          end
        end else begin
          // guard half slot
          ser_clk  <= 1'b0;
          ser_en_n <= 1'b1;
          ser_data <= 1'b0;
        end
      end
    end
  end

  a_en_busy: assert property (@(posedge clk) disable iff (!rst_n) !ser_en_n |-> busy);

endmodule
