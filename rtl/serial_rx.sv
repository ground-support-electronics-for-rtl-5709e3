// serial_rx -- receiver for the three-wire Enable/CLK/Data link.
//
// Enable, CLK and Data come from another box and are brought into the local
// clock domain through two-flop synchronisers. While Enable is low, each
// falling CLK edge shifts the Data bit in, most significant bit first. When
// Enable returns high the frame is closed: with exactly NBITS bits the word
// is presented on out_data with a one-cycle out_valid, otherwise a one-cycle
// frame_err is raised and the bits are discarded. A frame therefore appears
// about three local clocks after Enable rises.
//
// The local clock must be well above the serial bit rate (at 128 kbit/s and
// 24 MHz there are 187 local clocks per bit). From the published description:
// the signals, the bit order and the lengths. Sampling on the falling CLK
// edge and the frame-length check are this design's own choices.
module serial_rx #(
  parameter int unsigned NBITS = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ser_en_n,
  input  logic             ser_clk,
  input  logic             ser_data,
  output logic             out_valid,
  output logic [NBITS-1:0] out_data,
  output logic             frame_err,
  output logic             arrival      // Enable seen low (frame in progress)
);

  localparam int unsigned CNT_W = $clog2(NBITS + 2);

  logic [1:0] en_s, ck_s, dt_s;
  logic       ck_prev;
  logic       in_frame;
  logic [CNT_W-1:0] cnt;
  logic [NBITS-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_s      <= 2'b11;
      ck_s      <= 2'b00;
      dt_s      <= 2'b00;
      ck_prev   <= 1'b0;
      in_frame  <= 1'b0;
      cnt       <= '0;
      sh        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      frame_err <= 1'b0;
    end else begin
      en_s      <= {en_s[0], ser_en_n};
      ck_s      <= {ck_s[0], ser_clk};
      dt_s      <= {dt_s[0], ser_data};
      ck_prev   <= ck_s[1];
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      if (en_s[1]) begin
        if (in_frame) begin
          in_frame <= 1'b0;
          if (32'(cnt) == NBITS) begin
            out_valid <= 1'b1;
            out_data  <= sh;
          end else begin
            frame_err <= 1'b1;
          end
        end
      end else begin
        if (!in_frame) begin
          in_frame <= 1'b1;
          cnt      <= '0;
        end else if (ck_prev && !ck_s[1]) begin
          sh <= {sh[NBITS-2:0], dt_s[1]};
          if (32'(cnt) <= NBITS) cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign arrival = in_frame;

endmodule
