// cmd_responder -- reacts to commands received from the DP, for the
// pseudo-MDP configuration.
//
// Every 32-bit command that arrives is latched in last_cmd, counted, and
// raises the arrival flag, which stays set until the host clears it; the host
// software then checks the command against its list. Three command codes,
// loaded by the host, are acted on in hardware without waiting for the host:
//   gps_code    - a GPS time-stamp request: a 64-bit reply is queued at once,
//                 {gps_hdr, value of a free-running clock-cycle counter
//                 latched at the arrival of the request};
//   pwron_code  - GSC power on: one-cycle gen_start to the event generator;
//   pwroff_code - GSC power off: one-cycle gen_stop.
// Any other command causes no action besides the flag. The reply is offered
// on gps_valid/gps_ready and withdrawn when taken; a second request before
// that refreshes the queued reply.
//
// From the published description: the arrival flag, the host-side list
// check, the immediate GPS reply and the power-on start of the pseudo
// events. This design's own choices: programmable codes (the codes are not
// published), the reply format and the power-off stop.
module cmd_responder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [31:0] cmd_data,
  input  logic        arrival_clr,
  input  logic [31:0] gps_code,
  input  logic [31:0] pwron_code,
  input  logic [31:0] pwroff_code,
  input  logic [31:0] gps_hdr,
  output logic        arrival,
  output logic [31:0] last_cmd,
  output logic [31:0] cmd_count,
  output logic        gen_start,
  output logic        gen_stop,
  output logic        gps_valid,
  input  logic        gps_ready,
  output logic [63:0] gps_data,
  output logic [31:0] gps_count
);

  logic [31:0] time_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      time_cnt  <= '0;
      arrival   <= 1'b0;
      last_cmd  <= '0;
      cmd_count <= '0;
      gen_start <= 1'b0;
      gen_stop  <= 1'b0;
      gps_valid <= 1'b0;
      gps_data  <= '0;
      gps_count <= '0;
    end else begin
      time_cnt  <= time_cnt + 1'b1;
      gen_start <= 1'b0;
      gen_stop  <= 1'b0;
      if (gps_valid && gps_ready) begin
        gps_valid <= 1'b0;
        gps_count <= gps_count + 1'b1;
      end
      if (arrival_clr) arrival <= 1'b0;
      if (cmd_valid) begin
        arrival   <= 1'b1;
        last_cmd  <= cmd_data;
        cmd_count <= cmd_count + 1'b1;
        if (cmd_data == gps_code) begin
          gps_valid <= 1'b1;
          gps_data  <= {gps_hdr, time_cnt};
        end else if (cmd_data == pwron_code) begin
          gen_start <= 1'b1;
        end else if (cmd_data == pwroff_code) begin
          gen_stop <= 1'b1;
        end
      end
    end
  end

endmodule
