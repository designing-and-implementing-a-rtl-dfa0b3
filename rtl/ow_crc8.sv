// ow_crc8: bit-serial CRC check block of the 1-wire controller.
//
// Every data bit received from (or sent to) a sensor is shifted in LSB first
// with `en` high; `clr` restarts the check. The register implements the
// Dallas/Maxim 1-wire CRC-8, x^8 + x^5 + x^4 + 1, in its reflected form: on
// each bit the feedback is crc[0] ^ d, the register shifts right and XORs 0x8C
// when the feedback is 1. Run over a whole 1-wire frame including its CRC byte
// the register ends at zero, which is what `crc_ok` reports.
//
// The source names the CRC block and its pins (data in, CRC out, reset, clock);
// the polynomial is the one 1-wire devices use and is this design's choice, as
// is the enable pin that lets the block share the controller clock.
// Timing: `crc` and `crc_ok` are registered and reflect every bit accepted up
// to the previous clock edge. `clr` has priority over `en`.
module ow_crc8 (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic       clr,     // restart the check
  input  logic       en,      // accept bit `d` this cycle
  input  logic       d,
  output logic [7:0] crc,
  output logic       crc_ok
);
  logic fb;
  assign fb = crc[0] ^ d;

  always_ff @(posedge clk) begin
    if (rst || clr)  crc <= '0;
    else if (en)     crc <= {1'b0, crc[7:1]} ^ (fb ? 8'h8C : 8'h00);
  end

  assign crc_ok = (crc == 8'h00);
endmodule
