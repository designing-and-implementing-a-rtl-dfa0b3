// ow_pkg: types, constants and helper functions shared by the 1-wire
// thermal-monitoring controller.
//
// The slot timings are the implemented values of the reference timing table
// (reset 560 us, wait-for-presence 30 us, presence window 115 us, write-0
// 73 us low / 24 us high, write-1 12 us low / 84 us high). The read-slot
// timing, the presence recovery time, the DS18S20-style command bytes and the
// 8-bit Dallas CRC polynomial (x^8 + x^5 + x^4 + 1) are this design's choices:
// the source only names these steps.
//
// rom_code() computes the constant ROM code table. A code is
// {crc8, serial[47:0], family 0x10}; the serial is {bank, index} so that bank
// 0 holds the normal sensors and bank 1 the duplicated sensors of the
// sensor-duplication mode. Replace it with the real codes of a flight harness.
package ow_pkg;

  // Slot timings in microseconds.
  localparam int unsigned T_RSTL_US   = 560;  // reset pulse (low)
  localparam int unsigned T_PDHW_US   = 30;   // wait for presence after release
  localparam int unsigned T_PDW_US    = 115;  // presence sampling window
  localparam int unsigned T_PREC_US   = 335;  // recovery after the window (assumed)
  localparam int unsigned T_W0L_US    = 73;   // write 0: low
  localparam int unsigned T_W0H_US    = 24;   // write 0: high
  localparam int unsigned T_W1L_US    = 12;   // write 1: low
  localparam int unsigned T_W1H_US    = 84;   // write 1: high
  localparam int unsigned T_RL_US     = 2;    // read slot: low (assumed)
  localparam int unsigned T_RS_US     = 12;   // read slot: sample point (assumed)
  localparam int unsigned T_RSLOT_US  = 97;   // read slot: total (assumed)

  // 1-wire command bytes (DS18S20 family, also used by the DS18B20).
  localparam logic [7:0] CMD_MATCH_ROM  = 8'h55;
  localparam logic [7:0] CMD_CONVERT_T  = 8'h44;
  localparam logic [7:0] CMD_READ_SCR   = 8'hBE;
  localparam logic [7:0] FAMILY_DS18S20 = 8'h10;

  localparam int unsigned SCRATCH_BYTES = 9;
  localparam int unsigned TEMP_W        = 16;

  // Operations of the slot generator.
  typedef enum logic [1:0] {
    OP_RESET = 2'd0,
    OP_WRITE = 2'd1,
    OP_READ  = 2'd2
  } ow_op_e;

  // States of the per-module controller (one per bubble of the state diagram).
  typedef enum logic [3:0] {
    ST_INIT    = 4'd0,   // Initialization
    ST_EOS     = 4'd1,   // End of Sensors?
    ST_LOAD    = 4'd2,   // Load 1-wire code
    ST_RESET   = 4'd3,   // Send reset pulse
    ST_PRES    = 4'd4,   // Detect presence pulse
    ST_SEND    = 4'd5,   // Send sensor code & update
    ST_RECV    = 4'd6,   // Receive data from sensor
    ST_CRC     = 4'd7,   // CRC OK?
    ST_INC     = 4'd8,   // Increase sensor number
    ST_IDLE    = 4'd9    // Idle, Ready <= 1
  } ow_state_e;

  // Fault nature reported by the compare & vote block.
  typedef enum logic [1:0] {
    FN_NONE        = 2'd0,  // agreement, or a single disagreeing copy outvoted
    FN_SET         = 2'd1,  // all three copies differ: transient fault
    FN_SEU         = 2'd2,  // duplicated sensor disagrees with both others
    FN_FPGA_SENSOR = 2'd3   // inconsistent comparison results: controller or sensor fault
  } fault_nature_e;

  // One step of the Dallas/Maxim CRC-8 (reflected polynomial 0x8C).
  function automatic logic [7:0] crc8_step(logic [7:0] crc, logic b);
    logic fb;
    fb = crc[0] ^ b;
    return (crc >> 1) ^ (fb ? 8'h8C : 8'h00);
  endfunction

  // CRC-8 of the low 56 bits, LSB first (as sent on the wire).
  function automatic logic [7:0] crc8_56(logic [55:0] d);
    logic [7:0] c;
    c = '0;
    for (int i = 0; i < 56; i++) c = crc8_step(c, d[i]);
    return c;
  endfunction

  // ROM code of sensor `idx` in `bank`.
  function automatic logic [63:0] rom_code(logic [7:0] bank, logic [15:0] idx);
    logic [55:0] body;
    body = {bank, 16'h0000, 8'h5A, idx, FAMILY_DS18S20};
    return {crc8_56(body), body};
  endfunction

  // Microseconds to clock cycles.
  function automatic int unsigned us2cyc(int unsigned clk_hz, int unsigned us);
    return (clk_hz / 1_000_000) * us;
  endfunction

endpackage
