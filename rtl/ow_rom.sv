// ow_rom: constant table of the sensors' 64-bit 1-wire ROM codes.
//
// The controller does not run the 1-wire search procedure: every sensor's
// code is fixed at design time so that each reading belongs to a known place
// on the spacecraft, and the state machine addresses sensor `addr` by sending
// code `code`. Bank 0 is the normal sensor set. In the module that reads the
// duplicated sensors, DUP_MASK[i] = 1 replaces sensor i by its twin, whose
// code comes from bank 1 (see ow_pkg::rom_code for the code layout).
//
// Interface: `addr` in, `code` out one clock later (registered, like a block
// ROM). Storing the codes as constants follows the source; the code values,
// the registered read and the bank scheme are this design's choices.
module ow_rom #(
  parameter int unsigned              NUM_SENSORS = 32,
  parameter logic [NUM_SENSORS-1:0]   DUP_MASK    = '0,
  localparam int unsigned             AW          = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [63:0]   code
);
  logic [63:0] table_q [NUM_SENSORS];

  // Constant contents, computed at elaboration.
  always_comb begin
    for (int unsigned i = 0; i < NUM_SENSORS; i++)
      table_q[i] = ow_pkg::rom_code(DUP_MASK[i] ? 8'd1 : 8'd0, 16'(i));
  end

  always_ff @(posedge clk) begin
    code <= (32'(addr) < NUM_SENSORS) ? table_q[addr] : '0;
  end
endmodule
