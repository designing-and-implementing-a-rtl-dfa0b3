// ow_ram: local RAM of a 1-wire module, one temperature word per sensor.
//
// The state machine writes sensor i's reading at address i. A 2:1 address
// mux hands the read port to the outside when `ext_en` is high, so the
// telemetry host can read the table without stopping the controller; when
// `ext_en` is low the state machine's address drives the RAM.
//
// Interface: write port (`we`, `int_addr`, `wdata`) from the state machine;
// read port `rdata`, registered, valid one clock after the address, for the
// address chosen by the mux. Writes use `int_addr` only. The source shows the
// RAM, its address mux, the external Add/Enable pins and Dout; the word
// width (16 bits, the sensor's temperature register), the synchronous read
// and the reset-cleared contents are this design's choices.
module ow_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,        // clears the contents, synchronous
  input  logic             we,
  input  logic [AW-1:0]    int_addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             ext_en,
  input  logic [AW-1:0]    ext_addr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    raddr;

  assign raddr = ext_en ? ext_addr : int_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && 32'(int_addr) < DEPTH) begin
      mem[int_addr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
