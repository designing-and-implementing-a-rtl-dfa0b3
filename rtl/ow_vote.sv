// ow_vote: compare & vote block of the time-redundant controller.
//
// The three 1-wire modules sample the same sensor at three successive times;
// d1, d2 and d3 are the words they stored for one sensor. Only bits
// CMP_HI..CMP_LO (8..3 by default) are compared, so that readings that differ
// by the normal drift between the three sampling times still agree. The three
// equality results select the output and classify the fault:
//
//   d3=d2 d3=d1 d2=d1 | plain mode      | sensor duplication
//     0     0     0   | CE  SET         | CE  SET
//     0     0     1   | S=0             | S=0
//     0     1     0   | S=0             | CE  SEU
//     0     1     1   | CE  FPGA/sensor | CE  FPGA/sensor
//     1     0     0   | S=1             | S=1
//     1     0     1   | CE  FPGA/sensor | CE  FPGA/sensor
//     1     1     0   | CE  FPGA/sensor | CE  FPGA/sensor
//     1     1     1   | S=0             | S=0
//
// S drives the output mux: 0 passes d1, 1 passes d2. In duplication mode
// (`dup` = 1) module 2 reads a twin sensor, so a disagreement of d2 alone is a
// sensor upset and raises CE instead of being outvoted. The table and the
// compared bit range follow the source; where the source leaves S open (the
// CE rows) this design drives S = 0. Purely combinational.
module ow_vote #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned CMP_HI = 8,
  parameter int unsigned CMP_LO = 3
) (
  input  logic [WIDTH-1:0]      d1,
  input  logic [WIDTH-1:0]      d2,
  input  logic [WIDTH-1:0]      d3,
  input  logic                  dup,
  output logic                  s,
  output logic                  ce,
  output ow_pkg::fault_nature_e nature
);
  import ow_pkg::*;

  logic e32, e31, e21;
  assign e32 = (d3[CMP_HI:CMP_LO] == d2[CMP_HI:CMP_LO]);
  assign e31 = (d3[CMP_HI:CMP_LO] == d1[CMP_HI:CMP_LO]);
  assign e21 = (d2[CMP_HI:CMP_LO] == d1[CMP_HI:CMP_LO]);

  always_comb begin
    s      = 1'b0;
    ce     = 1'b0;
    nature = FN_NONE;
    unique case ({e32, e31, e21})
      3'b000: begin ce = 1'b1; nature = FN_SET; end
      3'b001: s = 1'b0;
      3'b010: if (dup) begin ce = 1'b1; nature = FN_SEU; end
      3'b100: s = 1'b1;
      3'b111: s = 1'b0;
      default: begin ce = 1'b1; nature = FN_FPGA_SENSOR; end
    endcase
  end
endmodule
