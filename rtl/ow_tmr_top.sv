// ow_tmr_top: time-redundant 1-wire thermal-monitoring bus controller.
//
// Three copies of the regular 1-wire module (ow_master) sample the whole
// sensor network one after another instead of side by side. A round starts
// with a pulse on `rst`: module 1 samples every sensor into its RAM and raises
// Rd1; module 2 is held in reset until Rd1 rises and then repeats the round;
// module 3 waits in the same way for Rd2 and its Rd3 is the controller's
// `ready`. The three samples of a sensor are therefore taken a full round
// apart, far longer than a radiation-induced transient lasts.
//
// Afterwards the host reads sensor `addr` with `en` high: the three RAMs are
// read at the same address, the compare & vote block (ow_vote) compares bits
// 8..3 of the three words and selects d1 or d2 for `dout`; `ce` flags a
// critical error and `nature` its kind. Each module drives its own I/O pin;
// the three pins are joined outside the FPGA to the one sensor network.
// In sensor-duplication mode DUP_MASK[i] = 1 makes module 2 read a twin of
// sensor i (codes of bank 1) and the voter treats a lone disagreement of d2 as
// a sensor upset.
//
// Interface timing: `dout`, `ce`, `s`, `nature` are valid one clock after
// `addr` (registered RAM read). `dq_pull[k]` = 1 drives module k+1's pin low;
// `dq_in[k]` is the level seen at that pin. The start-on-Rd chaining, voting
// and pinout follow the source; the reset polarity of the chaining and the
// register stage on the duplication flag are this design's choices.
module ow_tmr_top #(
  parameter int unsigned            NUM_SENSORS     = 32,
  parameter int unsigned            CLK_FREQ_HZ     = 10_000_000,
  parameter logic [NUM_SENSORS-1:0] DUP_MASK        = '0,
  parameter int unsigned            MAX_RETRY       = 3,
  parameter int unsigned            CONV_TIMEOUT_US = 800_000,
  localparam int unsigned           AW = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic                      clk,
  input  logic                      rst,       // starts a round (module 1 reset)
  input  logic                      en,        // host owns the RAM read ports
  input  logic [AW-1:0]             addr,
  output logic [ow_pkg::TEMP_W-1:0] dout,
  output logic                      ce,
  output logic                      s,
  output ow_pkg::fault_nature_e     nature,
  output logic [2:0]                rd,        // Rd of modules 1..3; rd[2] = ready
  output logic [2:0]                fault,     // per module: a sensor was skipped
  output logic [2:0]                dq_pull,
  input  logic [2:0]                dq_in
);
  import ow_pkg::*;

  logic [2:0]        mrst;
  logic [TEMP_W-1:0] d [3];

  // Module k+1 stays in reset until module k is ready.
  assign mrst[0] = rst;
  assign mrst[1] = rst || !rd[0];
  assign mrst[2] = rst || !rd[1];

  for (genvar k = 0; k < 3; k++) begin : g_mod
    ow_master #(
      .NUM_SENSORS    (NUM_SENSORS),
      .CLK_FREQ_HZ    (CLK_FREQ_HZ),
      .DUP_MASK       (k == 1 ? DUP_MASK : '0),
      .MAX_RETRY      (MAX_RETRY),
      .CONV_TIMEOUT_US(CONV_TIMEOUT_US)
    ) u_mod (
      .clk,
      .rst     (mrst[k]),
      .ready   (rd[k]),
      .fault   (fault[k]),
      .ext_en  (en),
      .ext_addr(addr),
      .dout    (d[k]),
      .dq_pull (dq_pull[k]),
      .dq_in   (dq_in[k])
    );
  end

  // Duplication flag of the address being read, aligned with the RAM output.
  logic dup_q;
  always_ff @(posedge clk) dup_q <= (32'(addr) < NUM_SENSORS) ? DUP_MASK[addr] : 1'b0;

  ow_vote #(.WIDTH(TEMP_W)) u_vote (
    .d1(d[0]), .d2(d[1]), .d3(d[2]), .dup(dup_q), .s, .ce, .nature
  );

  assign dout = s ? d[1] : d[0];
endmodule
