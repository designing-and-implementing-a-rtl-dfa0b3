// ow_phy: 1-wire slot generator (the timing half of the bus master).
//
// One operation at a time is started with `start` and `op`:
//   OP_RESET  pull the line low for the reset pulse, release, wait for the
//             presence delay, then watch the line for the presence window;
//             `presence` is 1 if any sensor pulled the line low in the window.
//             A recovery time follows so that the next slot starts at least
//             480 us after release.
//   OP_WRITE  write slot for bit `wbit`: write-0 is a long low and a short
//             high, write-1 a short low and a long high.
//   OP_READ   read slot: a short low, release, sample the line at the sample
//             point into `rbit`, then wait out the slot.
// `done` pulses for one clock when the operation ends; `busy` is high from the
// clock after `start` until `done`. `dq_pull` = 1 drives the open-drain line
// low; `dq_in` is the line level, passed through a two-flop synchronizer.
//
// The reset, presence and write timings are the implemented values of the
// reference timing table (see ow_pkg); the read slot timing and the presence
// recovery time are this design's choices. All times scale with CLK_FREQ_HZ,
// which must be a whole number of MHz.
module ow_phy #(
  parameter int unsigned CLK_FREQ_HZ = 10_000_000
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  ow_pkg::ow_op_e op,
  input  logic           wbit,
  output logic           busy,
  output logic           done,
  output logic           rbit,
  output logic           presence,
  output logic           dq_pull,
  input  logic           dq_in
);
  import ow_pkg::*;

  localparam int unsigned C_RSTL  = us2cyc(CLK_FREQ_HZ, T_RSTL_US);
  localparam int unsigned C_PDHW  = us2cyc(CLK_FREQ_HZ, T_PDHW_US);
  localparam int unsigned C_PDW   = us2cyc(CLK_FREQ_HZ, T_PDW_US);
  localparam int unsigned C_PREC  = us2cyc(CLK_FREQ_HZ, T_PREC_US);
  localparam int unsigned C_W0L   = us2cyc(CLK_FREQ_HZ, T_W0L_US);
  localparam int unsigned C_W0H   = us2cyc(CLK_FREQ_HZ, T_W0H_US);
  localparam int unsigned C_W1L   = us2cyc(CLK_FREQ_HZ, T_W1L_US);
  localparam int unsigned C_W1H   = us2cyc(CLK_FREQ_HZ, T_W1H_US);
  localparam int unsigned C_RL    = us2cyc(CLK_FREQ_HZ, T_RL_US);
  localparam int unsigned C_RS    = us2cyc(CLK_FREQ_HZ, T_RS_US);
  localparam int unsigned C_RSLOT = us2cyc(CLK_FREQ_HZ, T_RSLOT_US);

  typedef enum logic [2:0] {
    P_IDLE,    // waiting for start
    P_LOW,     // line pulled low (reset pulse, slot start)
    P_HIGH,    // line released, waiting
    P_PWAIT,   // reset: released, before the presence window
    P_PWIN,    // reset: presence window
    P_PREC     // reset: recovery
  } phase_e;

  phase_e      phase;
  ow_op_e      op_q;
  logic        bit_q;
  logic [31:0] cnt;       // cycles left in the current phase
  logic [31:0] slot_cnt;  // cycles since the start of a read slot
  logic [1:0]  sync_q;
  logic        line;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= 2'b11;
    else     sync_q <= {sync_q[0], dq_in};
  end
  assign line = sync_q[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= P_IDLE;
      op_q     <= OP_RESET;
      bit_q    <= 1'b0;
      cnt      <= '0;
      slot_cnt <= '0;
      done     <= 1'b0;
      rbit     <= 1'b0;
      presence <= 1'b0;
    end else begin
      done     <= 1'b0;
      slot_cnt <= slot_cnt + 1;
      unique case (phase)
        P_IDLE: if (start) begin
          op_q     <= op;
          bit_q    <= wbit;
          slot_cnt <= 32'd1;
          phase    <= P_LOW;
          unique case (op)
            OP_RESET: begin cnt <= C_RSTL - 1; presence <= 1'b0; end
            OP_WRITE: cnt <= (wbit ? C_W1L : C_W0L) - 1;
            default:  cnt <= C_RL - 1;
          endcase
        end
        P_LOW: if (cnt == 0) begin
          unique case (op_q)
            OP_RESET: begin phase <= P_PWAIT; cnt <= C_PDHW - 1; end
            OP_WRITE: begin phase <= P_HIGH;  cnt <= (bit_q ? C_W1H : C_W0H) - 1; end
            default:  begin phase <= P_HIGH;  cnt <= C_RSLOT - C_RL - 1; end
          endcase
        end else cnt <= cnt - 1;
        P_HIGH: begin
          // Read slot: sample the (synchronized) line at the sample point.
          if (op_q == OP_READ && slot_cnt == C_RS) rbit <= line;
          if (cnt == 0) begin phase <= P_IDLE; done <= 1'b1; end
          else cnt <= cnt - 1;
        end
        P_PWAIT: if (cnt == 0) begin phase <= P_PWIN; cnt <= C_PDW - 1; end
                 else cnt <= cnt - 1;
        P_PWIN: begin
          if (!line) presence <= 1'b1;
          if (cnt == 0) begin phase <= P_PREC; cnt <= C_PREC - 1; end
          else cnt <= cnt - 1;
        end
        P_PREC: if (cnt == 0) begin phase <= P_IDLE; done <= 1'b1; end
                else cnt <= cnt - 1;
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign dq_pull = (phase == P_LOW);
  assign busy    = (phase != P_IDLE);

  // A new operation may only be started while the generator is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);

  initial begin
    assert (CLK_FREQ_HZ % 1_000_000 == 0 && CLK_FREQ_HZ >= 1_000_000)
      else $error("ow_phy: CLK_FREQ_HZ must be a whole number of MHz");
  end
endmodule
