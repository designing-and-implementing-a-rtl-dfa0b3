// ow_master: one regular 1-wire module - the bus master that samples every
// sensor of the network into its local RAM.
//
// After reset (Initialization) the state machine walks the sensor list. For
// each sensor it loads the sensor's 64-bit ROM code from the constant ROM,
// sends a reset pulse and checks for a presence pulse, then addresses the
// sensor with Match ROM + code, starts a temperature conversion (Convert T),
// polls read slots until the sensor reports the conversion finished, sends a
// second reset, Match ROM + code and Read Scratchpad, and receives the nine
// scratchpad bytes through the CRC block. If the CRC is good the first two
// bytes (the temperature register) are written to RAM at the sensor's index
// and the sensor number is increased. When all sensors are sampled the module
// goes Idle and raises `ready`; only `rst` starts a new round.
//
// Retries: a missing presence pulse repeats the reset pulse, a bad CRC repeats
// the addressing and read-out (reset, Match ROM, Read Scratchpad). Both follow
// the state diagram; the diagram loops without limit, whereas here a sensor is
// given MAX_RETRY retries (also spent by a conversion that does not finish
// within CONV_TIMEOUT_US), after which its RAM word keeps the cleared value 0,
// the sticky `fault` output is set and the next sensor is taken. The command
// bytes, the conversion polling and the retry limit are this design's choices.
//
// Interface: `rst` (active high, synchronous) restarts the round and clears
// the RAM. `ext_en`/`ext_addr` give the outside the RAM read port; `dout` is
// valid one clock after the address. `dq_pull` drives the open-drain line low,
// `dq_in` is the line level.
// Timing: per sensor about 2 reset sequences, 160 write slots and 72 read
// slots (about 24.6 ms) plus the conversion time.
module ow_master #(
  parameter int unsigned            NUM_SENSORS     = 32,
  parameter int unsigned            CLK_FREQ_HZ     = 10_000_000,
  parameter logic [NUM_SENSORS-1:0] DUP_MASK        = '0,
  parameter int unsigned            MAX_RETRY       = 3,
  parameter int unsigned            CONV_TIMEOUT_US = 800_000,
  localparam int unsigned           AW = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic                      ready,
  output logic                      fault,
  input  logic                      ext_en,
  input  logic [AW-1:0]             ext_addr,
  output logic [ow_pkg::TEMP_W-1:0] dout,
  output logic                      dq_pull,
  input  logic                      dq_in
);
  import ow_pkg::*;

  localparam int unsigned POLL_MAX  = CONV_TIMEOUT_US / T_RSLOT_US;
  localparam int unsigned RX_BITS   = SCRATCH_BYTES * 8;
  localparam logic [4:0]  SEQ_POLL  = 5'd10;   // wait for the conversion
  localparam logic [4:0]  SEQ_RST2  = 5'd11;   // second reset
  localparam logic [4:0]  SEQ_LAST  = 5'd21;   // Read Scratchpad command

  ow_state_e   state;
  logic [AW:0] idx;          // current sensor (one extra bit for "end")
  logic [63:0] rom_q, code_q;
  logic [4:0]  seq;          // step of the Send phase
  logic [2:0]  bitn;         // bit within the byte being written
  logic [6:0]  rx_cnt;       // scratchpad bits received
  logic [15:0] temp_q;       // temperature register (bytes 0 and 1)
  logic [31:0] poll_cnt;
  logic [$clog2(MAX_RETRY+2)-1:0] retry;
  logic        pending;      // a slot-generator operation is running

  // Slot generator.
  logic   phy_start, phy_busy, phy_done, phy_rbit, phy_pres;
  ow_op_e phy_op;
  logic   phy_wbit;

  ow_phy #(.CLK_FREQ_HZ(CLK_FREQ_HZ)) u_phy (
    .clk, .rst, .start(phy_start), .op(phy_op), .wbit(phy_wbit),
    .busy(phy_busy), .done(phy_done), .rbit(phy_rbit), .presence(phy_pres),
    .dq_pull, .dq_in
  );

  // Constant ROM of sensor codes.
  ow_rom #(.NUM_SENSORS(NUM_SENSORS), .DUP_MASK(DUP_MASK)) u_rom (
    .clk, .addr(idx[AW-1:0]), .code(rom_q)
  );

  // CRC check block.
  logic       crc_clr, crc_en, crc_ok;
  logic [7:0] crc_val;
  ow_crc8 u_crc (
    .clk, .rst, .clr(crc_clr), .en(crc_en), .d(phy_rbit),
    .crc(crc_val), .crc_ok
  );

  // Local RAM.
  logic ram_we, ram_rst;
  ow_ram #(.DEPTH(NUM_SENSORS), .WIDTH(TEMP_W)) u_ram (
    .clk, .rst(ram_rst), .we(ram_we), .int_addr(idx[AW-1:0]), .wdata(temp_q),
    .ext_en, .ext_addr, .rdata(dout)
  );

  // Byte sent at each write step of the Send phase.
  function automatic logic [7:0] tx_byte(logic [4:0] s, logic [63:0] code);
    if (s == 0 || s == 12)        return CMD_MATCH_ROM;
    else if (s >= 1 && s <= 8)    return code[8*(s-1) +: 8];
    else if (s == 9)              return CMD_CONVERT_T;
    else if (s >= 13 && s <= 20)  return code[8*(s-13) +: 8];
    else                          return CMD_READ_SCR;
  endfunction

  // Operation requested from the slot generator in the current state.
  always_comb begin
    phy_op   = OP_WRITE;
    phy_wbit = tx_byte(seq, code_q)[bitn];
    unique case (state)
      ST_RESET: phy_op = OP_RESET;
      ST_RECV:  phy_op = OP_READ;
      ST_SEND:  if (seq == SEQ_POLL) phy_op = OP_READ;
                else if (seq == SEQ_RST2) phy_op = OP_RESET;
      default:  phy_op = OP_WRITE;
    endcase
  end

  assign phy_start = !pending && !phy_busy &&
                     (state == ST_RESET || state == ST_SEND || state == ST_RECV);
  assign crc_en    = (state == ST_RECV) && pending && phy_done;
  assign ram_rst   = rst || (state == ST_INIT);
  assign ram_we    = (state == ST_INC) && (32'(retry) <= MAX_RETRY);

  // A failed attempt: retry, or give up on this sensor.
  logic give_up;
  assign give_up = (32'(retry) == MAX_RETRY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_INIT;
      idx      <= '0;
      code_q   <= '0;
      seq      <= '0;
      bitn     <= '0;
      rx_cnt   <= '0;
      temp_q   <= '0;
      poll_cnt <= '0;
      retry    <= '0;
      pending  <= 1'b0;
      ready    <= 1'b0;
      fault    <= 1'b0;
      crc_clr  <= 1'b1;
    end else begin
      crc_clr <= 1'b0;
      if (phy_start) pending <= 1'b1;
      if (phy_done)  pending <= 1'b0;

      unique case (state)
        ST_INIT: begin
          idx   <= '0;
          ready <= 1'b0;
          state <= ST_EOS;
        end
        ST_EOS: state <= (32'(idx) == NUM_SENSORS) ? ST_IDLE : ST_LOAD;
        ST_LOAD: begin
          code_q <= rom_q;
          retry  <= '0;
          state  <= ST_RESET;
        end
        ST_RESET: if (pending && phy_done) state <= ST_PRES;
        ST_PRES: begin
          seq  <= '0;
          bitn <= '0;
          if (phy_pres) state <= ST_SEND;
          else if (give_up) begin retry <= retry + 1; fault <= 1'b1; state <= ST_INC; end
          else begin retry <= retry + 1; state <= ST_RESET; end
        end
        ST_SEND: if (pending && phy_done) begin
          if (seq == SEQ_POLL) begin
            if (phy_rbit) begin
              seq <= seq + 1;
            end else if (poll_cnt >= POLL_MAX) begin
              retry <= retry + 1;
              if (give_up) begin fault <= 1'b1; state <= ST_INC; end
              else state <= ST_RESET;
            end
            poll_cnt <= poll_cnt + 1;
          end else if (seq == SEQ_RST2) begin
            if (phy_pres) seq <= seq + 1;
            else begin
              retry <= retry + 1;
              if (give_up) begin fault <= 1'b1; state <= ST_INC; end
            end
          end else begin
            bitn <= bitn + 1;
            if (bitn == 3'd7) begin
              poll_cnt <= '0;
              if (seq == SEQ_LAST) begin
                state   <= ST_RECV;
                rx_cnt  <= '0;
                crc_clr <= 1'b1;
              end else begin
                seq <= seq + 1;
              end
            end
          end
        end
        ST_RECV: if (pending && phy_done) begin
          if (rx_cnt < 16) temp_q <= {phy_rbit, temp_q[15:1]};
          rx_cnt <= rx_cnt + 1;
          if (32'(rx_cnt) == RX_BITS - 1) state <= ST_CRC;
        end
        ST_CRC: begin
          if (crc_ok) state <= ST_INC;
          else begin
            retry <= retry + 1;
            if (give_up) begin fault <= 1'b1; state <= ST_INC; end
            else begin seq <= SEQ_RST2; bitn <= '0; state <= ST_SEND; end
          end
        end
        ST_INC: begin
          idx   <= idx + 1;
          state <= ST_EOS;
        end
        ST_IDLE: ready <= 1'b1;
        default: state <= ST_INIT;
      endcase
    end
  end

  a_no_write_when_idle: assert property (@(posedge clk) disable iff (rst)
    ready |-> !ram_we);
endmodule
