// ow_sensor_model: behavioural model of a DS18S20-style 1-wire temperature
// sensor, for simulation only (not synthesizable in intent).
//
// It answers a reset pulse (low for 480 us or more) with a presence pulse,
// then takes a ROM command: Match ROM (0x55) followed by 64 code bits selects
// the sensor if the code equals ROM_CODE, any mismatch deselects it until the
// next reset; Skip ROM (0xCC) selects it directly. Function commands: Convert
// T (0x44) starts a conversion lasting CONV_US, during which read slots
// return 0 and afterwards 1; the `temp` input is captured when the conversion
// ends. Read Scratchpad (0xBE) sends the nine scratchpad bytes, LSB first,
// the last being the Dallas CRC-8 of the first eight.
// Write slots are sampled 30 us after the falling edge; a 0 is sent by holding
// the line low for 30 us from the falling edge. Fault hooks for the
// testbenches: `absent` removes the sensor from the bus; a pulse on
// `corrupt` flips one temperature bit in the next scratchpad read-out only.
// `n_frames` counts scratchpad read-outs sent.
module ow_sensor_model #(
  parameter int unsigned CLK_FREQ_HZ = 1_000_000,
  parameter logic [63:0] ROM_CODE    = 64'h0,
  parameter int unsigned CONV_US     = 1000
) (
  input  logic        clk,
  input  logic        line,     // level of the shared wire
  output logic        pull,     // 1 = this sensor pulls the wire low
  input  logic [15:0] temp,
  input  logic        absent,
  input  logic        corrupt,
  output int          n_frames
);
  localparam int unsigned US = CLK_FREQ_HZ / 1_000_000;

  typedef enum logic [2:0] {
    M_IDLE, M_PRES, M_ROMCMD, M_MATCH, M_FCMD, M_CONV, M_TX, M_DEAD
  } mstate_e;

  mstate_e     st;
  logic        line_q;
  int unsigned low_cnt, slot_t, pres_t, conv_t, nbit;
  logic        in_slot;
  logic [7:0]  rx;
  logic [71:0] frame;
  logic [15:0] temp_q;
  logic        tx_zero, corrupt_pend;

  function automatic logic [7:0] crc64(logic [63:0] d);
    logic [7:0] c;
    c = '0;
    for (int i = 0; i < 64; i++) c = ow_pkg::crc8_step(c, d[i]);
    return c;
  endfunction

  function automatic logic [71:0] make_frame(logic [15:0] t, logic flip);
    logic [63:0] body;
    body = {8'h10, 8'h0C, 8'hFF, 8'hFF, 8'h46, 8'h4B, t};  // COUNT_PER_C, COUNT_REMAIN, reserved x2, TL, TH, temp
    if (flip) return {crc64(body), body ^ 64'h1};
    return {crc64(body), body};
  endfunction

  initial begin
    st = M_IDLE; line_q = 1'b1; low_cnt = 0; slot_t = 0; pres_t = 0;
    conv_t = 0; nbit = 0; in_slot = 1'b0; rx = '0; frame = '0;
    temp_q = '0; tx_zero = 1'b0; corrupt_pend = 1'b0; n_frames = 0; pull = 1'b0;
  end

  always @(posedge clk) begin
    line_q <= line;
    if (corrupt) corrupt_pend <= 1'b1;
    if (st == M_CONV && conv_t < CONV_US * US) begin
      conv_t <= conv_t + 1;
      if (conv_t + 1 == CONV_US * US) temp_q <= temp;
    end

    // Reset detection has priority over everything.
    if (!line) low_cnt <= low_cnt + 1;
    if (line && !line_q) begin
      low_cnt <= 0;
      if (low_cnt >= 480 * US && !absent) begin
        st <= M_PRES; pres_t <= 0; in_slot <= 1'b0; pull <= 1'b0;
      end else if (low_cnt >= 480 * US) begin
        st <= M_IDLE; in_slot <= 1'b0; pull <= 1'b0;
      end
    end

    if (st == M_PRES) begin
      pres_t <= pres_t + 1;
      pull   <= (pres_t >= 20 * US && pres_t < 140 * US);
      if (pres_t == 400 * US) begin st <= M_ROMCMD; nbit <= 0; pull <= 1'b0; end
    end else if (st inside {M_ROMCMD, M_MATCH, M_FCMD, M_CONV, M_TX}) begin
      // Slot start: falling edge caused by the master.
      if (line_q && !line && !pull && !in_slot) begin
        in_slot <= 1'b1;
        slot_t  <= 0;
        if (st == M_TX)   begin tx_zero <= !frame[nbit]; pull <= !frame[nbit]; end
        if (st == M_CONV) begin tx_zero <= (conv_t < CONV_US * US); pull <= (conv_t < CONV_US * US); end
      end else if (in_slot) begin
        slot_t <= slot_t + 1;
        if (slot_t + 1 == 30 * US) begin
          pull    <= 1'b0;
          in_slot <= 1'b0;
          unique case (st)
            M_ROMCMD: begin
              rx <= {line, rx[7:1]};
              nbit <= nbit + 1;
              if (nbit == 7) begin
                nbit <= 0;
                if ({line, rx[7:1]} == 8'h55) st <= M_MATCH;
                else if ({line, rx[7:1]} == 8'hCC) st <= M_FCMD;
                else st <= M_DEAD;
              end
            end
            M_MATCH: begin
              if (line != ROM_CODE[nbit]) st <= M_DEAD;
              else if (nbit == 63) begin st <= M_FCMD; nbit <= 0; end
              else nbit <= nbit + 1;
            end
            M_FCMD: begin
              rx <= {line, rx[7:1]};
              nbit <= nbit + 1;
              if (nbit == 7) begin
                nbit <= 0;
                if ({line, rx[7:1]} == 8'h44) begin st <= M_CONV; conv_t <= 0; end
                else if ({line, rx[7:1]} == 8'hBE) begin
                  st <= M_TX;
                  frame <= make_frame(temp_q, corrupt_pend);
                  corrupt_pend <= 1'b0;
                  n_frames <= n_frames + 1;
                end
                else st <= M_DEAD;
              end
            end
            M_TX: begin
              if (nbit == 71) st <= M_DEAD;
              else nbit <= nbit + 1;
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
