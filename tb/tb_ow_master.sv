// tb_ow_master: end-to-end test of one regular 1-wire module on a simulated
// network of four sensors (behavioural models on an open-drain wire).
//
// Round 1: every sensor holds a random temperature; after `ready` the RAM,
// read through the external port, must hold exactly those words, and the
// round time must match the slot count worked out here (two reset
// sequences, 160 write slots of 96/97 us, 72 read slots and the conversion
// polling per sensor). Round 2: one sensor corrupts its next read-out, the
// CRC must catch it and the module must read that sensor again. Round 3: one
// sensor is absent; the module must retry the reset, give up after
// MAX_RETRY retries, flag `fault`, leave its word at 0 and still read the
// other sensors.
module tb_ow_master;
  import ow_pkg::*;
  localparam int unsigned F = 1_000_000;     // 1 clock = 1 us
  localparam int unsigned N = 4;
  localparam int unsigned CONV = 500;
  localparam int unsigned RETRY = 2;

  logic clk = 0, rst = 1, ext_en = 0;
  logic [1:0] ext_addr = '0;
  logic ready, fault, m_pull;
  logic [15:0] dout;
  logic [N-1:0] s_pull;
  logic line;
  logic [15:0] temp [N];
  logic [N-1:0] absent = '0, corrupt = '0;
  int n_frames [N];
  int checks = 0, failures = 0;
  int n_crc_retry = 0, n_pres_retry = 0, n_giveup = 0;

  assign line = !(m_pull || (|s_pull));

  ow_master #(.NUM_SENSORS(N), .CLK_FREQ_HZ(F), .MAX_RETRY(RETRY)) dut (
    .clk, .rst, .ready, .fault, .ext_en, .ext_addr, .dout,
    .dq_pull(m_pull), .dq_in(line));

  for (genvar i = 0; i < N; i++) begin : g_s
    ow_sensor_model #(.CLK_FREQ_HZ(F), .ROM_CODE(rom_code(8'd0, 16'(i))), .CONV_US(CONV)) u_s (
      .clk, .line, .pull(s_pull[i]), .temp(temp[i]), .absent(absent[i]),
      .corrupt(corrupt[i]), .n_frames(n_frames[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Slot count of one sensor's transaction, polling excluded.
  function automatic int sensor_us(int i);
    logic [63:0] c;
    logic [7:0] bytes [21];
    int t;
    c = rom_code(8'd0, 16'(i));
    t = 2 * (T_RSTL_US + T_PDHW_US + T_PDW_US + T_PREC_US) + 72 * T_RSLOT_US;
    bytes[0] = 8'h55; bytes[9] = 8'h44; bytes[10] = 8'h55; bytes[19] = 8'hBE;
    for (int k = 0; k < 8; k++) begin bytes[1+k] = c[8*k +: 8]; bytes[11+k] = c[8*k +: 8]; end
    for (int k = 0; k < 20; k++)
      for (int b = 0; b < 8; b++) t += bytes[k][b] ? 96 : 97;
    return t;
  endfunction

  task automatic do_round(output int cycles);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    cycles = 0;
    while (!ready) begin @(negedge clk); cycles++; end
  endtask

  task automatic read_back(int skip);
    ext_en = 1;
    for (int i = 0; i < N; i++) begin
      ext_addr = 2'(i);
      @(negedge clk);
      if (i == skip) check($sformatf("skipped sensor %0d reads 0 (got %h)", i, dout), dout == 16'h0);
      else check($sformatf("sensor %0d got %h exp %h", i, dout, temp[i]), dout == temp[i]);
    end
    ext_en = 0;
  endtask

  // Count reset pulses on the wire (low for 480 us or more).
  int n_resets = 0, low_t = 0;
  always @(posedge clk) begin
    if (!line) low_t <= low_t + 1;
    else begin
      if (low_t >= 480) n_resets <= n_resets + 1;
      low_t <= 0;
    end
  end

  function automatic int frames_total();
    int t = 0;
    for (int i = 0; i < N; i++) t += n_frames[i];
    return t;
  endfunction

  initial begin
    int cyc, lo, hi, f0, r0, ft0;
    for (int i = 0; i < N; i++) temp[i] = 16'($urandom);
    repeat (3) @(negedge clk);

    // Round 1: clean.
    r0 = n_resets; ft0 = frames_total();
    do_round(cyc);
    check($sformatf("round 1: %0d reset pulses", n_resets - r0), n_resets - r0 == 2 * N);
    check("round 1: one read-out per sensor", frames_total() - ft0 == N);
    lo = 0;
    // Polling: the conversion starts 30 us into the last slot of Convert T
    // (a 97 us write-0 slot), so ceil((CONV - 67) / 97) slots read 0, one reads 1.
    for (int i = 0; i < N; i++)
      lo += sensor_us(i) + ((CONV - 67 + 96) / T_RSLOT_US + 1) * T_RSLOT_US;
    // The controller spends two clocks between slot operations (240 per
    // sensor) and a few clocks per state change.
    lo += N * 2 * 240;
    hi = lo + N * 40;
    check($sformatf("round time %0d us within [%0d,%0d]", cyc, lo, hi), cyc >= lo && cyc <= hi);
    check("no fault on a clean round", !fault);
    read_back(-1);
    check("ready stays high in Idle", ready);

    // Round 2: a corrupted read-out of sensor 2 is caught by the CRC.
    for (int i = 0; i < N; i++) temp[i] = 16'($urandom);
    f0 = n_frames[2];
    corrupt[2] = 1; @(negedge clk); corrupt[2] = 0;
    r0 = n_resets;
    do_round(cyc);
    check("CRC retry read sensor 2 twice", n_frames[2] - f0 == 2);
    check("CRC retry costs one extra reset", n_resets - r0 == 2 * N + 1);
    if (n_frames[2] - f0 == 2) n_crc_retry++;
    check("no fault after a recovered CRC error", !fault);
    read_back(-1);

    // Round 3: sensor 1 missing.
    for (int i = 0; i < N; i++) temp[i] = 16'($urandom);
    absent[1] = 1;
    r0 = n_resets;
    do_round(cyc);
    check("fault flagged for a missing sensor", fault);
    // Sensor 1 reads as all ones: first attempt plus RETRY re-reads.
    check($sformatf("round 3: %0d reset pulses", n_resets - r0), n_resets - r0 == 2 * (N - 1) + 2 + RETRY);
    if (fault) n_crc_retry += RETRY + 1;
    read_back(1);
    absent[1] = 0;
    n_giveup = fault ? 1 : 0;

    // Round 4: no sensor answers at all, so every presence check fails.
    absent = '1;
    r0 = n_resets;
    do_round(cyc);
    check("fault flagged with a dead network", fault);
    check($sformatf("round 4: %0d reset pulses", n_resets - r0), n_resets - r0 == N * (RETRY + 1));
    n_pres_retry = n_resets - r0;
    absent = '0;

    // Round 2 costs one CRC retry; the absent sensor of round 3 answers
    // nothing, reads as all ones and fails the CRC RETRY+1 times.
    check($sformatf("CRC retries %0d", n_crc_retry), n_crc_retry == 1 + RETRY + 1);
    check($sformatf("presence retries %0d", n_pres_retry), n_pres_retry == N * (RETRY + 1));
    $display("MECH crc_retry=%0d presence_retry=%0d give_up=%0d", n_crc_retry, n_pres_retry, n_giveup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
