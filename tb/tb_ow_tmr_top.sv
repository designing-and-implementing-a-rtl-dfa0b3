// tb_ow_tmr_top: end-to-end test of the time-redundant controller.
//
// Four sensors (models) share one wire with the three module pins; sensor 2
// is run in duplication mode, so a twin sensor with a bank-1 code also sits
// on the wire and module 2 reads the twin. The testbench changes sensor
// temperatures between the three sampling passes (on the rising edges of
// Rd1 and Rd2) to create each case of the voting table and checks dout, CE
// and the fault nature for every sensor:
//   round 1  s0: only pass 2 differs       -> outvoted, S=0, dout = pass 1
//            s1: all three passes differ   -> CE, transient (SET)
//            s2: twin differs from sensor  -> CE, sensor upset (SEU)
//            s3: only pass 1 differs       -> outvoted, S=1, dout = pass 2
//   round 2  small drift in bits 2..0 only -> no CE anywhere; a corrupted
//            read-out during pass 3 is repaired by the CRC retry.
// It also checks that the passes run strictly one after another (no module
// drives its pin before the previous one is ready) and take equal time, so a
// round lasts three single passes. Each mechanism is counted; one that never
// happens is a failure.
module tb_ow_tmr_top;
  import ow_pkg::*;
  localparam int unsigned F = 1_000_000;
  localparam int unsigned N = 4;
  localparam logic [N-1:0] DUP = 4'b0100;

  logic clk = 0, rst = 1, en = 0;
  logic [1:0] addr = '0;
  logic [15:0] dout;
  logic ce, s;
  fault_nature_e nature;
  logic [2:0] rd, fault, dq_pull;
  logic [N:0] s_pull;                    // s_pull[N] is the twin of sensor 2
  logic line;
  logic [15:0] temp [N+1];
  logic [N:0] corrupt = '0;
  int n_frames [N+1];
  int checks = 0, failures = 0;

  assign line = !((|dq_pull) || (|s_pull));

  ow_tmr_top #(.NUM_SENSORS(N), .CLK_FREQ_HZ(F), .DUP_MASK(DUP)) dut (
    .clk, .rst, .en, .addr, .dout, .ce, .s, .nature, .rd, .fault, .dq_pull,
    .dq_in({3{line}}));

  for (genvar i = 0; i <= N; i++) begin : g_s
    ow_sensor_model #(.CLK_FREQ_HZ(F),
                      .ROM_CODE(i == N ? rom_code(8'd1, 16'd2) : rom_code(8'd0, 16'(i))),
                      .CONV_US(300)) u_s (
      .clk, .line, .pull(s_pull[i]), .temp(temp[i]), .absent(1'b0),
      .corrupt(corrupt[i]), .n_frames(n_frames[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int m_outvote_s0 = 0, m_outvote_s1 = 0, m_ce_set = 0, m_ce_seu = 0;
  int m_drift_ok = 0, m_crc_retry = 0, m_chain = 0;

  // Chaining: a module may only drive its pin after the previous one is ready.
  logic order_bad = 0;
  always @(posedge clk) begin
    if (dq_pull[1] && !rd[0]) order_bad <= 1;
    if (dq_pull[2] && !rd[1]) order_bad <= 1;
  end

  int t_pass [3];
  task automatic run_round(logic [15:0] p1 [N+1], logic [15:0] p2 [N+1],
                           logic [15:0] p3 [N+1], logic corrupt3);
    int t;
    temp = p1;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    t = 0;
    while (!rd[0]) begin @(negedge clk); t++; end
    t_pass[0] = t; temp = p2;
    while (!rd[1]) begin @(negedge clk); t++; end
    t_pass[1] = t - t_pass[0]; temp = p3;
    if (corrupt3) begin corrupt[3] = 1; @(negedge clk); corrupt[3] = 0; t++; end
    while (!rd[2]) begin @(negedge clk); t++; end
    t_pass[2] = t - t_pass[0] - t_pass[1];
    check("passes ran in order", !order_bad);
    if (!order_bad) m_chain++;
    // Without a retry the three passes take the same time.
    if (!corrupt3)
      for (int k = 1; k < 3; k++)
        check($sformatf("pass %0d time %0d vs %0d", k, t_pass[k], t_pass[0]),
            t_pass[k] > t_pass[0] - 200 && t_pass[k] < t_pass[0] + 200);
  endtask

  task automatic read(int a, output logic [15:0] d, output logic c, output fault_nature_e n);
    en = 1; addr = 2'(a);
    @(negedge clk);
    d = dout; c = ce; n = nature;
    en = 0;
  endtask

  function automatic logic [15:0] fld(logic [5:0] f, logic [2:0] lo);
    return {7'b0, f, lo};
  endfunction

  initial begin
    logic [15:0] p1 [N+1], p2 [N+1], p3 [N+1];
    logic [15:0] d;
    logic c;
    fault_nature_e n;
    repeat (3) @(negedge clk);

    // Round 1.
    p1[0] = fld(6'd20, 3'd1); p2[0] = fld(6'd27, 3'd1); p3[0] = fld(6'd20, 3'd1);
    p1[1] = fld(6'd10, 3'd0); p2[1] = fld(6'd12, 3'd0); p3[1] = fld(6'd14, 3'd0);
    p1[2] = fld(6'd30, 3'd5); p2[2] = fld(6'd30, 3'd5); p3[2] = fld(6'd30, 3'd5);
    p1[4] = fld(6'd35, 3'd5); p2[4] = fld(6'd35, 3'd5); p3[4] = fld(6'd35, 3'd5); // twin
    p1[3] = fld(6'd40, 3'd2); p2[3] = fld(6'd44, 3'd2); p3[3] = fld(6'd44, 3'd2);
    run_round(p1, p2, p3, 1'b0);
    check("no skipped sensor", fault == 3'b000);

    read(0, d, c, n);
    check($sformatf("s0 outvoted: d=%h ce=%0b", d, c), d == p1[0] && !c && n == FN_NONE);
    if (d == p1[0] && !c) m_outvote_s0++;
    read(1, d, c, n);
    check("s1 all differ -> CE SET", c && n == FN_SET);
    if (c && n == FN_SET) m_ce_set++;
    read(2, d, c, n);
    check("s2 twin differs -> CE SEU", c && n == FN_SEU);
    if (c && n == FN_SEU) m_ce_seu++;
    read(3, d, c, n);
    check($sformatf("s3 outvoted: d=%h s=%0b", d, s), d == p2[3] && !c && s);
    if (d == p2[3] && !c && s) m_outvote_s1++;

    // Round 2: drift below the compared bits, and a CRC error in pass 3.
    for (int i = 0; i <= N; i++) begin
      logic [5:0] f;
      f = 6'(8 + 7 * i);
      p1[i] = fld(f, 3'd0); p2[i] = fld(f, 3'd3); p3[i] = fld(f, 3'd7);
    end
    p2[N] = p2[2];   // the twin agrees with its sensor
    begin
      int f3;
      f3 = n_frames[3];
      run_round(p1, p2, p3, 1'b1);
      check("sensor 3 read four times (one CRC retry)", n_frames[3] - f3 == 4);
      if (n_frames[3] - f3 == 4) m_crc_retry++;
    end
    check("CRC retry lengthens pass 3 only",
          t_pass[2] > t_pass[0] + 10000 && t_pass[1] < t_pass[0] + 200);
    for (int i = 0; i < N; i++) begin
      read(i, d, c, n);
      check($sformatf("round 2 sensor %0d d=%h ce=%0b", i, d, c), !c && d == p1[i]);
      if (!c) m_drift_ok++;
    end

    check("rd stays high until the next start", rd == 3'b111);
    $display("MECH chain=%0d outvote_s0=%0d outvote_s1=%0d ce_set=%0d ce_seu=%0d drift_ok=%0d crc_retry=%0d",
             m_chain, m_outvote_s0, m_outvote_s1, m_ce_set, m_ce_seu, m_drift_ok, m_crc_retry);
    check("mechanism: sequential passes", m_chain > 0);
    check("mechanism: outvote with S=0", m_outvote_s0 > 0);
    check("mechanism: outvote with S=1", m_outvote_s1 > 0);
    check("mechanism: CE transient", m_ce_set > 0);
    check("mechanism: CE sensor upset", m_ce_seu > 0);
    check("mechanism: drift tolerated", m_drift_ok > 0);
    check("mechanism: CRC retry", m_crc_retry > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
