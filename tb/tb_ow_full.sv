// tb_ow_full: one complete round of the time-redundant controller at its
// default size - 32 sensors, 10 MHz clock, no sensor duplication.
//
// Thirty-two sensor models share the wire. Their conversion time is set to
// 10 ms so that one sensor takes about 35 ms to sample, the per-sensor
// sampling time reported for the real network. Sensor 5 reads a different
// value during the second pass only. After Rd3 every sensor is read through
// the voter: all must give their temperature without a critical error, and
// sensor 5 must be outvoted. The time of each pass is checked to be 32
// sensors at 34..36 ms each, and the three passes to take the same time.
module tb_ow_full;
  import ow_pkg::*;
  localparam int unsigned F = 10_000_000;
  localparam int unsigned N = 32;

  logic clk = 0, rst = 1, en = 0;
  logic [4:0] addr = '0;
  logic [15:0] dout;
  logic ce, s;
  fault_nature_e nature;
  logic [2:0] rd, fault, dq_pull;
  logic [N-1:0] s_pull;
  logic line;
  logic [15:0] temp [N];
  logic [15:0] base [N];
  int n_frames [N];
  int checks = 0, failures = 0;

  assign line = !((|dq_pull) || (|s_pull));

  ow_tmr_top dut (.clk, .rst, .en, .addr, .dout, .ce, .s, .nature, .rd, .fault,
                  .dq_pull, .dq_in({3{line}}));

  for (genvar i = 0; i < N; i++) begin : g_s
    ow_sensor_model #(.CLK_FREQ_HZ(F), .ROM_CODE(rom_code(8'd0, 16'(i))),
                      .CONV_US(10_000)) u_s (
      .clk, .line, .pull(s_pull[i]), .temp(temp[i]), .absent(1'b0),
      .corrupt(1'b0), .n_frames(n_frames[i]));
  end

  always #50 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint t, t_pass [3];
    int outvoted = 0;
    for (int i = 0; i < N; i++) begin
      base[i] = 16'(50 + 3 * i);                 // 25 C + 1.5 C per sensor, 0.5 C units
      temp[i] = base[i];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    while (!rd[0]) begin @(negedge clk); t++; end
    t_pass[0] = t;
    temp[5] = base[5] + 16'h0020;               // pass 2 sees sensor 5 16 C off
    while (!rd[1]) begin @(negedge clk); t++; end
    t_pass[1] = t - t_pass[0];
    temp[5] = base[5];
    while (!rd[2]) begin @(negedge clk); t++; end
    t_pass[2] = t - t_pass[0] - t_pass[1];

    for (int k = 0; k < 3; k++) begin
      $display("pass %0d: %0d clocks = %0d us per sensor", k + 1, t_pass[k], t_pass[k] / 10 / N);
      check($sformatf("pass %0d per-sensor time", k + 1),
            t_pass[k] / 10 / N >= 34_000 && t_pass[k] / 10 / N <= 36_000);
    end
    check("passes equal", t_pass[1] - t_pass[0] < 1000 && t_pass[0] - t_pass[1] < 1000);
    check("no sensor skipped", fault == 3'b000);

    for (int i = 0; i < N; i++) begin
      en = 1; addr = 5'(i);
      @(negedge clk);
      check($sformatf("sensor %0d d=%h exp %h ce=%0b", i, dout, base[i], ce), dout == base[i] && !ce);
      if (i == 5 && !ce && dout == base[i]) outvoted++;
    end
    en = 0;
    check("sensor 5 outvoted", outvoted == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
