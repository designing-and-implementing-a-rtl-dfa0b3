// tb_ow_tmr_stress: randomized rounds of the time-redundant controller.
//
// Eight sensors, three of them duplicated (so five twins share the wire as
// well). Over four rounds every sensor gets, per pass, a random choice of
// "same value", "drift in the ignored bits 2..0" or "different value", and
// the twins either agree with their sensor or not; random read-outs are
// also corrupted to force CRC retries. After each round every sensor is read
// back and dout, CE and the fault nature are compared with a reference
// written from the voting rules: compare bits 8..3, outvote a single
// disagreeing pass, flag three-way disagreement as a transient and, for a
// duplicated sensor, flag a lone disagreement of pass 2 as a sensor upset.
module tb_ow_tmr_stress;
  import ow_pkg::*;
  localparam int unsigned F = 1_000_000;
  localparam int unsigned N = 8;
  localparam logic [N-1:0] DUP = 8'b1001_0010;
  localparam int unsigned ROUNDS = 4;

  logic clk = 0, rst = 1, en = 0;
  logic [2:0] addr = '0;
  logic [15:0] dout;
  logic ce, s;
  fault_nature_e nature;
  logic [2:0] rd, fault, dq_pull;
  logic [2*N-1:0] s_pull;                 // [N+i] is the twin of sensor i
  logic line;
  logic [15:0] temp [2*N];
  logic [2*N-1:0] corrupt = '0;
  int n_frames [2*N];
  int checks = 0, failures = 0;
  int n_ce = 0, n_outvote = 0, n_clean = 0, n_seu = 0, n_set = 0;

  assign line = !((|dq_pull) || (|s_pull));

  ow_tmr_top #(.NUM_SENSORS(N), .CLK_FREQ_HZ(F), .DUP_MASK(DUP)) dut (
    .clk, .rst, .en, .addr, .dout, .ce, .s, .nature, .rd, .fault, .dq_pull,
    .dq_in({3{line}}));

  for (genvar i = 0; i < 2 * N; i++) begin : g_s
    ow_sensor_model #(.CLK_FREQ_HZ(F),
                      .ROM_CODE(i < N ? rom_code(8'd0, 16'(i)) : rom_code(8'd1, 16'(i - N))),
                      .CONV_US(200)) u_s (
      .clk, .line, .pull(s_pull[i]), .temp(temp[i]), .absent(1'b0),
      .corrupt(corrupt[i]), .n_frames(n_frames[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] vary(logic [15:0] base, int kind);
    if (kind == 0) return base;
    if (kind == 1) return {base[15:3], 3'($urandom)};
    return {base[15:9], base[8:3] + 6'(1 + $urandom % 60), base[2:0]};
  endfunction

  // Values seen by pass k (0..2) for sensor i: module 2 reads the twin of a
  // duplicated sensor.
  logic [15:0] seen [3][N];

  initial begin
    logic [15:0] pv [3][2*N];
    repeat (3) @(negedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < N; i++) begin
        logic [15:0] b;
        b = 16'($urandom);
        for (int k = 0; k < 3; k++) begin
          int kind;
          kind = $urandom % 4;       // 0,1: same or drift; 2,3: different
          pv[k][i] = (k == 0) ? b : vary(b, kind > 2 ? 2 : kind);
          // Twin: agrees with the pass-2 value most of the time.
          pv[k][N+i] = (($urandom % 3) == 0) ? vary(pv[k][i], 2) : pv[k][i];
        end
      end
      for (int k = 0; k < 3; k++)
        for (int i = 0; i < N; i++)
          seen[k][i] = (k == 1 && DUP[i]) ? pv[k][N+i] : pv[k][i];

      for (int j = 0; j < 2 * N; j++) temp[j] = pv[0][j];
      @(negedge clk); rst = 1; @(negedge clk); rst = 0;
      // Corrupt one random read-out in each pass.
      corrupt[$urandom % N] = 1; @(negedge clk); corrupt = '0;
      while (!rd[0]) @(negedge clk);
      for (int j = 0; j < 2 * N; j++) temp[j] = pv[1][j];
      corrupt[$urandom % (2 * N)] = 1; @(negedge clk); corrupt = '0;
      while (!rd[1]) @(negedge clk);
      for (int j = 0; j < 2 * N; j++) temp[j] = pv[2][j];
      corrupt[$urandom % N] = 1; @(negedge clk); corrupt = '0;
      while (!rd[2]) @(negedge clk);
      checks++;
      if (fault != 3'b000) begin failures++; $display("FAIL: sensor skipped"); end

      for (int i = 0; i < N; i++) begin
        logic [5:0] a, b, c;
        logic exp_ce;
        fault_nature_e exp_n;
        logic [15:0] exp_d;
        a = seen[0][i][8:3]; b = seen[1][i][8:3]; c = seen[2][i][8:3];
        exp_ce = 1'b0; exp_n = FN_NONE; exp_d = seen[0][i];
        if (a != b && b != c && a != c) begin exp_ce = 1; exp_n = FN_SET; end
        else if (a == c && b != a && DUP[i]) begin exp_ce = 1; exp_n = FN_SEU; end
        else if (b == c && a != b) exp_d = seen[1][i];
        en = 1; addr = 3'(i);
        @(negedge clk);
        en = 0;
        checks++;
        if (ce != exp_ce || nature != exp_n || (!exp_ce && dout != exp_d)) begin
          failures++;
          $display("FAIL: round %0d sensor %0d: got d=%h ce=%0b n=%0d exp d=%h ce=%0b n=%0d",
                   r, i, dout, ce, nature, exp_d, exp_ce, exp_n);
        end
        if (exp_ce) n_ce++;
        if (exp_n == FN_SET) n_set++;
        if (exp_n == FN_SEU) n_seu++;
        if (!exp_ce && !(a == b && b == c)) n_outvote++;
        if (a == b && b == c) n_clean++;
      end
    end
    $display("MECH clean=%0d outvote=%0d ce=%0d set=%0d seu=%0d", n_clean, n_outvote, n_ce, n_set, n_seu);
    checks++;
    if (n_outvote == 0 || n_ce == 0) begin failures++; $display("FAIL: cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
