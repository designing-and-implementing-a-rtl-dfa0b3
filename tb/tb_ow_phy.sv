// tb_ow_phy: self-checking test of the 1-wire slot generator.
//
// Runs at 2 MHz so that every microsecond is two clocks. For each operation
// it measures how long the line is pulled low and how long the operation
// takes, and compares with the slot timing (reset 560 us low and 1040 us in
// all; write-0 73 us low of 97 us; write-1 12 us low of 96 us; read 2 us low
// of 97 us). A small slave model pulls the line low: a presence pulse inside
// the window must be seen, one after the window or none at all must not; in
// read slots a 0 held for 30 us must be read as 0, a released line as 1.
module tb_ow_phy;
  import ow_pkg::*;
  localparam int unsigned F  = 2_000_000;
  localparam int unsigned US = 2;

  logic clk = 0, rst = 1, start = 0, wbit = 0;
  ow_op_e op = OP_RESET;
  logic busy, done, rbit, presence, dq_pull;
  logic slave_pull = 0;
  logic line;
  int checks = 0, failures = 0;

  assign line = !(dq_pull || slave_pull);

  ow_phy #(.CLK_FREQ_HZ(F)) dut (.clk, .rst, .start, .op, .wbit, .busy, .done,
                                 .rbit, .presence, .dq_pull, .dq_in(line));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Slave behaviour for the running operation: 0 = none, 1 = presence in the
  // window, 2 = presence too late, 3 = read-0 answer.
  int slave_mode = 0;
  int t_rel = -1;      // clocks since the master released the line
  int t_fall = -1;     // clocks since the master's falling edge
  logic pull_q = 0;
  always @(posedge clk) begin
    pull_q <= dq_pull;
    if (dq_pull && !pull_q) t_fall <= 0; else if (t_fall >= 0) t_fall <= t_fall + 1;
    if (!dq_pull && pull_q) t_rel <= 0;  else if (t_rel >= 0)  t_rel <= t_rel + 1;
    unique case (slave_mode)
      1: slave_pull <= (t_rel >= 20*US && t_rel < 140*US);
      2: slave_pull <= (t_rel >= 160*US && t_rel < 280*US);
      3: slave_pull <= (t_fall >= 0 && t_fall < 30*US);
      default: slave_pull <= 1'b0;
    endcase
  end

  task automatic run(ow_op_e o, logic b, int mode, output int low_cyc, output int total_cyc);
    slave_mode = mode;
    t_rel = -1; t_fall = -1;
    @(negedge clk); op = o; wbit = b; start = 1;
    @(negedge clk); start = 0;
    low_cyc = 0; total_cyc = 0;
    while (!done) begin
      if (dq_pull) low_cyc++;
      total_cyc++;
      @(negedge clk);
    end
    slave_mode = 0;
    @(negedge clk);
  endtask

  initial begin
    int lo, tot;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("idle after reset", !busy && !dq_pull);

    run(OP_RESET, 0, 1, lo, tot);
    check($sformatf("reset low %0d", lo), lo == 560*US);
    check($sformatf("reset total %0d", tot), tot == 1040*US);
    check("presence seen", presence);

    run(OP_RESET, 0, 0, lo, tot);
    check("no presence without slave", !presence);

    run(OP_RESET, 0, 2, lo, tot);
    check("late pulse is not a presence", !presence);

    run(OP_WRITE, 0, 0, lo, tot);
    check($sformatf("write0 low %0d", lo), lo == 73*US);
    check($sformatf("write0 slot %0d", tot), tot == 97*US);

    run(OP_WRITE, 1, 0, lo, tot);
    check($sformatf("write1 low %0d", lo), lo == 12*US);
    check($sformatf("write1 slot %0d", tot), tot == 96*US);

    run(OP_READ, 0, 3, lo, tot);
    check($sformatf("read low %0d", lo), lo == 2*US);
    check($sformatf("read slot %0d", tot), tot == 97*US);
    check("read 0", rbit == 1'b0);

    run(OP_READ, 0, 0, lo, tot);
    check("read 1", rbit == 1'b1);

    for (int i = 0; i < 20; i++) begin
      logic b;
      b = 1'($urandom);
      run(OP_READ, 0, b ? 0 : 3, lo, tot);
      check("random read bit", rbit == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
