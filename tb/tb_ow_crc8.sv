// tb_ow_crc8: self-checking test of the bit-serial 1-wire CRC-8 block.
//
// Checks the published 1-wire example (bytes 02 1C B8 01 00 00 00 give CRC
// A2), random 8-byte frames against a reference computed in the
// non-reflected form (polynomial 0x31 on bit-reversed data, result reversed),
// that a frame followed by its own CRC leaves zero (crc_ok), that a one-bit
// error is caught, and that `clr` restarts the register.
module tb_ow_crc8;
  logic clk = 0, rst = 1, clr = 0, en = 0, d = 0;
  logic [7:0] crc;
  logic crc_ok;
  int checks = 0, failures = 0;

  ow_crc8 dut (.clk, .rst, .clr, .en, .d, .crc, .crc_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rev8(logic [7:0] x);
    for (int i = 0; i < 8; i++) rev8[i] = x[7-i];
  endfunction

  // Reference: MSB-first CRC with polynomial 0x31 over bit-reversed bytes.
  function automatic logic [7:0] ref_crc(logic [7:0] bytes [], int n);
    logic [7:0] c = 8'h00;
    for (int b = 0; b < n; b++) begin
      logic [7:0] x;
      x = rev8(bytes[b]);
      for (int i = 7; i >= 0; i--) begin
        logic top;
        top = c[7] ^ x[i];
        c = {c[6:0], 1'b0} ^ (top ? 8'h31 : 8'h00);
      end
    end
    return rev8(c);
  endfunction

  task automatic send_byte(logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); en = 1; d = b[i];
    end
    @(negedge clk); en = 0;
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] fr [];
    logic [7:0] exp;
    repeat (2) @(negedge clk);
    rst = 0;
    // Published example.
    fr = new[7];
    fr = '{8'h02, 8'h1C, 8'hB8, 8'h01, 8'h00, 8'h00, 8'h00};
    foreach (fr[i]) send_byte(fr[i]);
    check("known vector A2", crc == 8'hA2);
    check("reference agrees on known vector", ref_crc(fr, 7) == 8'hA2);
    send_byte(8'hA2);
    check("residue zero after CRC byte", crc_ok);

    for (int t = 0; t < 200; t++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      check("clr clears", crc == 8'h00);
      fr = new[8];
      foreach (fr[i]) fr[i] = 8'($urandom);
      foreach (fr[i]) send_byte(fr[i]);
      exp = ref_crc(fr, 8);
      check($sformatf("random frame %0d crc %h exp %h", t, crc, exp), crc == exp);
      if ((t % 2) == 0) begin
        send_byte(exp);
        check("good frame residue zero", crc_ok);
      end else begin
        send_byte(exp ^ (8'h01 << (t % 8)));
        check("bad frame detected", !crc_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
