// tb_ow_rom: self-checking test of the constant ROM-code table.
//
// For a table with a duplication mask, every entry must carry the DS18S20
// family code 0x10, a valid CRC byte (checked with a reference written
// independently here), a serial number holding the sensor index, bank 1
// exactly where the mask is set, and no two entries may be equal. The read
// latency of one clock is checked as well.
module tb_ow_rom;
  localparam int unsigned N = 12;
  localparam logic [N-1:0] MASK = 12'b1010_0000_0101;
  logic clk = 0;
  logic [3:0] addr = '0;
  logic [63:0] code;
  logic [63:0] seen [N];
  int checks = 0, failures = 0;

  ow_rom #(.NUM_SENSORS(N), .DUP_MASK(MASK)) dut (.clk, .addr, .code);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference CRC: the 1-wire CRC-8 computed with explicit x^8+x^5+x^4+1 taps.
  function automatic logic [7:0] ref_crc(logic [55:0] d);
    logic [7:0] r = '0;
    for (int i = 0; i < 56; i++) begin
      logic fb;
      fb = d[i] ^ r[0];
      r = {fb, r[7], r[6], r[5], r[4] ^ fb, r[3] ^ fb, r[2], r[1]};
    end
    return r;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); addr = 4'(i);
      @(negedge clk);
      seen[i] = code;
      check($sformatf("family %0d", i), code[7:0] == 8'h10);
      check($sformatf("index %0d", i), code[23:8] == 16'(i));
      check($sformatf("bank %0d", i), code[55:48] == (MASK[i] ? 8'd1 : 8'd0));
      check($sformatf("crc %0d", i), code[63:56] == ref_crc(code[55:0]));
      addr = 4'((i + 5) % N);
      #1;
      check("registered read holds until the edge", code == seen[i]);
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        check($sformatf("unique %0d %0d", i, j), seen[i] != seen[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
