// tb_ow_ram: self-checking test of the local RAM and its address mux.
//
// Writes random words through the internal port, reads them back through
// the internal address (ext_en = 0) and the external address (ext_en = 1)
// against a shadow array, checks that writes follow int_addr even while the
// outside owns the read port, the one-clock read latency, and that reset
// clears every word.
module tb_ow_ram;
  localparam int unsigned D = 20, W = 16;
  logic clk = 0, rst = 1, we = 0, ext_en = 0;
  logic [4:0] int_addr = '0, ext_addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  ow_ram #(.DEPTH(D), .WIDTH(W)) dut (.clk, .rst, .we, .int_addr, .wdata,
                                      .ext_en, .ext_addr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < D; i++) shadow[i] = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we       = ($urandom % 2) == 0;
      int_addr = 5'($urandom % D);
      ext_addr = 5'($urandom % D);
      ext_en   = ($urandom % 2) == 0;
      wdata    = W'($urandom);
      begin
        logic [4:0] ra;
        logic [W-1:0] exp;
        ra  = ext_en ? ext_addr : int_addr;
        exp = shadow[ra];                       // read happens before the write lands
        if (we) shadow[int_addr] = wdata;
        @(negedge clk);
        we = 0;
        check($sformatf("read t=%0d addr=%0d got %h exp %h", t, ra, rdata, exp), rdata == exp);
      end
    end
    // Reset clears everything.
    @(negedge clk); rst = 1; @(negedge clk); rst = 0; ext_en = 1;
    for (int i = 0; i < D; i++) begin
      ext_addr = 5'(i);
      @(negedge clk);
      check($sformatf("cleared %0d", i), rdata == '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
