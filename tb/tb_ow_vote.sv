// tb_ow_vote: self-checking test of the compare & vote block.
//
// Builds random triples of words for every pattern of the three equality
// results and every duplication mode and checks S, CE and the fault nature
// against the voting truth table (written out here as constants). Words are
// made equal or different only in bits 8..3, and noise is added to the other
// bits to check that those are ignored.
module tb_ow_vote;
  import ow_pkg::*;
  logic [15:0] d1, d2, d3;
  logic dup, s, ce;
  fault_nature_e nature;
  int checks = 0, failures = 0;

  ow_vote dut (.d1, .d2, .d3, .dup, .s, .ce, .nature);

  // Expected {CE, S, nature} per (d3=d2, d3=d1, d2=d1) pattern.
  typedef struct packed { logic ce; logic s; fault_nature_e fn; } exp_t;
  exp_t tab_plain [8];
  exp_t tab_dup [8];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] with_field(logic [5:0] f);
    logic [15:0] w;
    w = 16'($urandom);
    w[8:3] = f;
    return w;
  endfunction

  initial begin
    tab_plain = '{'{1,0,FN_SET}, '{0,0,FN_NONE}, '{0,0,FN_NONE}, '{1,0,FN_FPGA_SENSOR},
                  '{0,1,FN_NONE}, '{1,0,FN_FPGA_SENSOR}, '{1,0,FN_FPGA_SENSOR}, '{0,0,FN_NONE}};
    tab_dup   = '{'{1,0,FN_SET}, '{0,0,FN_NONE}, '{1,0,FN_SEU}, '{1,0,FN_FPGA_SENSOR},
                  '{0,1,FN_NONE}, '{1,0,FN_FPGA_SENSOR}, '{1,0,FN_FPGA_SENSOR}, '{0,0,FN_NONE}};
    // Realisable patterns: 000, 001, 010, 100, 111 (equality is transitive).
    for (int t = 0; t < 2000; t++) begin
      int pat;
      logic [5:0] a, b, c;
      exp_t e;
      a = 6'($urandom); b = a + 6'd1 + 6'($urandom % 30); c = b + 6'd1 + 6'($urandom % 30);
      if (c == a) c = c + 1;
      pat = t % 5;
      dup = ((t / 5) % 2) == 1;
      unique case (pat)
        0: begin d1 = with_field(a); d2 = with_field(b); d3 = with_field(c); end  // 000
        1: begin d1 = with_field(a); d2 = with_field(a); d3 = with_field(c); end  // 001
        2: begin d1 = with_field(a); d2 = with_field(b); d3 = with_field(a); end  // 010
        3: begin d1 = with_field(a); d2 = with_field(b); d3 = with_field(b); end  // 100
        default: begin d1 = with_field(a); d2 = with_field(a); d3 = with_field(a); end // 111
      endcase
      #1;
      begin
        int idx;
        idx = {(d3[8:3] == d2[8:3]), (d3[8:3] == d1[8:3]), (d2[8:3] == d1[8:3])};
        e = dup ? tab_dup[idx] : tab_plain[idx];
        checks++;
        if ({ce, s, nature} != e) begin
          failures++;
          $display("FAIL: pat=%0d dup=%0b got ce=%0b s=%0b n=%0d", idx, dup, ce, s, nature);
        end
        // The selected word must be one that belongs to the majority.
        if (!ce) begin
          checks++;
          if ((s ? d2[8:3] : d1[8:3]) != (idx == 3'b100 ? d3[8:3] : d1[8:3])) begin
            failures++; $display("FAIL: majority not selected");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
