// Test of the shifter: every shift amount 0..31 for SLL, SRL and SRA on
// random operands with either sign.
module tb_shifter;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] a = '0, b = '0, y;
  sh_op_e      op = SH_SLL;

  shifter dut (.a_bus(a), .b_bus(b), .sh_op(op), .y);

  initial begin
    for (int rep = 0; rep < 6; rep++)
      for (int k = 0; k < 3; k++)
        for (int s = 0; s < 32; s++) begin
          logic [31:0] e;
          a = $urandom() ^ ((rep % 2) ? 32'h8000_0000 : 32'h0);
          b = {27'($urandom()), 5'(s)};
          op = sh_op_e'(k);
          #1;
          e = '0;
          for (int i = 0; i < 32; i++) begin
            if (k == 0) e[i] = (i >= s) ? a[i - s] : 1'b0;
            else        e[i] = (i + s < 32) ? a[i + s] : ((k == 2) ? a[31] : 1'b0);
          end
          checks++;
          if (y !== e) begin failures++; $display("FAIL op %0d amt %0d: %h expected %h", k, s, y, e); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
