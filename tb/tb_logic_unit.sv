// Test of the logic unit: random operands for each of AND, OR, XOR, NOR.
module tb_logic_unit;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] a = '0, b = '0, y;
  lu_op_e      op = LU_AND;

  logic_unit dut (.a_bus(a), .b_bus(b), .lu_op(op), .y);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [31:0] e;
      a = $urandom(); b = $urandom();
      op = lu_op_e'(i % 4);
      #1;
      e = (i % 4 == 0) ? (a & b) : (i % 4 == 1) ? (a | b) : (i % 4 == 2) ? (a ^ b) : ~(a | b);
      checks++;
      if (y !== e) begin failures++; $display("FAIL op %0d: %h expected %h", i % 4, y, e); end
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
