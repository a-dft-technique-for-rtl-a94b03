// Test of the input data stage: operands sampled at a rising edge appear on
// the buses at the following falling edge and do not change while CLK=1.
module tb_input_data_stage;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0;
  logic [31:0] a_in = '0, b_in = '0, a_bus, b_bus;

  always #500 clk = ~clk;

  input_data_stage dut (.clk, .a_in, .b_in, .a_bus, .b_bus);

  task automatic check(input logic [31:0] ea, input logic [31:0] eb, input string what);
    checks++;
    if (a_bus !== ea || b_bus !== eb) begin
      failures++;
      $display("FAIL %s: bus %h/%h expected %h/%h", what, a_bus, b_bus, ea, eb);
    end
  endtask

  initial begin
    logic [31:0] pa, pb, sa, sb;
    @(negedge clk);
    a_in = $urandom(); b_in = $urandom();
    @(posedge clk);
    pa = a_in; pb = b_in;
    for (int i = 0; i < 100; i++) begin
      #1 a_in = $urandom(); b_in = $urandom();   // sampled at the next rising edge
      sa = a_in; sb = b_in;
      @(negedge clk); #1;
      check(pa, pb, "after falling edge");
      @(posedge clk); #100;
      check(pa, pb, "held while CLK=1");
      pa = sa; pb = sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
