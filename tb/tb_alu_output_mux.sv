// Test of the adder output stage and ALU MUX (test section 3): during
// CLK=0 the result must become p ^ c (sel_arith), the LU value (sel_lu) or
// zero (no select) 110 ps after the falling edge, must be zero again while
// CLK=1, and a footer that closes 60 ps after the falling edge leaves it
// at zero while one closing at 170 ps does not.
module tb_alu_output_mux;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0, clk_n, tclk3 = 1'b1;
  logic [31:0] p = '0, c = '0, lu = '0, result;
  ph2_ctrl_t   ph2 = '0;
  int unsigned win = 0;

  always #2500 clk = ~clk;
  assign clk_n = ~clk;

  alu_output_mux dut (.clk_n, .test_clk3(tclk3), .ph2, .p_hold(p), .c_hold(c),
                      .lu_hold(lu), .result);

  always @(negedge clk) if (win != 0) tclk3 <= #(win) 1'b0;
  always @(posedge clk) tclk3 <= 1'b1;

  initial begin
    for (int i = 0; i < 120; i++) begin
      logic [31:0] e;
      int sel;
      win = (i < 80) ? 0 : (i < 100) ? 170 : 60;
      @(posedge clk); #10;
      checks++;
      if (result !== '0) begin failures++; $display("FAIL not precharged"); end
      p = $urandom(); c = $urandom(); lu = $urandom();
      sel = i % 3;
      ph2.sel_arith = (sel == 0);
      ph2.sel_lu    = (sel == 1);
      e = (sel == 0) ? (p ^ c) : (sel == 1) ? lu : '0;
      if (win == 60) e = '0;
      @(negedge clk); #100;
      checks++;
      if (result !== '0) begin failures++; $display("FAIL evaluated before 110 ps"); end
      #100;
      checks++;
      if (result !== e) begin failures++; $display("FAIL sel %0d win %0d: %h expected %h", sel, win, result, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
