// Test of the LU MUX: selects the logic unit or shifter result while CLK=1
// and holds it through CLK=0 even when its inputs change.
module tb_lu_mux;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0, use_shift = 1'b0;
  logic [31:0] lu_y = '0, sh_y = '0, y;

  always #500 clk = ~clk;

  lu_mux dut (.clk, .use_shift, .lu_y, .sh_y, .y_hold(y));

  initial begin
    for (int i = 0; i < 100; i++) begin
      logic [31:0] e;
      @(posedge clk); #10;
      lu_y = $urandom(); sh_y = $urandom(); use_shift = 1'($urandom());
      e = use_shift ? sh_y : lu_y;
      #10;
      checks++;
      if (y !== e) begin failures++; $display("FAIL open: %h expected %h", y, e); end
      @(negedge clk); #10;
      lu_y = $urandom(); sh_y = $urandom(); use_shift = ~use_shift;
      #100;
      checks++;
      if (y !== e) begin failures++; $display("FAIL hold: %h expected %h", y, e); end
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
