// Test of the phase latch in both polarities: the output follows the input
// while the latch is open and holds the value present when it closed.
module tb_phase_latch;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic        en = 1'b0;
  logic [31:0] d = '0, q_hi, q_lo;

  phase_latch #(.WIDTH(32), .TRANSPARENT_HIGH(1'b1)) u_hi (.en, .d, .q(q_hi));
  phase_latch #(.WIDTH(32), .TRANSPARENT_HIGH(1'b0)) u_lo (.en, .d, .q(q_lo));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] held_hi, held_lo;
    for (int i = 0; i < 50; i++) begin
      en = 1'b1;
      d = $urandom(); #10;
      check(q_hi, d, "high latch open");
      held_hi = d;
      en = 1'b0; #1;
      d = $urandom(); #10;
      check(q_hi, held_hi, "high latch closed");
      check(q_lo, d, "low latch open");
      held_lo = d;
      en = 1'b1; #1;
      d = $urandom(); #10;
      check(q_lo, held_lo, "low latch closed");
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
