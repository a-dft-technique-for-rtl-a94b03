// Test of the CDL section model: outputs are 0 while precharging, take the
// applied function DELAY_PS after the phase opens when the footer stays on,
// stay at the precharge value when the footer turns off before the
// evaluation arrives, keep an evaluation that arrived before the footer
// turned off, and a FAULT_PS defect moves the evaluation out of a window
// that a good section meets.
module tb_cdl_section;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic        eval = 1'b0, footer = 1'b1;
  logic [15:0] f = '0, q_good, q_bad;

  cdl_section #(.WIDTH(16), .DELAY_PS(170))                 u_good (.eval, .footer, .f, .q(q_good));
  cdl_section #(.WIDTH(16), .DELAY_PS(170), .FAULT_PS(100)) u_bad  (.eval, .footer, .f, .q(q_bad));

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 40; i++) begin
      logic [15:0] v;
      int unsigned win;
      v = 16'($urandom()) | 16'h1;
      // precharge
      eval = 1'b0; footer = 1'b1; f = v;
      #1000;
      check(q_good, '0, "precharged");
      // evaluate; footer closes after win ps (NORMAL mode: never)
      win = (i % 4 == 0) ? 0 : (i % 4 == 1) ? 230 : (i % 4 == 2) ? 120 : 300;
      eval = 1'b1;
      #100;
      check(q_good, '0, "not yet evaluated at 100 ps");
      if (win != 0) begin
        #(win - 100);
        footer = 1'b0;
      end
      #800;
      case (i % 4)
        0: begin check(q_good, v, "footer on");         check(q_bad, v, "footer on, defect"); end
        1: begin check(q_good, v, "230 ps window");     check(q_bad, '0, "230 ps window, defect"); end
        2: begin check(q_good, '0, "120 ps window");    check(q_bad, '0, "120 ps window, defect"); end
        3: begin check(q_good, v, "300 ps window");     check(q_bad, v, "300 ps window, defect"); end
      endcase
      // a change of f after the footer closed is not seen
      if (win != 0) begin
        f = ~v;
        #400;
        check(q_good, (i % 4 == 2) ? 16'h0 : v, "held after footer off");
      end
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
