// Test of the decoder unit: every one of the 32 instruction codes is
// applied and the one-hot decoder lines, the CLK=1 controls (available from
// the falling edge after the code was sampled) and the CLK=0 ALU MUX
// selects (available from the next rising edge, held through CLK=0) are
// compared with an independent table of the instruction set.
module tb_decoder_unit;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0;
  logic [4:0]  ad = '0;
  logic [31:0] dec_lines;
  ph1_ctrl_t   ph1;
  ph2_ctrl_t   ph2;

  always #500 clk = ~clk;

  decoder_unit dut (.clk, .ad, .dec_lines, .ph1, .ph2);

  // expected controls, written from the instruction list
  function automatic logic [10:0] expected(input int code);
    logic sub, use_shift, t_n, c1, c2, sa, sl;
    logic [1:0] lu, sh;
    sub = 0; use_shift = 0; t_n = 0; c1 = 0; c2 = 0; sa = 0; sl = 0; lu = 2'd0; sh = 2'd0;
    case (code)
      0:  sa = 1;
      1:  begin sa = 1; sub = 1; end
      2:  begin sl = 1; lu = 2'd0; end
      3:  begin sl = 1; lu = 2'd1; end
      4:  begin sl = 1; lu = 2'd2; end
      5:  begin sl = 1; lu = 2'd3; end
      6:  begin sl = 1; use_shift = 1; sh = 2'd0; end
      7:  begin sl = 1; use_shift = 1; sh = 2'd1; end
      8:  begin sl = 1; use_shift = 1; sh = 2'd2; end
      28: begin sa = 1; t_n = 1; end
      29: begin sa = 1; t_n = 1; c2 = 1; end
      30: begin sa = 1; t_n = 1; c1 = 1; end
      31: begin sa = 1; t_n = 1; c1 = 1; c2 = 1; end
      default: ;
    endcase
    return {sub, lu, sh, use_shift, t_n, c1, c2, sa, sl};
  endfunction

  initial begin
    int order [32];
    for (int i = 0; i < 32; i++) order[i] = (i * 13) % 32;   // every code, mixed order
    @(negedge clk);
    for (int rep = 0; rep < 2; rep++)
      for (int k = 0; k < 32; k++) begin
        logic [10:0] e;
        ad = 5'(order[k]);
        e = expected(order[k]);
        @(posedge clk); #10;
        ad = $urandom();                                  // next code must not leak
        @(negedge clk); #10;
        checks++;
        if (dec_lines !== (32'd1 << order[k])) begin
          failures++; $display("FAIL code %0d lines %h", order[k], dec_lines);
        end
        checks++;
        if ({ph1.sub, ph1.lu_op, ph1.sh_op, ph1.use_shift, ph1.t_n, ph1.ctrl1, ph1.ctrl2} !== e[10:2]) begin
          failures++; $display("FAIL code %0d ph1 %b expected %b", order[k], ph1, e[10:2]);
        end
        ad = 5'(order[(k + 1) % 32]);
        @(posedge clk); #10;
        ad = $urandom();
        @(negedge clk); #10;                              // CLK=0 of the instruction
        checks++;
        if ({ph2.sel_arith, ph2.sel_lu} !== e[1:0]) begin
          failures++; $display("FAIL code %0d ph2 %b expected %b", order[k], ph2, e[1:0]);
        end
        // realign: one code per two cycles in this test
        ad = 5'd9;
        @(posedge clk); #10;
        @(negedge clk); #10;
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
