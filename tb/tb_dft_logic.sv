// Test of the DFT logic against its mode table. For each of T/N, CTRL1,
// CTRL2 the three TEST_CLK outputs are watched over several clock periods:
// outputs that are not selected must stay at 1, the selected one must be
// the inverted clock (CLK for sections 1 and 2, /CLK for section 3) delayed
// by 230, 390 or 170 ps. In NORMAL mode the inverter chain must be static
// (disconnected from the clock).
module tb_dft_logic;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic clk = 1'b0, clk_n;
  logic t_n = 1'b0, ctrl1 = 1'b0, ctrl2 = 1'b0;
  logic [2:0] tclk;

  always #2500 clk = ~clk;
  assign clk_n = ~clk;

  dft_logic dut (.clk, .clk_n, .t_n, .ctrl1, .ctrl2,
                 .test_clk1(tclk[0]), .test_clk2(tclk[1]), .test_clk3(tclk[2]));

  // expected footer level at time t (in ps) for the selected section
  function automatic logic expect_level(input int sel, input time t, input int unsigned dly);
    time ts;
    ts = t - dly;                          // clock value dly ago
    if (sel == 2) return ((ts % 5000) >= 2500);    // /CLK inverted = CLK
    else          return !((ts % 5000) >= 2500);   // CLK inverted
  endfunction

  // In NORMAL mode the delay chain is parked: its nodes must not toggle.
  int unsigned chain_toggles = 0;
  always @(dut.tap1 or dut.tap2 or dut.tap3) if (!t_n && $time > 10000) chain_toggles++;

  initial begin
    int unsigned dly [3] = '{230, 390, 170};
    for (int m = 0; m < 5; m++) begin
      @(posedge clk);
      t_n   = (m != 0);
      ctrl1 = (m == 3) || (m == 4);
      ctrl2 = (m == 2) || (m == 4);
      repeat (2) @(posedge clk);
      for (int step = 0; step < 100; step++) begin
        #50;
        for (int o = 0; o < 3; o++) begin
          logic e;
          if (m >= 1 && m <= 3 && o == m - 1) e = expect_level(o, $time, dly[o]);
          else e = 1'b1;
          // the fall/rise instants themselves are not sampled
          if (!(m >= 1 && m <= 3 && o == m - 1) || ((($time - dly[o]) % 2500) != 0)) begin
            checks++;
            if (tclk[o] !== e) begin
              failures++;
              $display("FAIL mode %0d TEST_CLK%0d=%b at %0t expected %b", m, o + 1, tclk[o], $time, e);
            end
          end
        end
      end
    end
    checks++;
    if (chain_toggles != 0) begin
      failures++;
      $display("FAIL delay chain toggled %0d times in NORMAL mode", chain_toggles);
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
