// Instruction decoder unit of the ALU.
//
// The 5-bit instruction AD[4:0] is captured by an input flip-flop on the
// rising clock edge, expanded by a 5:32 decoder into one-hot lines and held
// by a latch stage that is transparent while CLK=0, the same timing as the
// operand buses. The latched lines are ORed into the control signals:
//   ph1 - used during the CLK=1 phase of the instruction: adder front-end
//         MUX (subtract), logic unit and shifter function, LU MUX select and
//         the DFT mode-select lines T/N, CTRL1, CTRL2;
//   ph2 - ALU MUX selects, used during the following CLK=0 phase. They pass
//         one more latch, transparent while CLK=1, so that they still belong
//         to the same instruction when the operand latches have already
//         opened for the next one.
// A TEST code sets T/N=1, clears every NORMAL mode control and keeps the
// arithmetic unit and its ALU MUX path active, so that the adder result
// reaches ALU_op during a delay test. The decoder is static logic with
// relaxed timing. Opcode values are defined in alu_pkg.
module decoder_unit
  import alu_pkg::*;
(
  input  logic                clk,
  input  logic [AD_WIDTH-1:0] ad,
  output logic [N_CODES-1:0]  dec_lines,  // latched one-hot decoder outputs
  output ph1_ctrl_t           ph1,
  output ph2_ctrl_t           ph2
);
  timeunit 1ps; timeprecision 1ps;

  logic [AD_WIDTH-1:0] ad_ff;
  logic [N_CODES-1:0]  onehot;
  logic                test_any;
  ph2_ctrl_t           ph2_d;

  always_ff @(posedge clk) ad_ff <= ad;

  // 5:32 decoder
  always_comb begin
    for (int unsigned i = 0; i < N_CODES; i++) onehot[i] = (ad_ff == AD_WIDTH'(i));
  end

  phase_latch #(.WIDTH(N_CODES), .TRANSPARENT_HIGH(1'b0)) u_latch_stage (
    .en(clk), .d(onehot), .q(dec_lines)
  );

  // OR plane
  assign test_any = dec_lines[OP_TEST_S1] | dec_lines[OP_TEST_S2]
                  | dec_lines[OP_TEST_S3] | dec_lines[OP_TEST_RSV];

  always_comb begin
    ph1.sub       = dec_lines[OP_SUB];
    ph1.lu_op     = dec_lines[OP_OR]  ? LU_OR  :
                    dec_lines[OP_XOR] ? LU_XOR :
                    dec_lines[OP_NOR] ? LU_NOR : LU_AND;
    ph1.sh_op     = dec_lines[OP_SRL] ? SH_SRL :
                    dec_lines[OP_SRA] ? SH_SRA : SH_SLL;
    ph1.use_shift = dec_lines[OP_SLL] | dec_lines[OP_SRL] | dec_lines[OP_SRA];
    ph1.t_n       = test_any;
    ph1.ctrl1     = dec_lines[OP_TEST_S3] | dec_lines[OP_TEST_RSV];
    ph1.ctrl2     = dec_lines[OP_TEST_S2] | dec_lines[OP_TEST_RSV];

    ph2_d.sel_arith = dec_lines[OP_ADD] | dec_lines[OP_SUB] | test_any;
    ph2_d.sel_lu    = dec_lines[OP_AND] | dec_lines[OP_OR]  | dec_lines[OP_XOR]
                    | dec_lines[OP_NOR] | ph1.use_shift;
  end

  phase_latch #(.WIDTH($bits(ph2_ctrl_t)), .TRANSPARENT_HIGH(1'b1)) u_ph2_latch (
    .en(clk), .d(ph2_d), .q(ph2)
  );

endmodule
