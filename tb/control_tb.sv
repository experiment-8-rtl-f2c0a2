// control_tb: self-checking testbench of the control unit.
//
// Applies every one of the 64 opcodes, one per clock cycle, and checks that
// the control word is present in the same cycle (the unit is a
// combinationally read ROM) and equals the word the reference decoder in
// ctrl_ref_pkg derives from the instruction set. It then applies the five
// demonstration opcodes 00 0000, 00 0001, 00 1101, 10 0000 and 11 1111 and
// compares them with the fixed rows of the control-memory table, skipping
// the fields that the table leaves as don't care.
module control_tb;
  import pic_ctrl_pkg::*;
  import ctrl_ref_pkg::*;

  logic       clk = 1'b0;
  logic [5:0] Instr;
  ctrl_word_t got;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  control dut (
    .Instr        (Instr),
    .W_write      (got.W_write),
    .Write_en     (got.Write_en),
    .m            (got.m),
    .L_or_F       (got.L_or_F),
    .F_write      (got.F_write),
    .C_en         (got.C_en),
    .DC_en        (got.DC_en),
    .Z_en         (got.Z_en),
    .IR_clear     (got.IR_clear),
    .IR_clear_cond(got.IR_clear_cond),
    .PC_Sel       (got.PC_Sel),
    .Push         (got.Push),
    .Pop          (got.Pop)
  );

  // Compare the bits selected by care (1 = checked).
  task automatic check_word(input ctrl_word_t exp, input ctrl_word_t care, input string what);
    checks++;
    if (((got ^ exp) & care) != '0) begin
      failures++;
      $display("FAIL %s opcode %b (%s): got %05h expected %05h (care %05h)",
               what, Instr, ref_mnemonic(Instr), got, exp, care);
    end
  endtask

  // Check one row of the control-memory table, bit 16 first; care marks
  // the fields the table fixes (0 = don't care).
  // Field order: W_write Write_en m[3:0] L_or_F F_write C_en DC_en Z_en
  //              IR_clear IR_clear_cond PC_Sel[1:0] Push Pop
  task automatic check_row(input logic [5:0] op, input logic [16:0] word,
                           input logic [16:0] care);
    @(posedge clk);
    Instr = op;
    #1;
    check_word(ctrl_word_t'(word), ctrl_word_t'(care), "table row");
  endtask

  initial begin
    Instr = '0;
    // Exhaustive sweep: one opcode per cycle, checked before the next edge.
    for (int a = 0; a < 64; a++) begin
      @(posedge clk);
      Instr = 6'(a);
      #1;
      check_word(ref_ctrl(Instr), '1, "sweep");
    end
    // Demonstration vectors against the table's own rows.
    check_row(6'b00_0000, 17'b0_1_1101_0_0_0_0_0_0_0_00_0_0, 17'b1_1_1111_0_1_1_1_1_1_1_11_1_1);
    check_row(6'b00_0001, 17'b0_1_1100_0_0_0_0_1_0_0_00_0_0, 17'b1_1_1111_0_1_1_1_1_1_1_11_1_1);
    check_row(6'b00_1101, 17'b0_1_1001_1_0_1_0_0_0_0_00_0_0, 17'b1_1_1111_1_1_1_1_1_1_1_11_1_1);
    check_row(6'b10_0000, 17'b0_0_0000_0_0_0_0_0_1_0_01_1_0, 17'b1_1_0000_0_1_1_1_1_1_1_11_1_1);
    // 11 1111 (ADDLW): W written, literal operand, C, DC and Z updated.
    @(posedge clk);
    Instr = 6'b11_1111;
    #1;
    check_word(ctrl_word_t'({1'b1, 1'b0, ALU_ADD, SEL_LIT, 1'b0, 3'b111, 2'b00, PC_INC, 2'b00}),
               '1, "ADDLW");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
