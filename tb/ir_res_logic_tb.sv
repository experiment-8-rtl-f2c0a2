// ir_res_logic_tb: exhaustive check of the instruction-register clear.
// The 16 input combinations are applied one per clock cycle. The expected
// value says when the next instruction must be discarded: always on reset,
// always for a jump/call/return (IR_clear), and for a skip instruction
// (IR_clear_cond) only when its result is zero.
module ir_res_logic_tb;
  logic clk = 1'b0;
  logic Reset, IR_clear, IR_clear_cond, Z, IR_Res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ir_res_logic dut (.Reset(Reset), .IR_clear(IR_clear), .IR_clear_cond(IR_clear_cond),
                    .Z(Z), .IR_Res(IR_Res));

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic exp;
      @(posedge clk);
      {Reset, IR_clear, IR_clear_cond, Z} = 4'(i);
      if (Reset || IR_clear) exp = 1'b1;
      else if (IR_clear_cond) exp = Z;      // skip taken
      else                    exp = 1'b0;
      #1;
      checks++;
      if (IR_Res !== exp) begin
        failures++;
        $display("FAIL Reset=%b IR_clear=%b IR_clear_cond=%b Z=%b: IR_Res=%b expected %b",
                 Reset, IR_clear, IR_clear_cond, Z, IR_Res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
