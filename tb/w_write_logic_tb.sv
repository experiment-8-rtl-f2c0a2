// w_write_logic_tb: exhaustive check of the W write enable.
// The expected value of each of the 8 input combinations is taken from what
// each control signal means: a literal operation (W_write) always writes W,
// a file operation (Write_en) writes W only when d = 0, and nothing else
// writes W. One combination per clock cycle, checked in the same cycle.
module w_write_logic_tb;
  logic clk = 1'b0;
  logic d, W_write, Write_en, W_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  w_write_logic dut (.d(d), .W_write(W_write), .Write_en(Write_en), .W_we(W_we));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp;
      @(posedge clk);
      {W_write, Write_en, d} = 3'(i);
      if (W_write)       exp = 1'b1;   // MOVLW, ADDLW, ... RETLW
      else if (Write_en) exp = (d == 1'b0);
      else               exp = 1'b0;   // bit operations, jumps
      #1;
      checks++;
      if (W_we !== exp) begin
        failures++;
        $display("FAIL W_write=%b Write_en=%b d=%b: W_we=%b expected %b",
                 W_write, Write_en, d, W_we, exp);
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
