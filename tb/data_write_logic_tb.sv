// data_write_logic_tb: exhaustive check of the data-memory write enable.
// The expected value of each of the 8 input combinations is taken from what
// each control signal means: BCF/BSF (F_write) always write f, a file
// operation (Write_en) writes f only when d = 1, and nothing else writes f.
// One combination per clock cycle, checked in the same cycle.
module data_write_logic_tb;
  logic clk = 1'b0;
  logic d, F_write, Write_en, DataWrite;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_write_logic dut (.d(d), .F_write(F_write), .Write_en(Write_en), .DataWrite(DataWrite));

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp;
      @(posedge clk);
      {F_write, Write_en, d} = 3'(i);
      if (F_write)       exp = 1'b1;
      else if (Write_en) exp = (d == 1'b1);
      else               exp = 1'b0;
      #1;
      checks++;
      if (DataWrite !== exp) begin
        failures++;
        $display("FAIL F_write=%b Write_en=%b d=%b: DataWrite=%b expected %b",
                 F_write, Write_en, d, DataWrite, exp);
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
