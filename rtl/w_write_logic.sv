// w_write_logic: write enable of the working register W.
//
// W is written by every instruction whose control word has W_write set (the
// literal operations, whatever bit 7 of their literal is), and by the
// byte-oriented file operations (Write_en set) whose destination bit d =
// IR_Data[7] is 0:
//     W_we = W_write | (Write_en & ~d)
// Purely combinational. That the enable depends on d, W_write and Write_en
// follows the specification; the formula is this design's reading of the
// meaning it gives each control signal.
module w_write_logic (
  input  logic d,         // IR_Data[7]
  input  logic W_write,
  input  logic Write_en,
  output logic W_we
);

  always_comb W_we = W_write | (Write_en & ~d);

endmodule
