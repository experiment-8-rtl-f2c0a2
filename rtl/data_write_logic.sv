// data_write_logic: write enable (DataWrite) of the data memory.
//
// A file register is written by every instruction whose control word has
// F_write set (BCF, BSF), and by the byte-oriented file operations
// (Write_en set) whose destination bit d = IR_Data[7] is 1:
//     DataWrite = F_write | (Write_en & d)
// Purely combinational. That DataWrite depends on d, F_write and Write_en
// follows the specification; the formula is this design's reading of the
// meaning it gives each control signal.
module data_write_logic (
  input  logic d,         // IR_Data[7]
  input  logic F_write,
  input  logic Write_en,
  output logic DataWrite
);

  always_comb DataWrite = F_write | (Write_en & d);

endmodule
