// ir_res_logic: clear of the instruction register (IR_Res) in the program
// memory.
//
// The instruction register is cleared, turning the instruction fetched
// behind the current one into NOP (opcode 0), on processor reset, after
// every jump, call or return (IR_clear), and after a skip instruction
// (IR_clear_cond) whose result is zero (Z):
//     IR_Res = Reset | IR_clear | (IR_clear_cond & Z)
// Z is the zero indication of the result the ALU produces in the current
// cycle; the skip instructions do not update the status register's Z bit,
// so the flag register itself could not serve. Reset is active high.
// Purely combinational; the clear takes effect at the instruction
// register's next clock edge, which gives jumps and taken skips their
// second cycle. The four inputs follow the specification; the formula is this
// design's own.
module ir_res_logic (
  input  logic Reset,
  input  logic IR_clear,
  input  logic IR_clear_cond,
  input  logic Z,
  output logic IR_Res
);

  always_comb IR_Res = Reset | IR_clear | (IR_clear_cond & Z);

endmodule
