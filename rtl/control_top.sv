// control_top: the complete control path of the PIC16F84A-style processor.
//
// It joins the ROM-based control unit with the three small circuits that
// combine its outputs with the instruction's d bit and the ALU's zero
// result:
//   control           decodes IR_Data[13:8] into the control word
//   w_write_logic     W_we      = W_write | (Write_en & ~IR_Data[7])
//   data_write_logic  DataWrite = F_write | (Write_en &  IR_Data[7])
//   ir_res_logic      IR_Res    = Reset | IR_clear | (IR_clear_cond & Z)
// The remaining control signals leave the module unchanged, towards the
// blocks of the processor built elsewhere: the ALU (m, L_or_F), the status
// register (C_en, DC_en, Z_en), the program counter and its return stack
// (PC_Sel, Push, Pop), the working register (W_we), the data memory
// (DataWrite) and the program memory's instruction register (IR_Res). Z comes
// back from the ALU.
//
// Everything is combinational: the outputs belong to the instruction
// presently in the instruction register, and take effect at the next clock
// edge of the registers they drive.
module control_top
  import pic_ctrl_pkg::*;
(
  input  logic [13:0] IR_Data,   // instruction register
  input  logic        Reset,     // processor reset, active high
  input  logic        Z,         // ALU result is zero
  output logic        W_we,      // write enable of W
  output logic        DataWrite, // write enable of the data memory
  output logic        IR_Res,    // clear the instruction register
  output alu_op_e     m,         // ALU operation
  output logic        L_or_F,    // ALU operand B: 1 = f, 0 = literal
  output logic        C_en,      // status flag update enables
  output logic        DC_en,
  output logic        Z_en,
  output pc_sel_e     PC_Sel,    // next-PC source
  output logic        Push,      // push return address
  output logic        Pop        // pop return address
);

  logic W_write, Write_en, F_write, IR_clear, IR_clear_cond;

  control u_control (
    .Instr        (IR_Data[13:8]),
    .W_write      (W_write),
    .Write_en     (Write_en),
    .m            (m),
    .L_or_F       (L_or_F),
    .F_write      (F_write),
    .C_en         (C_en),
    .DC_en        (DC_en),
    .Z_en         (Z_en),
    .IR_clear     (IR_clear),
    .IR_clear_cond(IR_clear_cond),
    .PC_Sel       (PC_Sel),
    .Push         (Push),
    .Pop          (Pop)
  );

  w_write_logic u_w_write (
    .d       (IR_Data[7]),
    .W_write (W_write),
    .Write_en(Write_en),
    .W_we    (W_we)
  );

  data_write_logic u_data_write (
    .d        (IR_Data[7]),
    .F_write  (F_write),
    .Write_en (Write_en),
    .DataWrite(DataWrite)
  );

  ir_res_logic u_ir_res (
    .Reset        (Reset),
    .IR_clear     (IR_clear),
    .IR_clear_cond(IR_clear_cond),
    .Z            (Z),
    .IR_Res       (IR_Res)
  );

endmodule
