// control: ROM-based control unit of the PIC16F84A-style processor.
//
// The six most significant bits of the instruction held in the instruction
// register, IR_Data[13:8], address a control memory of 64 words of 17 bits.
// Each word holds every control signal the instruction needs; the module
// splits it into the named outputs. Bits IR_Data[7:0] (the d bit, the file
// address, the bit number or the literal) never reach this module: the
// d-dependent write enables are formed outside it (w_write_logic,
// data_write_logic) and the skip/flush decision in ir_res_logic.
//
// The memory is a constant array, CTRL_ROM, holding the table below and
// read asynchronously, so the outputs follow Instr within the same cycle; all
// instructions are decoded in the cycle they execute. The 64 x 17 size, the
// address, the port list and the meaning of each signal follow the
// specification; the ALU codes (see pic_ctrl_pkg), the PC_Sel code 10 for
// returns, and the values chosen where the table leaves a field as don't
// care (0, with m = pass W and L_or_F = 1 for file operations) are this
// design's own.
module control
  import pic_ctrl_pkg::*;
#(
  parameter int unsigned DEPTH    = CTRL_DEPTH,
  parameter int unsigned WIDTH    = CTRL_W
) (
  input  logic [5:0] Instr,          // IR_Data[13:8]
  output logic       W_write,        // always writes W
  output logic       Write_en,       // writes W or f as d says
  output alu_op_e    m,              // ALU operation
  output logic       L_or_F,         // ALU operand B: 1 = f, 0 = literal
  output logic       F_write,        // always writes f
  output logic       C_en,
  output logic       DC_en,
  output logic       Z_en,
  output logic       IR_clear,       // jumps, calls, returns
  output logic       IR_clear_cond,  // conditional skips
  output pc_sel_e    PC_Sel,
  output logic       Push,
  output logic       Pop
);

  // Control memory contents, address IR_Data[13:8] = index. Fields, bit 16
  // first: W_write Write_en m[3:0] L_or_F F_write C_en DC_en Z_en IR_clear
  // IR_clear_cond PC_Sel[1:0] Push Pop.
  localparam logic [WIDTH-1:0] CTRL_ROM [DEPTH] = '{
    17'b0_1_1101_1_0_0_0_0_0_0_00_0_0,  // 00 0000 MOVWF/NOP
    17'b0_1_1100_1_0_0_0_1_0_0_00_0_0,  // 00 0001 CLRF/CLRW
    17'b0_1_0001_1_0_1_1_1_0_0_00_0_0,  // 00 0010 SUBWF
    17'b0_1_0111_1_0_0_0_1_0_0_00_0_0,  // 00 0011 DECF
    17'b0_1_0011_1_0_0_0_1_0_0_00_0_0,  // 00 0100 IORWF
    17'b0_1_0010_1_0_0_0_1_0_0_00_0_0,  // 00 0101 ANDWF
    17'b0_1_0100_1_0_0_0_1_0_0_00_0_0,  // 00 0110 XORWF
    17'b0_1_0000_1_0_1_1_1_0_0_00_0_0,  // 00 0111 ADDWF
    17'b0_1_1000_1_0_0_0_1_0_0_00_0_0,  // 00 1000 MOVF
    17'b0_1_0101_1_0_0_0_1_0_0_00_0_0,  // 00 1001 COMF
    17'b0_1_0110_1_0_0_0_1_0_0_00_0_0,  // 00 1010 INCF
    17'b0_1_0111_1_0_0_0_0_0_1_00_0_0,  // 00 1011 DECFSZ
    17'b0_1_1010_1_0_1_0_0_0_0_00_0_0,  // 00 1100 RRF
    17'b0_1_1001_1_0_1_0_0_0_0_00_0_0,  // 00 1101 RLF
    17'b0_1_1011_1_0_0_0_0_0_0_00_0_0,  // 00 1110 SWAPF
    17'b0_1_0110_1_0_0_0_0_0_1_00_0_0,  // 00 1111 INCFSZ
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0000 BCF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0001 BCF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0010 BCF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0011 BCF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0100 BSF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0101 BSF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0110 BSF
    17'b0_0_1110_1_1_0_0_0_0_0_00_0_0,  // 01 0111 BSF
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1000 BTFSC
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1001 BTFSC
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1010 BTFSC
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1011 BTFSC
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1100 BTFSS
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1101 BTFSS
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1110 BTFSS
    17'b0_0_1111_1_0_0_0_0_0_1_00_0_0,  // 01 1111 BTFSS
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0000 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0001 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0010 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0011 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0100 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0101 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0110 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_1_0,  // 10 0111 CALL
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1000 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1001 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1010 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1011 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1100 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1101 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1110 GOTO
    17'b0_0_1101_0_0_0_0_0_1_0_01_0_0,  // 10 1111 GOTO
    17'b1_0_1000_0_0_0_0_0_0_0_00_0_0,  // 11 0000 MOVLW
    17'b1_0_1000_0_0_0_0_0_0_0_00_0_0,  // 11 0001 MOVLW
    17'b1_0_1000_0_0_0_0_0_0_0_00_0_0,  // 11 0010 MOVLW
    17'b1_0_1000_0_0_0_0_0_0_0_00_0_0,  // 11 0011 MOVLW
    17'b1_0_1000_0_0_0_0_0_1_0_10_0_1,  // 11 0100 RETLW
    17'b1_0_1000_0_0_0_0_0_1_0_10_0_1,  // 11 0101 RETLW
    17'b1_0_1000_0_0_0_0_0_1_0_10_0_1,  // 11 0110 RETLW
    17'b1_0_1000_0_0_0_0_0_1_0_10_0_1,  // 11 0111 RETLW
    17'b1_0_0011_0_0_0_0_1_0_0_00_0_0,  // 11 1000 IORLW
    17'b1_0_0010_0_0_0_0_1_0_0_00_0_0,  // 11 1001 ANDLW
    17'b1_0_0100_0_0_0_0_1_0_0_00_0_0,  // 11 1010 XORLW
    17'b0_0_1101_0_0_0_0_0_1_0_10_0_1,  // 11 1011 RETURN
    17'b1_0_0001_0_0_1_1_1_0_0_00_0_0,  // 11 1100 SUBLW
    17'b1_0_0001_0_0_1_1_1_0_0_00_0_0,  // 11 1101 SUBLW
    17'b1_0_0000_0_0_1_1_1_0_0_00_0_0,  // 11 1110 ADDLW
    17'b1_0_0000_0_0_1_1_1_0_0_00_0_0   // 11 1111 ADDLW
  };

  ctrl_word_t word;

  always_comb word = ctrl_word_t'(CTRL_ROM[Instr]);

  // Consistency rules of a control word: a stack operation is either a push
  // or a pop, a flush is either unconditional or conditional, and W/f writes
  // are either forced or chosen by d, never both.
  always_comb begin
    assert (!(word.Push && word.Pop))
      else $error("control word %b: Push and Pop together", Instr);
    assert (!(word.IR_clear && word.IR_clear_cond))
      else $error("control word %b: IR_clear and IR_clear_cond together", Instr);
    assert (!(word.Write_en && (word.W_write || word.F_write)))
      else $error("control word %b: Write_en with W_write or F_write", Instr);
    assert (!(word.Push && word.PC_Sel != PC_K))
      else $error("control word %b: Push without a jump to k", Instr);
  end

  always_comb begin
    W_write       = word.W_write;
    Write_en      = word.Write_en;
    m             = word.m;
    L_or_F        = word.L_or_F;
    F_write       = word.F_write;
    C_en          = word.C_en;
    DC_en         = word.DC_en;
    Z_en          = word.Z_en;
    IR_clear      = word.IR_clear;
    IR_clear_cond = word.IR_clear_cond;
    PC_Sel        = word.PC_Sel;
    Push          = word.Push;
    Pop           = word.Pop;
  end

endmodule
