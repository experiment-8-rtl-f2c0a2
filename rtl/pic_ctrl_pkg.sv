// pic_ctrl_pkg: types and constants shared by the control path of the
// PIC16F84A-style processor.
//
// The control memory holds one 17-bit word per 6-bit opcode. The word is
// described here as a packed struct whose field order, from bit 16 down to
// bit 0, is the column order of the control-memory table: W_write, Write_en,
// m[3:0], L_or_F, F_write, C_en, DC_en, Z_en, IR_clear, IR_clear_cond,
// PC_Sel[1:0], Push, Pop.
//
// The ALU operation codes are this design's own numbering except for three
// values that the control-memory table fixes: 1100 (clear, CLRF/CLRW), 1101
// (pass W, MOVWF/NOP) and 1001 (rotate left, RLF). The two bit-oriented codes
// expect the ALU to read the bit number IR_Data[9:7] and the polarity bit
// IR_Data[10] itself: ALU_BITWR gives f with bit b cleared (IR_Data[10]=0,
// BCF) or set (1, BSF); ALU_BITTST gives f & mask (IR_Data[10]=0, BTFSC) or
// ~f & mask (1, BTFSS), so that a zero result always means "skip".
package pic_ctrl_pkg;

  localparam int unsigned CTRL_W = 17;  // control-memory word width
  localparam int unsigned CTRL_DEPTH = 64;

  typedef enum logic [3:0] {
    ALU_ADD    = 4'b0000,  // W + B
    ALU_SUB    = 4'b0001,  // B - W
    ALU_AND    = 4'b0010,  // W & B
    ALU_IOR    = 4'b0011,  // W | B
    ALU_XOR    = 4'b0100,  // W ^ B
    ALU_COM    = 4'b0101,  // ~B
    ALU_INC    = 4'b0110,  // B + 1
    ALU_DEC    = 4'b0111,  // B - 1
    ALU_PASSB  = 4'b1000,  // B (MOVF, MOVLW, RETLW)
    ALU_RLF    = 4'b1001,  // rotate B left through carry
    ALU_RRF    = 4'b1010,  // rotate B right through carry
    ALU_SWAP   = 4'b1011,  // swap nibbles of B
    ALU_CLR    = 4'b1100,  // 0
    ALU_PASSW  = 4'b1101,  // W
    ALU_BITWR  = 4'b1110,  // clear / set bit b of B
    ALU_BITTST = 4'b1111   // test bit b of B
  } alu_op_e;

  // Next-PC source selected by PC_Sel.
  typedef enum logic [1:0] {
    PC_INC   = 2'b00,  // PC + 1
    PC_K     = 2'b01,  // 11-bit literal of CALL / GOTO
    PC_STACK = 2'b10   // top of the return stack (RETURN, RETLW)
  } pc_sel_e;

  // L_or_F values.
  localparam logic SEL_LIT  = 1'b0;
  localparam logic SEL_FILE = 1'b1;

  typedef struct packed {
    logic    W_write;        // always writes W
    logic    Write_en;       // writes W or f as the d bit says
    alu_op_e m;              // ALU operation
    logic    L_or_F;         // ALU operand B: 1 = f, 0 = literal
    logic    F_write;        // always writes f
    logic    C_en;           // update C
    logic    DC_en;          // update DC
    logic    Z_en;           // update Z
    logic    IR_clear;       // flush next instruction
    logic    IR_clear_cond;  // flush next instruction if result is zero
    pc_sel_e PC_Sel;         // next-PC source
    logic    Push;           // push return address
    logic    Pop;            // pop return address
  } ctrl_word_t;

endpackage
