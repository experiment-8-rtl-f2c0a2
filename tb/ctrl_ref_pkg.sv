// ctrl_ref_pkg: reference decoder used by the testbenches.
//
// ref_ctrl() gives the control word an opcode IR_Data[13:8] must produce,
// worked out instruction by instruction from the instruction-set table
// (operation, flags affected, one or two cycles, destination) rather than
// from the control-memory image. ref_mnemonic() names the instruction for
// messages.
package ctrl_ref_pkg;
  import pic_ctrl_pkg::*;

  function automatic ctrl_word_t ref_ctrl(input logic [5:0] op);
    ctrl_word_t c;
    c = '0;
    c.m      = ALU_PASSW;
    c.PC_Sel = PC_INC;
    casez (op)
      // byte-oriented file register operations: destination from d
      6'b00_????: begin
        c.Write_en = 1'b1;
        c.L_or_F   = SEL_FILE;
        unique case (op[3:0])
          4'b0000: c.m = ALU_PASSW;                                        // MOVWF, NOP
          4'b0001: begin c.m = ALU_CLR;  c.Z_en = 1; end                   // CLRF, CLRW
          4'b0010: begin c.m = ALU_SUB;  {c.C_en, c.DC_en, c.Z_en} = '1; end // SUBWF
          4'b0011: begin c.m = ALU_DEC;  c.Z_en = 1; end                   // DECF
          4'b0100: begin c.m = ALU_IOR;  c.Z_en = 1; end                   // IORWF
          4'b0101: begin c.m = ALU_AND;  c.Z_en = 1; end                   // ANDWF
          4'b0110: begin c.m = ALU_XOR;  c.Z_en = 1; end                   // XORWF
          4'b0111: begin c.m = ALU_ADD;  {c.C_en, c.DC_en, c.Z_en} = '1; end // ADDWF
          4'b1000: begin c.m = ALU_PASSB; c.Z_en = 1; end                  // MOVF
          4'b1001: begin c.m = ALU_COM;  c.Z_en = 1; end                   // COMF
          4'b1010: begin c.m = ALU_INC;  c.Z_en = 1; end                   // INCF
          4'b1011: begin c.m = ALU_DEC;  c.IR_clear_cond = 1; end          // DECFSZ
          4'b1100: begin c.m = ALU_RRF;  c.C_en = 1; end                   // RRF
          4'b1101: begin c.m = ALU_RLF;  c.C_en = 1; end                   // RLF
          4'b1110: c.m = ALU_SWAP;                                         // SWAPF
          4'b1111: begin c.m = ALU_INC;  c.IR_clear_cond = 1; end          // INCFSZ
        endcase
      end
      // BCF, BSF: always write f
      6'b01_0???: begin c.F_write = 1; c.m = ALU_BITWR; c.L_or_F = SEL_FILE; end
      // BTFSC, BTFSS: skip on zero test result
      6'b01_1???: begin c.m = ALU_BITTST; c.L_or_F = SEL_FILE; c.IR_clear_cond = 1; end
      // CALL
      6'b10_0???: begin c.IR_clear = 1; c.PC_Sel = PC_K; c.Push = 1; end
      // GOTO
      6'b10_1???: begin c.IR_clear = 1; c.PC_Sel = PC_K; end
      // MOVLW
      6'b11_00??: begin c.W_write = 1; c.m = ALU_PASSB; end
      // RETLW
      6'b11_01??: begin
        c.W_write = 1; c.m = ALU_PASSB;
        c.IR_clear = 1; c.PC_Sel = PC_STACK; c.Pop = 1;
      end
      6'b11_1000: begin c.W_write = 1; c.m = ALU_IOR; c.Z_en = 1; end      // IORLW
      6'b11_1001: begin c.W_write = 1; c.m = ALU_AND; c.Z_en = 1; end      // ANDLW
      6'b11_1010: begin c.W_write = 1; c.m = ALU_XOR; c.Z_en = 1; end      // XORLW
      6'b11_1011: begin c.IR_clear = 1; c.PC_Sel = PC_STACK; c.Pop = 1; end // RETURN
      6'b11_110?: begin c.W_write = 1; c.m = ALU_SUB; {c.C_en, c.DC_en, c.Z_en} = '1; end // SUBLW
      6'b11_111?: begin c.W_write = 1; c.m = ALU_ADD; {c.C_en, c.DC_en, c.Z_en} = '1; end // ADDLW
      default: ;
    endcase
    return c;
  endfunction

  function automatic string ref_mnemonic(input logic [5:0] op);
    casez (op)
      6'b00_0000: return "MOVWF/NOP";
      6'b00_0001: return "CLRF/CLRW";
      6'b00_0010: return "SUBWF";
      6'b00_0011: return "DECF";
      6'b00_0100: return "IORWF";
      6'b00_0101: return "ANDWF";
      6'b00_0110: return "XORWF";
      6'b00_0111: return "ADDWF";
      6'b00_1000: return "MOVF";
      6'b00_1001: return "COMF";
      6'b00_1010: return "INCF";
      6'b00_1011: return "DECFSZ";
      6'b00_1100: return "RRF";
      6'b00_1101: return "RLF";
      6'b00_1110: return "SWAPF";
      6'b00_1111: return "INCFSZ";
      6'b01_00??: return "BCF";
      6'b01_01??: return "BSF";
      6'b01_10??: return "BTFSC";
      6'b01_11??: return "BTFSS";
      6'b10_0???: return "CALL";
      6'b10_1???: return "GOTO";
      6'b11_00??: return "MOVLW";
      6'b11_01??: return "RETLW";
      6'b11_1000: return "IORLW";
      6'b11_1001: return "ANDLW";
      6'b11_1010: return "XORLW";
      6'b11_1011: return "RETURN";
      6'b11_110?: return "SUBLW";
      default:    return "ADDLW";
    endcase
  endfunction
endpackage
