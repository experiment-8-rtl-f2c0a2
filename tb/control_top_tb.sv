// control_top_tb: end-to-end testbench of the control path.
//
// Part 1 applies every opcode with both values of the d bit, of Z and of
// Reset, plus random low instruction bits, and compares all outputs with
// the reference decoder of ctrl_ref_pkg and the meaning of the three
// enable circuits.
//
// Part 2 runs a short program on a behavioural model of the rest of the
// processor, written here in the testbench: program memory, instruction
// register with synchronous clear (IR_Res), program counter, return stack,
// W, a small file-register array, the status flags and an ALU using the
// codes of pic_ctrl_pkg. The program exercises CALL/RETLW, GOTO, a DECFSZ
// loop, BTFSS and BTFSC (taken and not taken), MOVLW, MOVWF, CLRF, INCF and
// ADDWF. It checks the final W and file contents and that the program takes
// exactly the number of cycles the instruction set gives: one per
// instruction, two for CALL, GOTO, RETLW and for a skip that is taken.
//
// Every mechanism of the control path is counted (writes of W and f by d,
// literal writes of W, bit writes of f, skips taken and not taken, jump
// flushes, reset flushes, push, pop, each PC_Sel value) and a mechanism
// that never occurred counts as a failure.
module control_top_tb;
  import pic_ctrl_pkg::*;
  import ctrl_ref_pkg::*;

  logic        clk = 1'b0;
  logic [13:0] IR_Data;
  logic        Reset, Z;
  logic [13:0] sw_ir, ir_q;     // instruction driven by the sweep / by the model
  logic        sw_z;            // Z driven by the sweep
  logic        W_we, DataWrite, IR_Res, L_or_F, C_en, DC_en, Z_en, Push, Pop;
  alu_op_e     m;
  pc_sel_e     PC_Sel;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_top dut (.*);

  // ---------------------------------------------------------------- counters
  typedef enum int {
    EV_W_BY_D, EV_F_BY_D, EV_W_LIT, EV_F_BIT, EV_SKIP_TAKEN, EV_SKIP_NOT,
    EV_JUMP_FLUSH, EV_RESET_FLUSH, EV_PUSH, EV_POP, EV_PC_INC, EV_PC_K,
    EV_PC_STACK, EV_NUM
  } event_e;
  int events [EV_NUM];
  string event_name [EV_NUM] = '{"W written by d=0", "f written by d=1",
    "W written by literal op", "f written by bit op", "skip taken",
    "skip not taken", "jump flush", "reset flush", "push", "pop",
    "PC_Sel=PC+1", "PC_Sel=k", "PC_Sel=stack"};

  task automatic count_events();
    ctrl_word_t c;
    c = ref_ctrl(IR_Data[13:8]);
    if (c.Write_en && W_we && !IR_Data[7])     events[EV_W_BY_D]++;
    if (c.Write_en && DataWrite && IR_Data[7]) events[EV_F_BY_D]++;
    if (c.W_write && W_we)                     events[EV_W_LIT]++;
    if (c.F_write && DataWrite)                events[EV_F_BIT]++;
    if (c.IR_clear_cond && !Reset)  events[Z ? EV_SKIP_TAKEN : EV_SKIP_NOT]++;
    if (c.IR_clear && IR_Res)       events[EV_JUMP_FLUSH]++;
    if (Reset && IR_Res)            events[EV_RESET_FLUSH]++;
    if (Push)                       events[EV_PUSH]++;
    if (Pop)                        events[EV_POP]++;
    case (PC_Sel)
      PC_INC:   events[EV_PC_INC]++;
      PC_K:     events[EV_PC_K]++;
      PC_STACK: events[EV_PC_STACK]++;
      default:  ;
    endcase
  endtask

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // -------------------------------------------------- part 1: opcode sweep
  task automatic sweep();
    for (int op = 0; op < 64; op++)
      for (int v = 0; v < 8; v++) begin
        ctrl_word_t c;
        logic       exp_w, exp_f, exp_res;
        @(posedge clk);
        sw_ir   = {6'(op), v[0], 7'($urandom)};
        sw_z    = v[1];
        Reset   = v[2];
        c       = ref_ctrl(6'(op));
        exp_w   = c.W_write | (c.Write_en & ~v[0]);
        exp_f   = c.F_write | (c.Write_en &  v[0]);
        exp_res = v[2] | c.IR_clear | (c.IR_clear_cond & v[1]);
        #1;
        checks++;
        if (W_we !== exp_w || DataWrite !== exp_f || IR_Res !== exp_res ||
            m !== c.m || L_or_F !== c.L_or_F || C_en !== c.C_en ||
            DC_en !== c.DC_en || Z_en !== c.Z_en || PC_Sel !== c.PC_Sel ||
            Push !== c.Push || Pop !== c.Pop)
          fail($sformatf("sweep %s IR=%b Z=%b Reset=%b", ref_mnemonic(6'(op)),
                         IR_Data, Z, Reset));
        count_events();
      end
  endtask

  // ------------------------------------- part 2: program on a model datapath
  // Instruction encoders.
  function automatic logic [13:0] i_byte(input logic [3:0] op, input logic d, input logic [6:0] f);
    return {2'b00, op, d, f};
  endfunction
  function automatic logic [13:0] i_bit(input logic [1:0] op, input logic [2:0] b, input logic [6:0] f);
    return {2'b01, op, b, f};
  endfunction
  function automatic logic [13:0] i_lit(input logic [3:0] op, input logic [7:0] k);
    return {2'b11, op, k};
  endfunction
  function automatic logic [13:0] i_jump(input logic call_n, input logic [10:0] k);
    return {2'b10, call_n, k};
  endfunction

  localparam logic [6:0] F_CNT = 7'h10, F_ACC = 7'h11;
  localparam int HALT_ADDR = 10;

  logic [13:0] prog [16];
  logic [10:0] pc;
  logic [10:0] stack [8];
  logic [2:0]  sp;
  logic [7:0]  w_reg, file [128];
  logic        c_flag, dc_flag, z_flag;
  logic [7:0]  alu_y;
  logic        alu_c, alu_dc;
  logic        model_on = 1'b0;

  // ALU model with the pic_ctrl_pkg codes.
  always_comb begin
    logic [7:0] b, mask;
    logic [8:0] s;
    b      = L_or_F ? file[IR_Data[6:0]] : IR_Data[7:0];
    mask   = 8'(1) << IR_Data[9:7];
    alu_c  = c_flag;
    alu_dc = dc_flag;
    s      = '0;
    unique case (m)
      ALU_ADD:    begin s = {1'b0, w_reg} + {1'b0, b}; alu_y = s[7:0]; alu_c = s[8];
                        alu_dc = (5'(w_reg[3:0]) + 5'(b[3:0])) > 5'd15; end
      ALU_SUB:    begin s = {1'b0, b} - {1'b0, w_reg}; alu_y = s[7:0]; alu_c = ~s[8];
                        alu_dc = b[3:0] >= w_reg[3:0]; end
      ALU_AND:    alu_y = w_reg & b;
      ALU_IOR:    alu_y = w_reg | b;
      ALU_XOR:    alu_y = w_reg ^ b;
      ALU_COM:    alu_y = ~b;
      ALU_INC:    alu_y = b + 8'd1;
      ALU_DEC:    alu_y = b - 8'd1;
      ALU_PASSB:  alu_y = b;
      ALU_RLF:    begin alu_y = {b[6:0], c_flag}; alu_c = b[7]; end
      ALU_RRF:    begin alu_y = {c_flag, b[7:1]}; alu_c = b[0]; end
      ALU_SWAP:   alu_y = {b[3:0], b[7:4]};
      ALU_CLR:    alu_y = '0;
      ALU_PASSW:  alu_y = w_reg;
      ALU_BITWR:  alu_y = IR_Data[10] ? (b | mask) : (b & ~mask);
      ALU_BITTST: alu_y = IR_Data[10] ? (~b & mask) : (b & mask);
    endcase
  end

  always_comb IR_Data = model_on ? ir_q : sw_ir;
  always_comb Z       = model_on ? (alu_y == 8'h00) : sw_z;

  always_ff @(posedge clk) if (model_on) begin
    ir_q <= IR_Res ? 14'h0000 : prog[4'(pc)];
    unique case (PC_Sel)
      PC_INC:   pc <= pc + 11'd1;
      PC_K:     pc <= IR_Data[10:0];
      PC_STACK: pc <= stack[sp - 3'd1];
      default:  pc <= pc + 11'd1;
    endcase
    if (Reset) pc <= '0;
    if (Push) begin stack[sp] <= pc; sp <= sp + 3'd1; end
    if (Pop)  sp <= sp - 3'd1;
    if (W_we) w_reg <= alu_y;
    if (DataWrite) file[IR_Data[6:0]] <= alu_y;
    if (C_en)  c_flag  <= alu_c;
    if (DC_en) dc_flag <= alu_dc;
    if (Z_en)  z_flag  <= (alu_y == 8'h00);
  end

  task automatic run_program();
    int cycles;
    prog[0]  = i_lit (4'b0000, 8'd3);              // MOVLW  3
    prog[1]  = i_byte(4'b0000, 1'b1, F_CNT);       // MOVWF  CNT
    prog[2]  = i_byte(4'b0001, 1'b1, F_ACC);       // CLRF   ACC
    prog[3]  = i_jump(1'b0, 11'd11);               // CALL   11
    prog[4]  = i_byte(4'b1011, 1'b1, F_CNT);       // DECFSZ CNT,f
    prog[5]  = i_jump(1'b1, 11'd3);                // GOTO   3
    prog[6]  = i_bit (2'b11, 3'd0, F_ACC);         // BTFSS  ACC,0  (set: skip)
    prog[7]  = i_lit (4'b0000, 8'hEE);             // MOVLW  0xEE   (skipped)
    prog[8]  = i_bit (2'b10, 3'd1, F_ACC);         // BTFSC  ACC,1  (set: no skip)
    prog[9]  = i_byte(4'b0111, 1'b0, F_ACC);       // ADDWF  ACC,w
    prog[10] = i_jump(1'b1, 11'(HALT_ADDR));       // GOTO   10     (halt)
    prog[11] = i_byte(4'b1010, 1'b1, F_ACC);       // INCF   ACC,f
    prog[12] = i_lit (4'b0100, 8'h55);             // RETLW  0x55
    for (int i = 13; i < 16; i++) prog[i] = '0;
    for (int i = 0; i < 128; i++) file[i] = 8'hA5;
    w_reg = 8'hFF; c_flag = 0; dc_flag = 0; z_flag = 0; sp = '0; pc = 11'h7F;
    ir_q = i_lit(4'b0000, 8'h77);
    // Reset for two cycles: the instruction register must be cleared and the
    // program counter start at 0.
    @(negedge clk);
    model_on = 1'b1;
    Reset    = 1'b1;
    repeat (2) begin
      @(negedge clk);
      count_events();
    end
    checks++;
    if (IR_Data !== 14'h0000 || pc !== '0) fail("reset did not clear IR and PC");
    Reset = 1'b0;
    // The first edge fetches address 0; from then on count cycles until the
    // halt instruction is in the instruction register.
    cycles = 0;
    @(negedge clk);
    count_events();
    while (!(IR_Data == prog[HALT_ADDR] && pc == 11'(HALT_ADDR + 1)) && cycles < 200) begin
      @(negedge clk);
      count_events();
      cycles++;
    end
    // 3 setup instructions, two loop passes of CALL(2)+INCF(1)+RETLW(2)+
    // DECFSZ(1)+GOTO(2) = 8, a last pass with DECFSZ skipping = 7,
    // BTFSS taken (2), BTFSC not taken (1), ADDWF (1): 3 + 8 + 8 + 7 + 4 = 30.
    checks++;
    if (cycles != 30) fail($sformatf("program took %0d cycles, expected 30", cycles));
    checks++;
    if (w_reg !== 8'h58) fail($sformatf("W = %h, expected 58", w_reg));
    checks++;
    if (file[F_CNT] !== 8'h00) fail($sformatf("CNT = %h, expected 00", file[F_CNT]));
    checks++;
    if (file[F_ACC] !== 8'h03) fail($sformatf("ACC = %h, expected 03", file[F_ACC]));
    checks++;
    if (sp !== 3'd0) fail($sformatf("stack pointer = %0d, expected 0", sp));
    checks++;
    if (c_flag !== 1'b0 || dc_flag !== 1'b0 || z_flag !== 1'b0)
      fail($sformatf("flags C=%b DC=%b Z=%b, expected 0 0 0", c_flag, dc_flag, z_flag));
    model_on = 1'b0;
  endtask

  initial begin
    foreach (events[i]) events[i] = 0;
    sw_ir = '0; sw_z = 1'b0; Reset = 1'b0;
    sweep();
    run_program();
    foreach (events[i]) begin
      checks++;
      $display("%-24s %0d", event_name[i], events[i]);
      if (events[i] == 0) fail($sformatf("mechanism never exercised: %s", event_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
