// elms_pkg: instruction word layout of the Enclosed Loop Micro-Sequencer (ELMS).
//
// An ELMS word is 36 bits. Bits 35..32 are the program control bits; a word with
// all four clear is a user instruction whose lower 32 bits belong to the
// application. The control bits are decoded one by one:
//   bit 35  JMP    next PC = desA
//   bit 34  RTN    next PC = BckA of the innermost loop, pop it
//   bit 33  FOR    push {BckA, EndA, cnt}; with bit 35 also set (CALL) cnt = 1
//   bit 32  JMPIF  next PC = desA when the CondJMP input is high
// Combined codes are the sums of these: CALL = 4'b1010, and BRK = 4'b1100 (jump
// to desA and pop the loop), which is this package's reading of the BRK entry of
// the branch-code list.
// Field positions follow the assembled program words (FOR at PC 07 is
// 0x200081703): BckA in 23:16, EndA in 15:8, cnt or desA in 7:0.
package elms_pkg;

  localparam int unsigned IW       = 36;  // instruction width
  localparam int unsigned FIELD_W  = 8;   // width of BckA, EndA, cnt, desA fields

  typedef logic [IW-1:0]      instr_t;
  typedef logic [FIELD_W-1:0] field_t;

  localparam int unsigned BIT_JMP   = 35;
  localparam int unsigned BIT_RTN   = 34;
  localparam int unsigned BIT_FOR   = 33;
  localparam int unsigned BIT_JMPIF = 32;

  // One loop entry of the Loop & Return Registers and of the stack.
  typedef struct packed {
    logic   valid;
    field_t bck;
    field_t fin;   // EndA
    field_t cnt;
  } loop_t;

  function automatic field_t f_bck(instr_t i); return i[23:16]; endfunction
  function automatic field_t f_end(instr_t i); return i[15:8];  endfunction
  function automatic field_t f_low(instr_t i); return i[7:0];   endfunction

  // Assembler helpers for program control words.
  function automatic instr_t op_jmp(field_t des);
    return {4'b1000, 24'h0, des};
  endfunction
  function automatic instr_t op_jmpif(field_t des);
    return {4'b0001, 24'h0, des};
  endfunction
  function automatic instr_t op_for(field_t bck, field_t fin, field_t cnt);
    return {4'b0010, 8'h00, bck, fin, cnt};
  endfunction
  function automatic instr_t op_call(field_t bck, field_t fin, field_t des);
    return {4'b1010, 8'h00, bck, fin, des};
  endfunction
  function automatic instr_t op_rtn();
    return {4'b0100, 32'h0};
  endfunction
  function automatic instr_t op_brk(field_t des);
    return {4'b1100, 24'h0, des};
  endfunction

endpackage
