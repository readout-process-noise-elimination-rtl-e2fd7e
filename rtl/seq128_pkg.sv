// seq128_pkg: user instruction set and program of the Seq128 sequencer.
//
// A user instruction (bits 35..32 all zero) holds four 4-bit instruction fields
// SEQA (31:28), SEQB (27:24), SEQC (23:20) and SEQDQQ (19:16) and two 8-bit
// address/data fields ADH (15:8) and ADL (7:0). Each field value 1..15 names one
// control strobe; 0 is "nothing". The codes below are the BLM instruction set.
// Strobes that may be needed in the same cycle sit in different fields.
//
// The program image is assembled by seq128_program(). Words 00..17 are the
// sliding-sum program: a dead loop at 03, entry at 04 (RUNat04), an outer FOR
// over the 4 sum types and an inner FOR over the 4 channels. Words 18..1F are
// this design's own addition: they store the current samples into the raw
// record, raise EndCycle and jump back to the dead loop.
package seq128_pkg;
  import elms_pkg::*;

  localparam int unsigned ROM_DEPTH = 128;
  typedef logic [ROM_DEPTH-1:0][IW-1:0] rom_image_t;

  // Decoded control strobes: one-hot per field, bit k = field value k (bit 0
  // never set). d is the SEQDQQ field one clock after a, b and c.
  typedef struct packed {
    logic [15:0] a;
    logic [15:0] b;
    logic [15:0] c;
    logic [15:0] d;
    logic [7:0]  adh;
    logic [7:0]  adl;
  } seq_ctrl_t;

  // SEQA field
  localparam int unsigned A_INC_CIR_BUF_PT  = 1;
  localparam int unsigned A_CHK_JMP_COND    = 2;
  localparam int unsigned A_SEL_SUM_LENGTHS = 3;
  localparam int unsigned A_EN_SUMS_MEM_A   = 4;
  localparam int unsigned A_SUMS_MEM_CS     = 5;
  localparam int unsigned A_WR_SUM_XA       = 6;
  localparam int unsigned A_WR_SUM_XB       = 7;
  localparam int unsigned A_EN_SUM_D        = 9;
  localparam int unsigned A_LATCH_INTG      = 10;
  localparam int unsigned A_WR_SUM_X        = 11;
  localparam int unsigned A_CHK_SUMS_OT     = 12;
  localparam int unsigned A_WR_WVFORM       = 13;
  localparam int unsigned A_WR_CONST_X      = 14;
  // SEQB field
  localparam int unsigned B_SET_TYPE        = 1;
  localparam int unsigned B_INC_TYPE        = 2;
  localparam int unsigned B_SUB_QLEN        = 3;
  localparam int unsigned B_SEL_CURR_ADDR   = 4;
  localparam int unsigned B_SUMS_MEM_OE     = 5;
  localparam int unsigned B_SEL_QSQCH       = 6;
  localparam int unsigned B_SUB_SUM_D       = 8;
  localparam int unsigned B_SLOAD_SUM_D     = 9;
  localparam int unsigned B_SEL_INTG_X      = 11;
  localparam int unsigned B_CHK_INTG_OT     = 12;
  localparam int unsigned B_SEL_CONST_H     = 14;
  localparam int unsigned B_WR_DACS         = 15;
  // SEQC field
  localparam int unsigned C_SET_CH          = 1;
  localparam int unsigned C_INC_CH          = 2;
  localparam int unsigned C_SEL_QWF         = 3;
  localparam int unsigned C_SHIFT_M1        = 4;
  localparam int unsigned C_SUMS_MEM_WE     = 5;
  localparam int unsigned C_EN_QTAIL_SQCH   = 6;
  localparam int unsigned C_SEL_64HI        = 7;
  localparam int unsigned C_SEL_INIT_VALUE  = 8;
  localparam int unsigned C_SEL_SUM_MQQ     = 9;
  localparam int unsigned C_SEL_SUM_MQQ_SH  = 10;
  localparam int unsigned C_SEL_QCH         = 11;
  localparam int unsigned C_SEL_TAIL_SQCH   = 12;
  localparam int unsigned C_SEL_PED         = 13;
  localparam int unsigned C_ON_LATCH_X      = 14;
  localparam int unsigned C_END_CYCLE       = 15;
  // SEQDQQ field (decoded one pipeline step after the others)
  localparam int unsigned D_EN_QLEN         = 1;
  localparam int unsigned D_EN_QCH          = 2;
  localparam int unsigned D_LD_MODE_SEL_X   = 4;
  localparam int unsigned D_LD_DAC_OUT_X    = 5;
  localparam int unsigned D_LD_SUM_MQH      = 7;
  localparam int unsigned D_LD_SUM_MQ       = 8;
  localparam int unsigned D_EN_QSQCH        = 9;
  localparam int unsigned D_EN_QPED_L       = 10;
  localparam int unsigned D_EN_QPED_H       = 11;

  // Parameter RAM and Sum Keeping RAM base addresses used by the program.
  localparam logic [7:0] PAR_SUM_LEN   = 8'h40;  // + type: sum length of the type
  localparam logic [7:0] PAR_CUR_HIT   = 8'h48;  // current hit (taken from the ADC latch)
  localparam logic [7:0] PAR_THRESHOLD = 8'h68;  // + {type,ch}: threshold of the sum
  localparam logic [7:0] SUM_BASE      = 8'h80;  // + {type,ch}: stored sliding sum

  localparam logic [7:0] PC_DEAD = 8'h03;  // dead loop after reset
  localparam logic [7:0] PC_RUN  = 8'h04;  // entry forced by RUNat04

  function automatic instr_t op_user(int unsigned a, int unsigned b, int unsigned c,
                                     int unsigned d, logic [7:0] adh, logic [7:0] adl);
    return {4'b0000, a[3:0], b[3:0], c[3:0], d[3:0], adh, adl};
  endfunction

  function automatic rom_image_t seq128_program();
    rom_image_t p = '0;
    p[8'h03] = op_jmp(PC_DEAD);                                   // DeadBk3
    p[8'h05] = op_user(A_INC_CIR_BUF_PT, 0, 0, 0, 8'h00, 8'h00);
    p[8'h06] = op_user(0, B_SET_TYPE, 0, 0, 8'h00, 8'h00);         // type = 0
    p[8'h07] = op_for(8'h08, 8'h17, 8'h03);                        // 4 sum types
    p[8'h08] = op_user(A_SEL_SUM_LENGTHS, 0, 0, D_EN_QLEN, 8'h00, PAR_SUM_LEN);
    p[8'h09] = op_user(0, 0, C_SET_CH, 0, 8'h00, 8'h00);           // ch = 0
    p[8'h0A] = op_for(8'h0B, 8'h16, 8'h03);                        // 4 channels
    p[8'h0B] = op_user(0, 0, 0, D_EN_QCH, 8'h00, PAR_CUR_HIT);     // current hit
    p[8'h0C] = op_user(0, 0, 0, D_LD_SUM_MQ, SUM_BASE, 8'h00);     // stored sum
    p[8'h0D] = op_user(A_EN_SUMS_MEM_A, 0, 0, D_LD_MODE_SEL_X, 8'h00, PAR_THRESHOLD);
    p[8'h0E] = op_user(A_SUMS_MEM_CS, B_SUMS_MEM_OE, 0, 0, 8'h00, 8'h00);
    p[8'h0F] = op_user(A_SUMS_MEM_CS, B_SUMS_MEM_OE, C_EN_QTAIL_SQCH, 0, 8'h00, 8'h00);
    p[8'h10] = op_user(A_EN_SUM_D, B_SLOAD_SUM_D, C_SEL_SUM_MQQ, 0, 8'h00, 8'h00);
    p[8'h11] = op_user(A_EN_SUM_D, 0, C_SEL_QCH, 0, 8'h00, 8'h00);
    p[8'h12] = op_user(A_EN_SUM_D, B_SUB_SUM_D, C_SEL_TAIL_SQCH, 0, 8'h00, 8'h00);
    p[8'h14] = op_user(A_WR_SUM_X, 0, 0, 0, SUM_BASE, 8'h00);
    p[8'h15] = op_user(A_CHK_SUMS_OT, 0, 0, 0, 8'h00, 8'h00);
    p[8'h16] = op_user(0, 0, C_INC_CH, 0, 8'h00, 8'h00);           // ChEnd1
    p[8'h17] = op_user(0, B_INC_TYPE, 0, 0, 8'h00, 8'h00);         // TypeEnd1
    // Store the current samples into the raw record (this design's addition).
    p[8'h18] = op_user(0, 0, C_SET_CH, 0, 8'h00, 8'h00);
    p[8'h19] = op_for(8'h1A, 8'h1D, 8'h03);
    p[8'h1A] = op_user(0, 0, 0, D_EN_QCH, 8'h00, PAR_CUR_HIT);
    p[8'h1C] = op_user(A_SUMS_MEM_CS, B_SEL_CURR_ADDR, C_SUMS_MEM_WE, 0, 8'h00, 8'h00);
    p[8'h1D] = op_user(0, 0, C_INC_CH, 0, 8'h00, 8'h00);
    p[8'h1E] = op_user(0, 0, C_END_CYCLE, 0, 8'h00, 8'h00);
    p[8'h1F] = op_jmp(PC_DEAD);
    return p;
  endfunction

endpackage
